// wstm: write side of a serial-audio delay/buffer memory. It receives a
// 16-bit stereo I2S stream (SDATA, LRCK, BCK at 32 bit clocks per frame) from
// an audio source, converts each left and right word to parallel form and
// writes it into an external asynchronous SRAM, and raises RSTART once the
// number of bits received reaches the depth chosen by DEPTH_SEL, to start a
// separate read sequencer.
//
// Structure (all following the original design): LRCK and BCK are
// synchronised to SYSCLK and turned into edge pulses (edge_oneshot); a
// shift register takes a bit on each BCK rising edge; a 16-bit bit counter
// advances on each BCK falling edge and serves as write address; a 12-state
// machine locks to the first LRCK rising edge and, after bit 15 and bit 31 of
// every frame, enables the data-bus buffer and gives a two-cycle write pulse.
// The write address is the bit count at the time of the write, i.e. 16, 32,
// 48, ... so words are stored 16 addresses apart.
//
// Interface: XRESET is an asynchronous active-low reset, SYSCLK the system
// clock. XBUFOE, XWCE, XWE and XWBHE are active low; WADDRS and WDATA are
// valid from XBUFOE falling until after XWE rises. RSTART is high while the
// bit count equals the selected depth (half a BCK period, once per 65536
// bits). RSTART is taken from the depth comparison; the original design also
// drives it from the end-of-frame state bit, which this implementation keeps
// only inside the state code.
//
// Timing: SYSCLK must give at least four cycles per BCK half period.
//
// The LRCK falling pulse, the state code and its end-of-frame bit are left
// unused here on purpose, so lint reports them as unused signals.
module wstm
  import wstm_pkg::*;
(
  input  logic              XRESET,
  input  logic              SYSCLK,
  input  logic              SDATA,
  input  logic              LRCK,
  input  logic              BCK,
  input  logic [1:0]        DEPTH_SEL,
  output logic              XBUFOE,
  output logic              XWCE,
  output logic              XWE,
  output logic              XWBHE,
  output logic              RSTART,
  output logic [ADDR_W-1:0] WADDRS,
  output logic [WORD_W-1:0] WDATA
);

  logic              lrck_rise, lrck_fall, bck_rise, bck_fall;
  logic              wcnt15, wcnt31;
  logic [ADDR_W-1:0] depth;
  wstate_e           state;
  wstrobe_t          strobes;

  edge_oneshot u_lrck (
    .clk(SYSCLK), .rst_n(XRESET), .din(LRCK),
    .rise(lrck_rise), .fall(lrck_fall)
  );

  edge_oneshot u_bck (
    .clk(SYSCLK), .rst_n(XRESET), .din(BCK),
    .rise(bck_rise), .fall(bck_fall)
  );

  depth_decoder u_depth (
    .depth_sel(DEPTH_SEL), .depth(depth)
  );

  write_fsm u_fsm (
    .clk(SYSCLK), .rst_n(XRESET),
    .lrck_rise(lrck_rise), .bck_rise(bck_rise), .bck_fall(bck_fall),
    .wcnt15(wcnt15), .wcnt31(wcnt31),
    .state(state), .strobes(strobes)
  );

  write_counter u_cnt (
    .clk(SYSCLK), .rst_n(XRESET),
    .en(strobes.wcnte), .bck_fall(bck_fall), .depth(depth),
    .count(WADDRS), .wcnt15(wcnt15), .wcnt31(wcnt31), .depth_hit(RSTART)
  );

  shift_register #(.WIDTH(WORD_W)) u_sreg (
    .clk(SYSCLK), .rst_n(XRESET),
    .shift_en(bck_rise), .sdata(SDATA), .q(WDATA)
  );

  assign XBUFOE = strobes.xbufoe;
  assign XWCE   = strobes.xwce;
  assign XWE    = strobes.xwe;
  assign XWBHE  = strobes.xbhe;

endmodule
