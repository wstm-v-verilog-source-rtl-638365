// write_fsm: the write sequencer that turns a serial audio frame into two
// SRAM write cycles.
//
// After reset the machine waits (s0) for a rising LRCK edge, then for one BCK
// falling edge (s1) and the BCK rising edge that follows (s2): that rising
// edge carries the MSB of the first word in I2S timing, so from here on the
// bit counter and the shift register are aligned to the frame. In s3 the
// counter runs; when it reaches bit 15 of a 32-bit frame the machine goes to
// s4, when it reaches bit 31 to s8. Both then enable the data-bus buffer and
// wait for the next BCK falling edge, by which the 16th bit of the word has
// been shifted in, and then pulse XWCE/XWE/XBHE low for two cycles (s5-s6 or
// s9-s10), spend one recovery cycle (s7 or s11) and return to s3. LRCK is
// only looked at once: the machine stays frame-locked by counting 32 bits
// per frame.
//
// The outputs are bits of the state code (see wstm_pkg), as in the original
// design, so they are glitch-free register outputs. Transition conditions
// follow the original table with two corrections needed for the machine to
// work: the bit-31 branch (s8) waits for the BCK falling edge without also
// requiring that the bit-31 flag be clear (it is always set there), and an
// unused state code returns to s0.
//
// Timing: each BCK half period must last at least four SYSCLK cycles so that
// a write pulse and its recovery cycle end before the next BCK edge pulse.
// Reset is asynchronous, active low, to s0.
module write_fsm
  import wstm_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     lrck_rise,  // ss0
  input  logic     bck_rise,   // ss1
  input  logic     bck_fall,   // ss2
  input  logic     wcnt15,     // ss3
  input  logic     wcnt31,     // ss4
  output wstate_e  state,
  output wstrobe_t strobes
);

  wstate_e next;

  always_comb begin
    next = state;
    unique case (state)
      S0:  if (!wcnt31 && !wcnt15 && lrck_rise)              next = S1;
      S1:  if (!wcnt31 && !wcnt15 && bck_fall && !bck_rise)  next = S2;
      S2:  if (!wcnt31 && !wcnt15 && !bck_fall && bck_rise)  next = S3;
      S3:  if (!wcnt31 && wcnt15)                            next = S4;
           else if (wcnt31 && !wcnt15)                       next = S8;
      S4:  if (!wcnt31 && bck_fall && !bck_rise)             next = S5;
      S5:                                                    next = S6;
      S6:                                                    next = S7;
      S7:                                                    next = S3;
      S8:  if (bck_fall && !bck_rise)                        next = S9;
      S9:                                                    next = S10;
      S10:                                                   next = S11;
      S11:                                                   next = S3;
      default:                                               next = S0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= S0;
    else        state <= next;
  end

  assign strobes = wstrobe_t'(state[5:0]);

  // A write strobe is only ever given with the chip selected and the data
  // bus driven, and the write pulse lasts exactly two cycles.
  a_we_needs_ce : assert property (@(posedge clk) disable iff (!rst_n)
    !strobes.xwe |-> (!strobes.xwce && !strobes.xbufoe));
  a_we_two_cycles : assert property (@(posedge clk) disable iff (!rst_n)
    $fell(strobes.xwe) |=> !strobes.xwe ##1 strobes.xwe);

endmodule
