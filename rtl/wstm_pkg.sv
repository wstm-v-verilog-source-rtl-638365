// wstm_pkg: types and constants shared by the serial-audio-to-SRAM write
// sequencer (wstm) and its sub-blocks.
//
// The write state machine is a Moore machine whose 10-bit state code carries
// its own outputs: bits [9:6] number the state and bits [5:0] are, from MSB to
// LSB, XBUFOE, XWCE, XWE, XBHE, WCNTE and RSTART (the SRAM strobes are active
// low). The codes below follow that layout. For s3, s7 and s11 the per-state
// output comments of the original encoding table are taken as authoritative
// (WCNTE=1 in s3 and s7, RSTART=1 in s11): with WCNTE=0 in s3 the bit counter
// could never advance and the machine would never leave s3.
package wstm_pkg;

  localparam int unsigned WORD_W = 16;  // audio word / SRAM data width
  localparam int unsigned ADDR_W = 16;  // bit counter and SRAM address width

  // Output bits carried in the low six bits of every state code.
  typedef struct packed {
    logic xbufoe;  // data-bus buffer output enable, active low
    logic xwce;    // SRAM chip enable for writing, active low
    logic xwe;     // SRAM write enable, active low
    logic xbhe;    // SRAM byte-high enable, active low
    logic wcnte;   // bit counter enable, active high
    logic rstart;  // end-of-frame flag, active high
  } wstrobe_t;

  typedef enum logic [9:0] {
    S0  = 10'b0000_111100,  // idle: wait for LRCK rising edge
    S1  = 10'b0001_111100,  // wait for BCK falling edge
    S2  = 10'b0010_111100,  // wait for BCK rising edge (first data bit)
    S3  = 10'b0011_111110,  // count bits until bit 15 or bit 31
    S4  = 10'b0100_011110,  // left word complete: bus on, wait BCK fall
    S5  = 10'b0101_000010,  // left write pulse, cycle 1
    S6  = 10'b0110_000010,  // left write pulse, cycle 2
    S7  = 10'b0111_111110,  // left write recovery
    S8  = 10'b1000_011110,  // right word complete: bus on, wait BCK fall
    S9  = 10'b1001_000010,  // right write pulse, cycle 1
    S10 = 10'b1010_000010,  // right write pulse, cycle 2
    S11 = 10'b1011_111111   // right write recovery, end of frame
  } wstate_e;

  // Terminal counts selectable with DEPTH_SEL.
  localparam logic [ADDR_W-1:0] DEPTH_TABLE [4] = '{
    16'h000f, 16'h00ff, 16'h0fff, 16'hffff
  };

endpackage
