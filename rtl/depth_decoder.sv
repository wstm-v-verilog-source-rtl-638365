// depth_decoder: turns the two-bit DEPTH_SEL input into the 16-bit bit-count
// at which the write sequencer signals that the buffer has been filled
// (RSTART). The four depths, 0x000f, 0x00ff, 0x0fff and 0xffff, are those of
// the original design; all end in binary 1111, so the match always falls on
// the last bit of a 16-bit word.
//
// Purely combinational, no clock.
module depth_decoder
  import wstm_pkg::*;
(
  input  logic [1:0]        depth_sel,
  output logic [ADDR_W-1:0] depth
);

  always_comb depth = DEPTH_TABLE[depth_sel];

endmodule
