// write_counter: the bit counter of the write sequencer.
//
// A 16-bit counter advances by one on each BCK falling edge pulse while the
// state machine enables it, and wraps from 0xffff to 0. Its value is used
// directly as the SRAM write address (so consecutive 16-bit words land 16
// addresses apart), and three decodes of it are made:
//   wcnt15 - the low five bits are 01111: the left word's last bit is due
//   wcnt31 - the low five bits are 11111: the right word's last bit is due
//   depth_hit - the whole count equals the selected depth (RSTART)
// All of this follows the original design.
//
// Timing: the count changes one cycle after the enabled bck_fall pulse; the
// decodes are combinational from the count. Reset is asynchronous, active
// low, and clears the count.
module write_counter
  import wstm_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              en,        // WCNTE from the state machine
  input  logic              bck_fall,  // one-cycle BCK falling edge pulse
  input  logic [ADDR_W-1:0] depth,     // terminal count from depth_decoder
  output logic [ADDR_W-1:0] count,
  output logic              wcnt15,
  output logic              wcnt31,
  output logic              depth_hit
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              count <= '0;
    else if (en && bck_fall) count <= count + 1'b1;
  end

  assign wcnt15    = (count[4:0] == 5'b01111);
  assign wcnt31    = (count[4:0] == 5'b11111);
  assign depth_hit = (count == depth);

endmodule
