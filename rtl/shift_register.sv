// shift_register: serial-to-parallel converter for the audio data line.
//
// On every clock cycle in which shift_en is high (the one-cycle BCK rising
// edge pulse) the register moves one place towards its MSB and takes sdata
// into bit 0, so after WIDTH shifts the first bit received, the MSB of an I2S
// word, sits in bit WIDTH-1. The register runs freely; the write sequencer
// decides when its contents are complete. This follows the original design.
//
// sdata is sampled in the cycle of the pulse, i.e. two SYSCLK cycles after the
// BCK rising edge itself; it must still be stable then (I2S data changes on
// the falling edge). Reset is asynchronous, active low, and clears q.
module shift_register #(
  parameter int unsigned WIDTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             shift_en,
  input  logic             sdata,
  output logic [WIDTH-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {q[WIDTH-2:0], sdata};
  end

endmodule
