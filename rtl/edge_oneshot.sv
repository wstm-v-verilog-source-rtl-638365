// edge_oneshot: brings an asynchronous, slowly toggling input (the serial
// audio LRCK or BCK) into the system clock domain and makes one-cycle pulses
// on its edges.
//
// Two flip-flops in series sample the input on SYSCLK; the first is the
// synchroniser, the second holds the previous sample. A rising pulse is
// "first high, second low", a falling pulse the reverse. This is the
// structure of the original design; sharing one module for LRCK and BCK is
// this implementation's choice.
//
// Timing: a pulse is high for exactly one clock cycle, in the second cycle
// after the edge is sampled (two cycles of latency). The input must stay at
// each level for at least two SYSCLK cycles for every edge to be seen.
// Reset is asynchronous, active low, and clears both flops.
module edge_oneshot (
  input  logic clk,
  input  logic rst_n,
  input  logic din,    // asynchronous input
  output logic rise,   // one-cycle pulse on a 0->1 edge
  output logic fall    // one-cycle pulse on a 1->0 edge
);

  logic s1, s2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1 <= 1'b0;
      s2 <= 1'b0;
    end else begin
      s1 <= din;
      s2 <= s1;
    end
  end

  assign rise  = s1 & ~s2;
  assign fall  = ~s1 & s2;

endmodule
