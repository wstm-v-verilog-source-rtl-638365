// tb_edge_oneshot: self-checking test of the two-flop edge detector.
// The input is toggled at random, staying at each level for two to six clock
// cycles, and in the middle of clock periods so it is never sampled on its
// edge. A reference keeps the last two sampled input values and predicts the
// one-cycle rise and fall pulses; every cycle is compared.
module tb_edge_oneshot;
  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0;
  logic rise, fall;
  int checks = 0, failures = 0, n_rise = 0, n_fall = 0;
  logic h1 = 1'b0, h2 = 1'b0;  // reference history

  edge_oneshot dut (.clk(clk), .rst_n(rst_n), .din(din), .rise(rise), .fall(fall));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    repeat (2000) begin
      repeat (2 + $urandom_range(4)) @(posedge clk);
      #3 din = ~din;
    end
    repeat (4) @(posedge clk);
    if (n_rise < 100 || n_fall < 100) failures++;
    $display("rises=%0d falls=%0d", n_rise, n_fall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    h2 <= h1;
    h1 <= din;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (rise !== (h1 && !h2) || fall !== (!h1 && h2)) begin
      failures++;
      $display("mismatch at %0t: rise=%b fall=%b h1=%b h2=%b", $time, rise, fall, h1, h2);
    end
    if (rise) n_rise++;
    if (fall) n_fall++;
  end
endmodule
