// tb_write_counter: drives random enable and falling-edge pulses and checks
// the count, the bit-15 and bit-31 flags and the depth match each cycle
// against a model. The depth is changed now and then; the counter is run
// long enough to wrap past 0xffff, and the number of flag hits, depth hits
// and wraps is checked to be non-zero.
module tb_write_counter;
  logic        clk = 1'b0, rst_n = 1'b0, en = 1'b0, bck_fall = 1'b0;
  logic [15:0] depth = 16'h000f;
  logic [15:0] count;
  logic        wcnt15, wcnt31, depth_hit;
  int unsigned model = 0;
  int checks = 0, failures = 0, n15 = 0, n31 = 0, nhit = 0, nwrap = 0;

  write_counter dut (.clk(clk), .rst_n(rst_n), .en(en), .bck_fall(bck_fall),
                     .depth(depth), .count(count), .wcnt15(wcnt15),
                     .wcnt31(wcnt31), .depth_hit(depth_hit));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && en && bck_fall) begin
    if (model == 65535) nwrap++;
    model <= (model + 1) % 65536;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (count !== 16'(model) || wcnt15 !== ((model % 32) == 15) ||
        wcnt31 !== ((model % 32) == 31) || depth_hit !== (model == 32'(depth))) begin
      failures++;
      $display("count=%h model=%h f15=%b f31=%b hit=%b", count, model, wcnt15, wcnt31, depth_hit);
    end
    if (wcnt15) n15++;
    if (wcnt31) n31++;
    if (depth_hit) nhit++;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 300000; i++) begin
      @(negedge clk);
      en       = ($urandom_range(3) != 0);
      bck_fall = ($urandom_range(2) != 0);
      if ((i % 50000) == 0) depth = (17'd1 << (4 * (1 + $urandom_range(3)))) - 1;
    end
    @(negedge clk);
    if (n15 == 0 || n31 == 0 || nhit == 0 || nwrap == 0) failures++;
    $display("f15=%0d f31=%0d hits=%0d wraps=%0d", n15, n31, nhit, nwrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
