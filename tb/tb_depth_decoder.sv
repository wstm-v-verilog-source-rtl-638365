// tb_depth_decoder: checks all four DEPTH_SEL codes against the rule that
// code k selects a depth of 4*(k+1) one-bits, i.e. (1 << 4*(k+1)) - 1.
module tb_depth_decoder;
  logic [1:0]  sel;
  logic [15:0] depth;
  int checks = 0, failures = 0;

  depth_decoder dut (.depth_sel(sel), .depth(depth));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 4; k++) begin
      logic [16:0] exp17;
      sel = 2'(k);
      #1;
      exp17 = (17'd1 << (4 * (k + 1))) - 17'd1;
      checks++;
      if (depth !== exp17[15:0]) begin
        failures++;
        $display("sel=%0d depth=%h expected %h", k, depth, exp17[15:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
