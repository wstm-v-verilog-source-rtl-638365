// tb_shift_register: drives random serial bits with random shift enables and
// compares the register every cycle with a model that keeps the last 16
// accepted bits, the oldest as MSB. Also checks that a 16-bit word shifted in
// MSB first appears unchanged.
module tb_shift_register;
  logic clk = 1'b0, rst_n = 1'b0, shift_en = 1'b0, sdata = 1'b0;
  logic [15:0] q;
  logic [15:0] model = '0;
  int checks = 0, failures = 0;

  shift_register #(.WIDTH(16)) dut (.clk(clk), .rst_n(rst_n), .shift_en(shift_en),
                                    .sdata(sdata), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && shift_en) model <= {model[14:0], sdata};

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (q !== model) begin
      failures++;
      $display("q=%h expected %h", q, model);
    end
  end

  initial begin
    logic [15:0] word;
    repeat (2) @(posedge clk);
    checks++;
    if (q !== 16'h0) failures++;   // reset value
    #1 rst_n = 1'b1;
    repeat (3000) begin
      @(negedge clk);
      shift_en = ($urandom_range(2) == 0);
      sdata    = 1'($urandom);
    end
    // one whole word, MSB first
    word = 16'hA5C3;
    for (int i = 15; i >= 0; i--) begin
      @(negedge clk);
      shift_en = 1'b1;
      sdata    = word[i];
    end
    @(negedge clk);
    shift_en = 1'b0;
    checks++;
    if (q !== word) begin
      failures++;
      $display("word q=%h expected %h", q, word);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
