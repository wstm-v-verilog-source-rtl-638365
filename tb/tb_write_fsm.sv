// tb_write_fsm: drives the write state machine with random edge pulses and
// counter flags and compares, every cycle, its state number (code bits 9:6)
// and its six output bits with a reference model that follows the state
// table: s0 -LRCK rise-> s1 -BCK fall-> s2 -BCK rise-> s3, s3 -bit 15-> s4
// -BCK fall-> s5 -> s6 -> s7 -> s3, s3 -bit 31-> s8 -BCK fall-> s9 -> s10 ->
// s11 -> s3. Every state must be visited, and the write pulses must be two
// cycles long.
module tb_write_fsm;
  import wstm_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic lrck_rise = 1'b0, bck_rise = 1'b0, bck_fall = 1'b0, wcnt15 = 1'b0, wcnt31 = 1'b0;
  wstate_e  state;
  wstrobe_t strobes;
  int checks = 0, failures = 0;
  int ref_st = 0;
  int visits [12];
  int we_len = 0;

  // expected {XBUFOE, XWCE, XWE, XBHE, WCNTE, RSTART} for each state
  localparam logic [5:0] OUTS [12] = '{
    6'b111100, 6'b111100, 6'b111100, 6'b111110,
    6'b011110, 6'b000010, 6'b000010, 6'b111110,
    6'b011110, 6'b000010, 6'b000010, 6'b111111 };

  write_fsm dut (.clk(clk), .rst_n(rst_n), .lrck_rise(lrck_rise), .bck_rise(bck_rise),
                 .bck_fall(bck_fall), .wcnt15(wcnt15), .wcnt31(wcnt31),
                 .state(state), .strobes(strobes));

  always #5 clk = ~clk;

  initial begin
    foreach (visits[i]) visits[i] = 0;
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int next_ref(int s, logic lr, logic br, logic bf, logic f15, logic f31);
    case (s)
      0:  return (!f31 && !f15 && lr) ? 1 : 0;
      1:  return (!f31 && !f15 && bf && !br) ? 2 : 1;
      2:  return (!f31 && !f15 && br && !bf) ? 3 : 2;
      3:  return (f15 && !f31) ? 4 : (f31 && !f15) ? 8 : 3;
      4:  return (!f31 && bf && !br) ? 5 : 4;
      8:  return (bf && !br) ? 9 : 8;
      7, 11: return 3;
      default: return s + 1;
    endcase
  endfunction

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) ref_st <= 0;
    else        ref_st <= next_ref(ref_st, lrck_rise, bck_rise, bck_fall, wcnt15, wcnt31);
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if (int'(state[9:6]) != ref_st || strobes !== wstrobe_t'(OUTS[ref_st])) begin
      failures++;
      $display("%0t: state=%b expected s%0d outs=%b", $time, state, ref_st, OUTS[ref_st]);
    end
    visits[ref_st]++;
    if (!strobes.xwe) we_len++;
    else if (we_len != 0) begin
      checks++;
      if (we_len != 2) begin
        failures++;
        $display("write pulse %0d cycles", we_len);
      end
      we_len = 0;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 50000; i++) begin
      int r;
      @(negedge clk);
      #1;
      r = $urandom_range(5);
      bck_rise  = (r == 0);
      bck_fall  = (r == 1);
      lrck_rise = ($urandom_range(20) == 0);
      r = $urandom_range(9);
      wcnt15 = (r == 0) || (r == 2);
      wcnt31 = (r == 1) || (r == 2);
      if ((i % 5000) == 4999) begin
        rst_n = 1'b0;
        @(negedge clk);
        #1 rst_n = 1'b1;
      end
    end
    @(negedge clk);
    foreach (visits[i]) begin
      checks++;
      if (visits[i] == 0) begin
        failures++;
        $display("state s%0d never visited", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
