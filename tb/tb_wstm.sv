// tb_wstm: end-to-end test of the serial-audio write sequencer at its full
// size (no parameters overridden).
//
// An I2S source produces 16-bit words, 32 bit clocks per frame, with LRCK
// changing one bit clock before each MSB and data changing on BCK falling
// edges. BCK runs asynchronously to SYSCLK (half period 47 ns against a 10 ns
// clock). Each word's value is drawn at random and remembered. For each of
// the four DEPTH_SEL settings the design is reset in the middle of a word,
// then, after it locks to the next LRCK rising edge, every write cycle is
// checked: strobe levels, a two-cycle XWE pulse, data bus enabled, address
// 16*(n+1) for the n-th word, data equal to the n-th word sent, and one
// write per 16 bit clocks. RSTART must rise exactly when the bit count
// equals the selected depth: after (depth+1)/16 - 1 writes, with WADDRS equal
// to the depth. With the largest depth the run continues past the 16-bit
// address wrap. Finally the SRAM model's contents are read back and compared.
// Each mechanism (lock, left write, right write, RSTART for each depth,
// address wrap) is counted and must have happened.
module tb_wstm;
  localparam int HALF_BCK = 47;

  logic        XRESET = 1'b0, SYSCLK = 1'b0, SDATA = 1'b0, LRCK = 1'b0, BCK = 1'b1;
  logic [1:0]  DEPTH_SEL = 2'd0;
  logic        XBUFOE, XWCE, XWE, XWBHE, RSTART;
  logic [15:0] WADDRS, WDATA;
  logic [15:0] rd_addr = '0, rd_data;
  int unsigned sram_writes;

  int checks = 0, failures = 0;
  int n_lock = 0, n_left = 0, n_right = 0, n_wrap = 0;
  int n_rstart [4];

  wstm dut (.XRESET(XRESET), .SYSCLK(SYSCLK), .SDATA(SDATA), .LRCK(LRCK), .BCK(BCK),
            .DEPTH_SEL(DEPTH_SEL), .XBUFOE(XBUFOE), .XWCE(XWCE), .XWE(XWE),
            .XWBHE(XWBHE), .RSTART(RSTART), .WADDRS(WADDRS), .WDATA(WDATA));

  async_sram_model #(.AW(16), .DW(16)) u_sram (
    .addr(WADDRS), .wdata(WDATA), .xce(XWCE), .xwe(XWE), .xbhe(XWBHE),
    .rd_addr(rd_addr), .rd_data(rd_data), .n_writes(sram_writes));

  always #5 SYSCLK = ~SYSCLK;

  task automatic fail(string msg);
    failures++;
    $display("%0t: FAIL %s", $time, msg);
  endtask

  initial begin
    repeat (3_000_000) @(posedge SYSCLK);
    fail("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- I2S source
  logic [15:0] words [$];   // every word sent, index = global word number
  int          gw = 0;      // word being sent
  int          gbit = 0;    // bit of that word being sent (0 = MSB)

  initial begin
    words.push_back(16'($urandom));
    forever begin
      // falling edge: present bit, LRCK announces the next word's channel
      #HALF_BCK;
      BCK   = 1'b0;
      SDATA = words[gw][15 - gbit];
      LRCK  = (gbit == 15) ? ((gw + 1) % 2 == 0) : (gw % 2 == 0);
      #HALF_BCK;
      BCK = 1'b1;
      if (gbit == 15) begin
        gbit = 0;
        gw++;
        words.push_back(16'($urandom));
      end else begin
        gbit++;
      end
    end
  end

  // ------------------------------------------------------------ write monitor
  int          base;           // global number of the first word expected
  int          nw;             // writes seen since reset
  longint      last_write_cyc;
  longint      cyc = 0;
  int          we_len = 0;
  logic        xwe_q = 1'b1, rstart_q = 1'b0;
  logic [15:0] depth_now;
  logic        run_active = 1'b0;

  always @(posedge SYSCLK) begin
    cyc++;
    if (run_active) begin
      if (!XWE) begin
        we_len++;
        checks++;
        if (XWCE || XWBHE || XBUFOE) fail("strobes not all active during XWE");
        if (WADDRS !== 16'(16 * (nw + 1)))
          fail($sformatf("write %0d address %h expected %h", nw, WADDRS, 16'(16 * (nw + 1))));
        if (WDATA !== words[base + nw])
          fail($sformatf("write %0d data %h expected %h", nw, WDATA, words[base + nw]));
      end
      if (XWE && !xwe_q) begin  // end of a write pulse
        checks++;
        if (we_len != 2) fail($sformatf("XWE pulse of %0d cycles", we_len));
        if (nw > 0) begin
          checks++;
          // 16 bit clocks = 1504 ns = 150.4 cycles
          if (cyc - last_write_cyc < 149 || cyc - last_write_cyc > 152)
            fail($sformatf("write interval %0d cycles", cyc - last_write_cyc));
        end
        if (nw == 0) n_lock++;
        if (nw % 2 == 0) n_left++; else n_right++;
        if (WADDRS == 16'h0) n_wrap++;
        last_write_cyc = cyc;
        we_len = 0;
        nw++;
      end
      if (!XWCE && XWE && XBUFOE) begin
        checks++;
        fail("chip enable without bus enable");
      end
      if (RSTART && !rstart_q) begin
        checks++;
        if (nw != (int'(depth_now) + 1) / 16 - 1 || WADDRS !== depth_now)
          fail($sformatf("RSTART after %0d writes at count %h, depth %h", nw, WADDRS, depth_now));
        else
          n_rstart[DEPTH_SEL]++;
      end
    end
    xwe_q    <= XWE;
    rstart_q <= RSTART;
  end

  // --------------------------------------------------------------- sequence
  initial begin
    foreach (n_rstart[i]) n_rstart[i] = 0;
    for (int sel = 0; sel < 4; sel++) begin
      int target;
      int first_word;
      XRESET     = 1'b0;
      run_active = 1'b0;
      DEPTH_SEL  = 2'(sel);
      depth_now  = (17'd1 << (4 * (sel + 1))) - 1;
      // release reset at bit 4 of a word sent with LRCK low (odd number)
      do @(posedge BCK); while (!(gw % 2 == 1 && gbit == 4));
      #20;
      base = gw + 1;
      nw = 0;
      we_len = 0;
      xwe_q = 1'b1;
      rstart_q = 1'b0;
      first_word = base;
      XRESET = 1'b1;
      run_active = 1'b1;
      // depth reached after (depth+1)/16 words; with the largest depth go
      // past the address wrap as well
      target = (int'(depth_now) + 1) / 16 + ((sel == 3) ? 4 : 6);
      while (nw < target) @(posedge SYSCLK);
      repeat (20) @(posedge SYSCLK);
      // read back from the SRAM model (skip slots overwritten after a wrap)
      for (int n = 0; n < target; n++) begin
        if (16 * (n + 1) >= 65536) break;
        if (n + 4096 < target) continue;
        rd_addr = 16'(16 * (n + 1));
        #1;
        checks++;
        if (rd_data !== words[first_word + n])
          fail($sformatf("SRAM[%h]=%h expected %h", rd_addr, rd_data, words[first_word + n]));
      end
      $display("DEPTH_SEL=%0d: %0d writes, RSTART seen %0d times", sel, nw, n_rstart[sel]);
    end
    checks++;
    if (sram_writes == 0) fail("SRAM model never written");
    $display("lock=%0d left=%0d right=%0d wrap=%0d", n_lock, n_left, n_right, n_wrap);
    foreach (n_rstart[i]) begin
      checks++;
      if (n_rstart[i] != 1) fail($sformatf("RSTART count %0d for DEPTH_SEL=%0d", n_rstart[i], i));
    end
    checks++;
    if (n_lock != 4 || n_left == 0 || n_right == 0 || n_wrap == 0) fail("a mechanism never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
