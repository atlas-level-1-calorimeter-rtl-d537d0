// tb_ctl_stream_rx: self-checking test of the combined-stream decoder.
//
// Random control words (TTC field valid 3 times in 4, back data from ROD-1 or ROD-2 about
// once in 3) are fed in. A reference model counts the same words. Snapshots are taken at
// random clocks and compared with the model's counts up to the clock before. The test also
// checks that the last TTC word and the seen flag follow one clock after the input, that
// the shadows hold between snapshots, and that a clear zeroes everything and beats a
// snapshot in the same clock.
module tb_ctl_stream_rx;
  import hub_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  ctl_word_t ctl_in = '0;
  logic snap = 1'b0, clr = 1'b0;
  logic [TTC_W-1:0] last_ttc;
  logic ttc_seen;
  logic [31:0] cnt_ttc, cnt_back1, cnt_back2;

  int checks = 0, failures = 0;
  int unsigned m_ttc = 0, m_b1 = 0, m_b2 = 0;            // model running counts
  int unsigned s_ttc = 0, s_b1 = 0, s_b2 = 0;            // model shadows
  logic [TTC_W-1:0] m_last = '0;
  bit m_seen = 1'b0;
  int n_snap = 0, n_clr = 0, n_ttc = 0, n_b1 = 0, n_b2 = 0;   // stimulus totals

  ctl_stream_rx #(.CNT_W(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t ttc=%0d/%0d b1=%0d/%0d b2=%0d/%0d", what, $time,
                                  cnt_ttc, s_ttc, cnt_back1, s_b1, cnt_back2, s_b2);
    end
  endtask

  // model, updated on the same edge as the block
  always @(posedge clk) begin
    if (rst_n) begin
      if (clr) begin
        m_ttc = 0; m_b1 = 0; m_b2 = 0; s_ttc = 0; s_b1 = 0; s_b2 = 0; m_last = '0; m_seen = 0;
      end else begin
        if (snap) begin s_ttc = m_ttc; s_b1 = m_b1; s_b2 = m_b2; end
        if (ctl_in.ttc_valid) begin m_ttc++; m_last = ctl_in.ttc; m_seen = 1; end
        if (ctl_in.back_valid && ctl_in.back_src == BACK_ROD1) m_b1++;
        if (ctl_in.back_valid && ctl_in.back_src == BACK_ROD2) m_b2++;
      end
    end
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(cnt_ttc == 0 && cnt_back1 == 0 && cnt_back2 == 0 && !ttc_seen && last_ttc == 0, "reset");
    rst_n = 1;
    @(negedge clk);
    check(!ttc_seen, "nothing seen yet");
    for (int k = 0; k < 20000; k++) begin
      ctl_in.ttc_valid  = ($urandom % 4) != 0;
      ctl_in.ttc        = TTC_W'($urandom);
      ctl_in.back_valid = ($urandom % 3) == 0;
      ctl_in.back_src   = back_src_e'($urandom % 2);
      ctl_in.back       = BACK_W'($urandom);
      snap = ($urandom % 50) == 0;
      clr  = ($urandom % 2000) == 0;
      if (k == 10000) begin snap = 1; clr = 1; end    // clear beats snapshot
      if (snap) n_snap++;
      if (ctl_in.ttc_valid) n_ttc++;
      if (ctl_in.back_valid) begin if (ctl_in.back_src == BACK_ROD1) n_b1++; else n_b2++; end
      if (clr) n_clr++;
      @(negedge clk);
      check(cnt_ttc == s_ttc && cnt_back1 == s_b1 && cnt_back2 == s_b2, "shadow counts");
      check(last_ttc == m_last && ttc_seen == m_seen, "last TTC word");
      if (k == 10000) check(cnt_ttc == 0 && cnt_back1 == 0 && cnt_back2 == 0 && !ttc_seen, "clear beats snapshot");
    end
    // a final snapshot on a quiet input gives the full counts
    ctl_in = '0; snap = 1; clr = 0;
    @(negedge clk);
    snap = 0;
    check(cnt_ttc == m_ttc && cnt_back1 == m_b1 && cnt_back2 == m_b2, "final snapshot");
    check(n_ttc > 1000 && n_b1 > 100 && n_b2 > 100, "enough traffic");
    check(n_snap > 100 && n_clr > 1, "snapshots and clears exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
