// tb_ttc_ctrl_merge: self-checking test of the TTC + ROD back-data merge.
//
// A reference model built from SystemVerilog queues predicts every output word: the TTC field
// one clock after its input, the back-data slot chosen round robin between two DEPTH-deep
// queues, words dropped when a queue is full, and the sticky overflow flags. Directed phases
// check the latencies (TTC 1 clock, back data 2 clocks), alternation under contention,
// overflow and its clear, and the enables; a random phase then compares every clock.
module tb_ttc_ctrl_merge;
  import hub_pkg::*;

  localparam int unsigned DEPTH = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic ttc_valid = 1'b0;
  logic [TTC_W-1:0] ttc_data = '0;
  logic rod1_valid = 1'b0, rod2_valid = 1'b0;
  logic [BACK_W-1:0] rod1_data = '0, rod2_data = '0;
  logic en_rod1 = 1'b1, en_rod2 = 1'b1, clr_ovf = 1'b0;
  ctl_word_t ctl_out;
  logic [1:0] ovf;
  logic drop, contention;

  int checks = 0, failures = 0;
  int n_contention = 0, n_drop = 0;

  ttc_ctrl_merge #(.FIFO_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  // ------------------------------------------------------------ reference model
  logic [BACK_W-1:0] q1[$], q2[$];
  back_src_e m_last = BACK_ROD2;
  ctl_word_t m_out = '0;
  logic [1:0] m_ovf = '0;

  always @(posedge clk) begin
    if (rst_n) begin
      automatic bit p1 = 0, p2 = 0;
      automatic ctl_word_t w = '0;
      automatic bit push1 = rod1_valid && en_rod1;
      automatic bit push2 = rod2_valid && en_rod2;
      automatic bit full1 = (q1.size() == DEPTH);
      automatic bit full2 = (q2.size() == DEPTH);
      if (q1.size() > 0 && q2.size() > 0) begin
        if (m_last == BACK_ROD1) p2 = 1; else p1 = 1;
      end else if (q1.size() > 0) p1 = 1;
      else if (q2.size() > 0) p2 = 1;
      w.ttc_valid = ttc_valid;
      w.ttc = ttc_valid ? ttc_data : '0;
      if (p1) begin w.back_valid = 1; w.back_src = BACK_ROD1; w.back = q1.pop_front(); m_last = BACK_ROD1; end
      if (p2) begin w.back_valid = 1; w.back_src = BACK_ROD2; w.back = q2.pop_front(); m_last = BACK_ROD2; end
      if (push1 && !full1) q1.push_back(rod1_data);
      if (push2 && !full2) q2.push_back(rod2_data);
      if (clr_ovf) m_ovf = '0;
      else m_ovf = m_ovf | {push2 && full2, push1 && full1};
      m_out = w;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      checks++;
      if (ctl_out !== m_out || ovf !== m_ovf) begin
        failures++;
        if (failures < 10)
          $display("MISMATCH t=%0t out=%h exp=%h ovf=%b exp=%b", $time, ctl_out, m_out, ovf, m_ovf);
      end
      if (contention) n_contention++;
      if (drop) n_drop++;
    end
  end

  task automatic tick(); @(negedge clk); endtask

  task automatic idle();
    ttc_valid = 0; rod1_valid = 0; rod2_valid = 0; clr_ovf = 0;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    tick();

    // TTC latency: exactly one clock
    ttc_valid = 1; ttc_data = 8'hA5;
    tick(); idle();
    checks++; if (!(ctl_out.ttc_valid && ctl_out.ttc == 8'hA5)) begin failures++; $display("TTC latency"); end
    tick();

    // Back-data latency: two clocks from an empty FIFO
    rod1_valid = 1; rod1_data = 16'h1234;
    tick(); idle();
    checks++; if (ctl_out.back_valid) begin failures++; $display("back too early"); end
    tick();
    checks++; if (!(ctl_out.back_valid && ctl_out.back == 16'h1234 && ctl_out.back_src == BACK_ROD1)) begin
      failures++; $display("back latency");
    end
    tick();

    // Contention: both RODs at once, slots alternate
    rod1_valid = 1; rod1_data = 16'h1111; rod2_valid = 1; rod2_data = 16'h2222;
    tick(); idle();
    tick();
    checks++; if (!(ctl_out.back_valid && ctl_out.back_src == BACK_ROD2 && ctl_out.back == 16'h2222)) begin
      failures++; $display("rr first");
    end
    tick();
    checks++; if (!(ctl_out.back_valid && ctl_out.back_src == BACK_ROD1 && ctl_out.back == 16'h1111)) begin
      failures++; $display("rr second");
    end
    repeat (2) tick();

    // Overflow: both RODs bursting fill their FIFOs
    for (int i = 0; i < 16; i++) begin
      rod1_valid = 1; rod1_data = 16'(16'h1000 + i);
      rod2_valid = 1; rod2_data = 16'(16'h2000 + i);
      tick();
    end
    idle();
    checks++; if (ovf != 2'b11) begin failures++; $display("overflow flags %b", ovf); end
    repeat (12) tick();
    clr_ovf = 1; tick(); clr_ovf = 0; tick();
    checks++; if (ovf != 2'b00) begin failures++; $display("overflow clear"); end

    // Enable low: ROD-2 ignored
    en_rod2 = 0;
    rod2_valid = 1; rod2_data = 16'hDEAD;
    tick(); idle(); repeat (3) tick();
    en_rod2 = 1;

    // Random traffic
    for (int i = 0; i < 5000; i++) begin
      ttc_valid  = ($urandom % 4) != 0;
      ttc_data   = TTC_W'($urandom);
      rod1_valid = ($urandom % 3) == 0;
      rod1_data  = BACK_W'($urandom);
      rod2_valid = ($urandom % 3) == 0;
      rod2_data  = BACK_W'($urandom);
      en_rod1    = ($urandom % 50) != 0;
      en_rod2    = ($urandom % 50) != 0;
      clr_ovf    = ($urandom % 100) == 0;
      tick();
    end
    idle();
    repeat (20) tick();

    checks++; if (n_contention == 0) begin failures++; $display("no contention seen"); end
    checks++; if (n_drop == 0) begin failures++; $display("no drop seen"); end
    $display("contention=%0d drops=%0d", n_contention, n_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
