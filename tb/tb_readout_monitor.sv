// tb_readout_monitor: self-checking test of the 74-channel readout receiver monitor.
//
// Random words with random valid bits and polarity settings are sent on all 74 channels. The
// testbench keeps its own word counts and checks, every clock, the corrected word and valid
// bit one clock later. It takes snapshots while traffic is flowing and reads every channel's
// shadow through sel, expecting the count at the snapshot clock even though the live counters
// keep moving; it also checks clear, an out-of-range select, and a snapshot and clear together.
`timescale 1ns/1ps
module tb_readout_monitor;
  localparam int unsigned N = 74;
  localparam int unsigned W = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0] rx_valid = '0;
  logic [W-1:0] rx_data [N];
  logic [N-1:0] pol_inv = '0;
  logic snap = 1'b0, clr = 1'b0;
  logic [$clog2(N)-1:0] sel = '0;
  logic [N-1:0] mon_valid;
  logic [W-1:0] mon_data [N];
  logic [31:0] sel_count;

  int checks = 0, failures = 0;
  int unsigned ref_cnt [N];
  int unsigned snap_cnt [N];
  logic [N-1:0] exp_valid;
  logic [W-1:0] exp_data [N];

  readout_monitor #(.N_CH(N), .W(W), .CNT_W(32)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // drive at negedge, model the edge, check at the next negedge
  task automatic cycle(input bit traffic, input bit do_snap, input bit do_clr);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      check(mon_valid[i] == exp_valid[i], "valid");
      check(mon_data[i] == exp_data[i], "data");
    end
    for (int i = 0; i < N; i++) begin
      rx_valid[i] = traffic && ($urandom % 2);
      rx_data[i]  = $urandom;
    end
    snap = do_snap;
    clr  = do_clr;
    // model of the coming edge
    for (int i = 0; i < N; i++) begin
      exp_valid[i] = rx_valid[i];
      exp_data[i]  = rx_valid[i] ? (pol_inv[i] ? ~rx_data[i] : rx_data[i]) : '0;
      if (do_clr) begin
        ref_cnt[i] = 0; snap_cnt[i] = 0;
      end else begin
        if (do_snap) snap_cnt[i] = ref_cnt[i];
        if (rx_valid[i]) ref_cnt[i]++;
      end
    end
  endtask

  task automatic read_all_shadows();
    for (int i = 0; i < N; i++) begin
      sel = ($clog2(N))'(i);
      #0.05;                         // all 74 reads fit inside the low half of the clock
      check(sel_count == snap_cnt[i], "snapshot value");
    end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      rx_data[i] = '0; ref_cnt[i] = 0; snap_cnt[i] = 0; exp_data[i] = '0;
    end
    exp_valid = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) pol_inv[i] = 1'($urandom);
    for (int r = 0; r < 200; r++) cycle(1, 0, 0);
    cycle(1, 1, 0);                  // snapshot with traffic in the same clock
    for (int r = 0; r < 20; r++) begin
      cycle(1, 0, 0);
      read_all_shadows();            // live counters move, shadows must not
    end
    cycle(0, 0, 0);                  // idle clock so the change below meets no traffic
    pol_inv = ~pol_inv;
    for (int r = 0; r < 100; r++) cycle(1, 0, 0);
    cycle(0, 1, 0);
    cycle(0, 0, 0);
    read_all_shadows();
    sel = 7'd100;                    // out of range
    #0.05; check(sel_count == 0, "out-of-range select");
    cycle(1, 1, 1);                  // clear wins over snapshot
    cycle(0, 0, 0);
    read_all_shadows();
    for (int r = 0; r < 50; r++) cycle(1, 0, 0);
    cycle(0, 1, 0);
    cycle(0, 0, 0);
    read_all_shadows();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
