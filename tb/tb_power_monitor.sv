// tb_power_monitor: self-checking test of the overall power status and sticky rail faults.
//
// Checks that nothing is flagged straight after reset, that power_good rises three clocks
// after all rails are in window, that a one-clock glitch on any rail drops power_good for one
// clock and leaves its fault bit set until cleared, and that a rail still out of window sets
// its bit again after a clear.
module tb_power_monitor;
  localparam int unsigned N = 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [N-1:0] rail_ok = '0;
  logic clr = 1'b0;
  logic power_good;
  logic [N-1:0] fault;

  int checks = 0, failures = 0;

  power_monitor #(.N_RAILS(N)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t pg=%b fault=%h", what, $time, power_good, fault);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rail_ok = '1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 6; k++) begin
      @(negedge clk);
      check(fault == 0, "no fault after reset with rails good");
    end
    check(power_good, "power good");

    for (int r = 0; r < N; r++) begin
      rail_ok[r] = 1'b0;             // one-clock glitch
      @(negedge clk);
      rail_ok[r] = 1'b1;
      @(negedge clk);
      check(power_good && fault == 0, "glitch not seen yet");
      @(negedge clk);
      check(!power_good, "power good drops");
      check(fault == (N'(1) << r), "fault bit set");
      @(negedge clk);
      check(power_good, "power good back");
      repeat (3) @(negedge clk);
      check(fault == (N'(1) << r), "fault sticky");
      clr = 1; @(negedge clk); clr = 0;
      check(fault == 0, "fault cleared");
    end

    // persistent fault re-sets after clear
    rail_ok[5] = 0;
    repeat (4) @(negedge clk);
    clr = 1; @(negedge clk); clr = 0;
    check(fault == 0, "cleared");
    @(negedge clk);
    check(fault == (N'(1) << 5), "re-set while out of window");
    check(!power_good, "still bad");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
