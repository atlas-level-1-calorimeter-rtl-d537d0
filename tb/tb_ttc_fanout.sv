// tb_ttc_fanout: self-checking test of the TTC clock and combined-stream fan-out.
//
// For random control words and both clock levels it checks, in the Hub-1 role, that all 15
// destinations carry the TTC-FMC clock and the local combined stream, and in the Hub-2 role
// that the ROD and FPGA carry the clock and stream received from Hub-1 while every node
// output and both outputs towards the other Hub are low.
module tb_ttc_fanout;
  import hub_pkg::*;

  localparam int unsigned N = 12;

  logic is_hub1, fmc_clk, hub_clk_in;
  ctl_word_t local_ctl, hub_ctl_in;
  logic [N-1:0] node_clk;
  ctl_word_t node_ctl [N];
  logic rod_clk, fpga_clk, hub_clk_out;
  ctl_word_t rod_ctl, fpga_ctl, hub_ctl_out;

  int checks = 0, failures = 0;
  int n_hub1 = 0, n_hub2 = 0;

  ttc_fanout #(.N_NODES(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s hub1=%0b", what, is_hub1);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      is_hub1    = (i % 2) == 0;
      fmc_clk    = 1'($urandom);
      hub_clk_in = 1'($urandom);
      local_ctl  = ctl_word_t'($urandom);
      hub_ctl_in = ctl_word_t'($urandom);
      #1;
      if (is_hub1) begin
        n_hub1++;
        check(rod_clk == fmc_clk && fpga_clk == fmc_clk && hub_clk_out == fmc_clk, "hub1 clocks");
        check(rod_ctl == local_ctl && fpga_ctl == local_ctl && hub_ctl_out == local_ctl, "hub1 data");
        for (int n = 0; n < N; n++)
          check(node_clk[n] == fmc_clk && node_ctl[n] == local_ctl, "hub1 node");
      end else begin
        n_hub2++;
        check(rod_clk == hub_clk_in && fpga_clk == hub_clk_in, "hub2 local clocks");
        check(rod_ctl == hub_ctl_in && fpga_ctl == hub_ctl_in, "hub2 local data");
        check(hub_clk_out == 1'b0 && hub_ctl_out == '0, "hub2 hub outputs low");
        for (int n = 0; n < N; n++)
          check(node_clk[n] == 1'b0 && node_ctl[n] == '0, "hub2 node tied low");
      end
      #4;
    end
    check(n_hub1 > 0 && n_hub2 > 0, "both roles exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
