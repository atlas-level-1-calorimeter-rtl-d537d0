// tb_fex_hub: end-to-end test of a shelf with two FEX-Hubs, both at default parameters.
//
// Hub A sits in logical slot 1 (Hub-1, with the TTC-FMC) and Hub B in slot 2 (Hub-2). They
// are cross-connected as on the backplane: clock and control pairs, and the two readout
// streams of each Hub FPGA to the other Hub's ROD. A small model of each ROD answers the power
// control lines after a few clocks. Random TTC words, ROD back data on both Hubs and random
// readout traffic from 12 FEX modules are driven, and the testbench checks:
//   - geographic address and Hub-1 / Hub-2 decode, via ports and registers;
//   - every TTC word on all 12 node outputs of Hub-1 one clock later, and the same combined
//     stream relayed to Hub-2's ROD and FPGA, with Hub-2's node outputs tied low;
//   - ROD-1 back data and ROD-2 back data (sent by Hub-2 to Hub-1) on the combined stream,
//     in order and with the right source; contention and overflow under a burst, and the
//     overflow flags read and cleared through the registers;
//   - the 2-way readout fan-out into both RODs, the Hub FPGA streams across Hubs, polarity
//     correction on the monitor outputs and snapshot counts read through the registers;
//   - the ROD power-up sequence, a rail glitch dropping the power status, the ROD sequencer
//     fault it causes, and recovery;
//   - the combined stream decoded in both Hub FPGAs (last TTC word, TTC and back-word counts
//     read through the registers), equal on Hub-2 to what Hub-1 sent;
//   - bus error on an unmapped address.
// Each of these mechanisms is counted and a mechanism never seen is a failure.
`timescale 1ns/1ps
module tb_fex_hub;
  import hub_pkg::*;

  localparam int unsigned NN  = 12;
  localparam int unsigned NF  = 72;
  localparam int unsigned NI  = 74;
  localparam int unsigned NRD = 76;
  localparam int unsigned W   = 32;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // ------------------------------------------------------------------ per-hub signals
  logic [7:0]            ha [2];
  logic [7:0]            ga [2];
  logic                  ga_valid [2], is_hub1 [2];
  logic [REG_ADDR_W-1:0] bus_addr [2];
  logic [31:0]           bus_wdata [2], bus_rdata [2];
  logic                  bus_we [2], bus_re [2], bus_ack [2], bus_err [2];
  logic                  fmc_clk [2], fmc_ttc_valid [2];
  logic [TTC_W-1:0]      fmc_ttc_data [2];
  logic                  rod_back_valid [2];
  logic [BACK_W-1:0]     rod_back_data [2];
  logic                  rod_clk [2], fpga_clk [2], hub_clk_out [2];
  ctl_word_t             rod_ctl [2], fpga_ctl [2], hub_ctl_out [2];
  logic [NN-1:0]         node_clk [2];
  ctl_word_t             node_ctl_a [NN], node_ctl_b [NN];
  logic [NF-1:0]         fex_ro_valid [2];
  logic [W-1:0]          fex_ro_data_a [NF], fex_ro_data_b [NF];
  logic [1:0]            own_ro_valid [2], hub_ro_out_valid [2];
  logic [W-1:0]          own_ro_data_a [2], own_ro_data_b [2];
  logic [W-1:0]          hub_ro_out_data_a [2], hub_ro_out_data_b [2];
  logic [NRD-1:0]        rod_ro_valid [2];
  logic [W-1:0]          rod_ro_data_a [NRD], rod_ro_data_b [NRD];
  logic [NI-1:0]         mon_valid [2];
  logic [W-1:0]          mon_data_a [NI], mon_data_b [NI];
  logic [N_RAILS-1:0]    rail_ok [2];
  logic                  power_good [2];
  logic [1:0]            rod_pwr_ctrl [2], rod_pwr_stat [2];

  fex_hub u_a (
    .clk, .rst_n, .ha(ha[0]), .ga(ga[0]), .ga_valid(ga_valid[0]), .is_hub1(is_hub1[0]),
    .bus_addr(bus_addr[0]), .bus_wdata(bus_wdata[0]), .bus_we(bus_we[0]), .bus_re(bus_re[0]),
    .bus_rdata(bus_rdata[0]), .bus_ack(bus_ack[0]), .bus_err(bus_err[0]),
    .fmc_clk(fmc_clk[0]), .fmc_ttc_valid(fmc_ttc_valid[0]), .fmc_ttc_data(fmc_ttc_data[0]),
    .rod_back_valid(rod_back_valid[0]), .rod_back_data(rod_back_data[0]),
    .rod_clk(rod_clk[0]), .rod_ctl(rod_ctl[0]), .fpga_clk(fpga_clk[0]), .fpga_ctl(fpga_ctl[0]),
    .hub_clk_in(hub_clk_out[1]), .hub_ctl_in(hub_ctl_out[1]),
    .hub_clk_out(hub_clk_out[0]), .hub_ctl_out(hub_ctl_out[0]),
    .node_clk(node_clk[0]), .node_ctl(node_ctl_a),
    .fex_ro_valid(fex_ro_valid[0]), .fex_ro_data(fex_ro_data_a),
    .hub_ro_in_valid(hub_ro_out_valid[1]), .hub_ro_in_data(hub_ro_out_data_b),
    .own_ro_valid(own_ro_valid[0]), .own_ro_data(own_ro_data_a),
    .rod_ro_valid(rod_ro_valid[0]), .rod_ro_data(rod_ro_data_a),
    .hub_ro_out_valid(hub_ro_out_valid[0]), .hub_ro_out_data(hub_ro_out_data_a),
    .mon_valid(mon_valid[0]), .mon_data(mon_data_a),
    .rail_ok(rail_ok[0]), .power_good(power_good[0]),
    .rod_pwr_ctrl(rod_pwr_ctrl[0]), .rod_pwr_stat(rod_pwr_stat[0])
  );

  fex_hub u_b (
    .clk, .rst_n, .ha(ha[1]), .ga(ga[1]), .ga_valid(ga_valid[1]), .is_hub1(is_hub1[1]),
    .bus_addr(bus_addr[1]), .bus_wdata(bus_wdata[1]), .bus_we(bus_we[1]), .bus_re(bus_re[1]),
    .bus_rdata(bus_rdata[1]), .bus_ack(bus_ack[1]), .bus_err(bus_err[1]),
    .fmc_clk(fmc_clk[1]), .fmc_ttc_valid(fmc_ttc_valid[1]), .fmc_ttc_data(fmc_ttc_data[1]),
    .rod_back_valid(rod_back_valid[1]), .rod_back_data(rod_back_data[1]),
    .rod_clk(rod_clk[1]), .rod_ctl(rod_ctl[1]), .fpga_clk(fpga_clk[1]), .fpga_ctl(fpga_ctl[1]),
    .hub_clk_in(hub_clk_out[0]), .hub_ctl_in(hub_ctl_out[0]),
    .hub_clk_out(hub_clk_out[1]), .hub_ctl_out(hub_ctl_out[1]),
    .node_clk(node_clk[1]), .node_ctl(node_ctl_b),
    .fex_ro_valid(fex_ro_valid[1]), .fex_ro_data(fex_ro_data_b),
    .hub_ro_in_valid(hub_ro_out_valid[0]), .hub_ro_in_data(hub_ro_out_data_a),
    .own_ro_valid(own_ro_valid[1]), .own_ro_data(own_ro_data_b),
    .rod_ro_valid(rod_ro_valid[1]), .rod_ro_data(rod_ro_data_b),
    .hub_ro_out_valid(hub_ro_out_valid[1]), .hub_ro_out_data(hub_ro_out_data_b),
    .mon_valid(mon_valid[1]), .mon_data(mon_data_b),
    .rail_ok(rail_ok[1]), .power_good(power_good[1]),
    .rod_pwr_ctrl(rod_pwr_ctrl[1]), .rod_pwr_stat(rod_pwr_stat[1])
  );

  // Hub-1 owns the TTC-FMC; Hub-2 has none
  always_comb begin
    fmc_clk[0] = clk;
    fmc_clk[1] = 1'b0;
  end

  // ------------------------------------------------------------------ ROD power model
  // Each status bit follows its control bit three clocks later.
  logic [1:0] rod_d1 [2], rod_d2 [2];
  always @(posedge clk) begin
    for (int h = 0; h < 2; h++) begin
      rod_d1[h] <= rod_pwr_ctrl[h];
      rod_d2[h] <= rod_d1[h];
      rod_pwr_stat[h] <= rod_d2[h];
    end
  end

  // ------------------------------------------------------------------ bookkeeping
  int checks = 0, failures = 0;
  int m_geo = 0, m_ttc_fanout = 0, m_tie_low = 0, m_relay = 0, m_rod1_back = 0, m_rod2_back = 0;
  int m_contention = 0, m_overflow = 0, m_ro_fanout = 0, m_hub_ro = 0, m_polarity = 0;
  int m_snapshot = 0, m_rod_on = 0, m_rail_fault = 0, m_rod_fault = 0, m_bus_err = 0, m_clock = 0;
  int m_rx_decode = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ------------------------------------------------------------------ bus access
  task automatic bus_write(input int h, input int a, input logic [31:0] d);
    @(negedge clk);
    bus_addr[h] = REG_ADDR_W'(a); bus_wdata[h] = d; bus_we[h] = 1;
    @(negedge clk);
    bus_we[h] = 0;
    check(bus_ack[h], "write ack");
  endtask

  task automatic bus_read(input int h, input int a, output logic [31:0] d);
    @(negedge clk);
    bus_addr[h] = REG_ADDR_W'(a); bus_re[h] = 1;
    @(negedge clk);
    bus_re[h] = 0;
    check(bus_ack[h], "read ack");
    d = bus_rdata[h];
    if (bus_err[h]) m_bus_err++;
  endtask

  // ------------------------------------------------------------------ combined-stream checker
  logic              exp_ttc_v = 1'b0;
  logic [TTC_W-1:0]  exp_ttc = '0;
  logic [BACK_W-1:0] q1[$], q2[$];
  bit                check_back = 1'b0;
  bit                traffic_on = 1'b0;
  bit                last_back_v = 1'b0;
  back_src_e         last_src = BACK_ROD1;

  always @(posedge clk) begin
    if (rst_n) begin
      exp_ttc_v <= fmc_ttc_valid[0];
      exp_ttc   <= fmc_ttc_data[0];
      if (check_back) begin
        if (rod_back_valid[0]) q1.push_back(rod_back_data[0]);
        if (rod_back_valid[1]) q2.push_back(rod_back_data[1]);
      end
    end
  end

  always @(negedge clk) begin
    if (rst_n && traffic_on) begin
      // TTC on every node of Hub-1, one clock after the TTC-FMC word
      for (int n = 0; n < NN; n++) begin
        check(node_ctl_a[n].ttc_valid == exp_ttc_v && (!exp_ttc_v || node_ctl_a[n].ttc == exp_ttc),
              "TTC word on Hub-1 node");
        check(node_ctl_a[n] == rod_ctl[0], "all Hub-1 destinations carry the same word");
        check(node_ctl_b[n] == '0, "Hub-2 node outputs tied low");
      end
      if (exp_ttc_v) m_ttc_fanout++;
      m_tie_low++;
      check(rod_ctl[1] == rod_ctl[0] && fpga_ctl[1] == rod_ctl[0] && fpga_ctl[0] == rod_ctl[0],
            "Hub-2 ROD and FPGA receive Hub-1's stream");
      if (rod_ctl[1].ttc_valid) m_relay++;
      // under a burst from both RODs the slot alternates between them every clock
      if (!check_back && rod_ctl[0].back_valid && last_back_v && rod_ctl[0].back_src != last_src)
        m_contention++;
      last_back_v = rod_ctl[0].back_valid;
      last_src    = rod_ctl[0].back_src;
      if (check_back && rod_ctl[0].back_valid) begin
        if (rod_ctl[0].back_src == BACK_ROD1) begin
          check(q1.size() > 0 && rod_ctl[0].back == q1[0], "ROD-1 back data in order");
          if (q1.size() > 0) void'(q1.pop_front());
          m_rod1_back++;
        end else begin
          check(q2.size() > 0 && rod_ctl[0].back == q2[0], "ROD-2 back data in order");
          if (q2.size() > 0) void'(q2.pop_front());
          m_rod2_back++;
        end
      end
    end
  end

  // words of the combined stream as each Hub FPGA receives it, counted since reset
  int unsigned       rx_ttc [2], rx_back1 [2], rx_back2 [2];
  logic [TTC_W-1:0]  rx_last [2];
  initial for (int h = 0; h < 2; h++) begin rx_ttc[h] = 0; rx_back1[h] = 0; rx_back2[h] = 0; rx_last[h] = '0; end
  always @(posedge clk) begin
    if (rst_n) begin
      for (int h = 0; h < 2; h++) begin
        if (fpga_ctl[h].ttc_valid) begin rx_ttc[h]++; rx_last[h] = fpga_ctl[h].ttc; end
        if (fpga_ctl[h].back_valid && fpga_ctl[h].back_src == BACK_ROD1) rx_back1[h]++;
        if (fpga_ctl[h].back_valid && fpga_ctl[h].back_src == BACK_ROD2) rx_back2[h]++;
      end
    end
  end

  // clocks: sampled away from the edges, once the slot has been decoded
  bit clk_check = 1'b0;
  always @(posedge clk) begin
    #2;
    if (clk_check) begin
      check(node_clk[0] == '1 && rod_clk[0] && fpga_clk[0] && hub_clk_out[0], "Hub-1 clocks high");
      check(node_clk[1] == '0 && hub_clk_out[1] == 1'b0, "Hub-2 backplane clocks low");
      check(rod_clk[1] && fpga_clk[1], "Hub-2 local clocks from Hub-1");
      m_clock++;
    end
  end
  always @(negedge clk) begin
    #2;
    if (clk_check) check(node_clk[0] == '0 && rod_clk[1] == 1'b0, "clocks low");
  end

  // ------------------------------------------------------------------ readout driver/checker
  int unsigned ro_count [NI];
  bit          ro_check = 1'b0;
  logic [NI-1:0] pol_a = '0;

  task automatic drive_readout(input bit on);
    for (int i = 0; i < NF; i++) begin
      fex_ro_valid[0][i] = on && ($urandom % 2);
      fex_ro_valid[1][i] = on && ($urandom % 2);
      fex_ro_data_a[i] = $urandom;
      fex_ro_data_b[i] = $urandom;
    end
    for (int i = 0; i < 2; i++) begin
      own_ro_valid[0][i] = on && ($urandom % 2);
      own_ro_valid[1][i] = on && ($urandom % 2);
      own_ro_data_a[i] = $urandom;
      own_ro_data_b[i] = $urandom;
    end
  endtask

  // Fan-out is combinational: checked in the same clock as driven
  task automatic check_fanout();
    #1;
    for (int i = 0; i < NF; i++) begin
      check(rod_ro_valid[0][i] == fex_ro_valid[0][i] && rod_ro_data_a[i] == fex_ro_data_a[i], "FEX stream to ROD A");
      check(rod_ro_valid[1][i] == fex_ro_valid[1][i] && rod_ro_data_b[i] == fex_ro_data_b[i], "FEX stream to ROD B");
    end
    for (int i = 0; i < 2; i++) begin
      check(rod_ro_data_a[NF+i] == own_ro_data_b[i] && rod_ro_valid[0][NF+i] == own_ro_valid[1][i], "Hub B FPGA stream to ROD A");
      check(rod_ro_data_b[NF+i] == own_ro_data_a[i] && rod_ro_valid[1][NF+i] == own_ro_valid[0][i], "Hub A FPGA stream to ROD B");
      check(rod_ro_data_a[NI+i] == own_ro_data_a[i] && rod_ro_valid[0][NI+i] == own_ro_valid[0][i], "own FPGA stream to ROD A");
    end
    m_ro_fanout++;
    if (|own_ro_valid[1]) m_hub_ro++;
  endtask

  // Monitor outputs of Hub A, one clock after the inputs
  logic [NI-1:0] prev_v = '0;
  logic [W-1:0]  prev_d [NI];
  always @(posedge clk) begin
    if (rst_n && ro_check) begin
      for (int i = 0; i < NI; i++) begin
        prev_v[i] <= rod_ro_valid[0][i];
        prev_d[i] <= rod_ro_data_a[i];
        if (rod_ro_valid[0][i]) ro_count[i]++;
      end
    end
  end
  always @(negedge clk) begin
    if (rst_n && ro_check) begin
      for (int i = 0; i < NI; i++) begin
        check(mon_valid[0][i] == prev_v[i], "monitor valid");
        if (prev_v[i]) begin
          check(mon_data_a[i] == (pol_a[i] ? ~prev_d[i] : prev_d[i]), "monitor polarity");
          if (pol_a[i]) m_polarity++;
        end
      end
    end
  end

  // ------------------------------------------------------------------ watchdog
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ scenario
  initial begin
    logic [31:0] d;
    ha[0] = 8'h01; ha[1] = 8'h02;
    for (int h = 0; h < 2; h++) begin
      bus_addr[h] = '0; bus_wdata[h] = '0; bus_we[h] = 0; bus_re[h] = 0;
      fmc_ttc_valid[h] = 0; fmc_ttc_data[h] = '0;
      rod_back_valid[h] = 0; rod_back_data[h] = '0;
      rail_ok[h] = '1;
      rod_d1[h] = '0; rod_d2[h] = '0; rod_pwr_stat[h] = '0;
    end
    for (int i = 0; i < NI; i++) ro_count[i] = 0;
    drive_readout(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (6) @(negedge clk);

    // ---- identity
    check(is_hub1[0] && !is_hub1[1], "Hub-1 / Hub-2 decode");
    clk_check = 1;
    bus_write(0, R_SHELF, 32'h105);
    bus_write(1, R_SHELF, 32'h105);
    @(negedge clk);
    check(ga[0] == 8'h51 && ga[1] == 8'h52 && ga_valid[0] && ga_valid[1], "geographic address");
    bus_read(0, R_GEO, d);
    check(d[9:0] == {1'b1, 1'b1, 8'h51}, "R_GEO Hub-1");
    bus_read(1, R_GEO, d);
    check(d[9:0] == {1'b0, 1'b1, 8'h52}, "R_GEO Hub-2");
    m_geo++;

    // ---- ROD power-up on both Hubs, merge enabled on Hub-1
    bus_write(0, R_CTRL, 32'h7);
    bus_write(1, R_CTRL, 32'h1);
    repeat (12) @(negedge clk);
    bus_read(0, R_POWER, d);
    check(d[0] && d[7:5] == 3'd3 && d[4:3] == 2'b11 && d[2:1] == 2'b11, "ROD on Hub-1 powered");
    bus_read(1, R_POWER, d);
    check(d[7:5] == 3'd3, "ROD on Hub-2 powered");
    if (d[7:5] == 3'd3) m_rod_on++;

    // ---- TTC and back data at a low rate: everything checked word by word
    traffic_on = 1;
    check_back = 1;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      fmc_ttc_valid[0]  = ($urandom % 4) != 0;
      fmc_ttc_data[0]   = TTC_W'($urandom);
      rod_back_valid[0] = ($urandom % 5) == 0;
      rod_back_data[0]  = BACK_W'($urandom);
      rod_back_valid[1] = ($urandom % 5) == 0;
      rod_back_data[1]  = BACK_W'($urandom);
    end
    @(negedge clk);
    rod_back_valid[0] = 0; rod_back_valid[1] = 0;
    repeat (10) @(negedge clk);
    check(q1.size() == 0 && q2.size() == 0, "all back data delivered");
    bus_read(0, R_MERGE, d);
    check(d[1:0] == 2'b00, "no overflow at low rate");

    // ---- burst: both RODs every clock, FIFOs overflow
    check_back = 0;
    for (int k = 0; k < 20; k++) begin
      @(negedge clk);
      rod_back_valid[0] = 1; rod_back_data[0] = BACK_W'($urandom);
      rod_back_valid[1] = 1; rod_back_data[1] = BACK_W'($urandom);
    end
    @(negedge clk);
    rod_back_valid[0] = 0; rod_back_valid[1] = 0;
    repeat (20) @(negedge clk);
    bus_read(0, R_MERGE, d);
    check(d[1:0] == 2'b11, "overflow flags set after burst");
    if (d[1:0] == 2'b11) m_overflow++;
    bus_write(0, R_PULSE, 32'h8);
    bus_read(0, R_MERGE, d);
    check(d[1:0] == 2'b00, "overflow flags cleared");
    bus_read(0, R_PULSE, d);
    check(d == 0, "pulse register reads zero");
    fmc_ttc_valid[0] = 0;

    // ---- the combined stream as decoded in each Hub FPGA (Hub-2's copy came through Hub-1)
    repeat (3) @(negedge clk);
    bus_write(0, R_PULSE, 32'h2);
    bus_write(1, R_PULSE, 32'h2);
    for (int h = 0; h < 2; h++) begin
      automatic bit ok = 1'b1;
      bus_read(h, R_RX_TTC, d);
      ok &= d[8:0] == {1'b1, rx_last[h]};
      bus_read(h, R_RX_NTTC, d);
      ok &= d == rx_ttc[h] && d > 1000;
      bus_read(h, R_RX_NBACK1, d);
      ok &= d == rx_back1[h] && d > 0;
      bus_read(h, R_RX_NBACK2, d);
      ok &= d == rx_back2[h] && d > 0;
      check(ok, "received-stream decode");
      if (ok) m_rx_decode++;
    end
    check(rx_ttc[0] == rx_ttc[1] && rx_back2[0] == rx_back2[1], "Hub-2 decodes the same stream as Hub-1");

    // ---- readout: fan-out, polarity, counters
    for (int i = 0; i < NI; i++) pol_a[i] = 1'($urandom);
    bus_write(0, R_POL0, pol_a[31:0]);
    bus_write(0, R_POL1, pol_a[63:32]);
    bus_write(0, R_POL2, 32'(pol_a[73:64]));
    bus_write(0, R_PULSE, 32'h4);               // clear counters
    @(negedge clk);
    ro_check = 1;
    for (int k = 0; k < 300; k++) begin
      @(negedge clk);
      drive_readout(1);
      check_fanout();
    end
    @(negedge clk);
    drive_readout(0);
    @(negedge clk);
    ro_check = 0;
    bus_write(0, R_PULSE, 32'h2);               // snapshot
    for (int c = 0; c < NI; c += 9) begin
      bus_write(0, R_MON_SEL, c);
      bus_read(0, R_MON_COUNT, d);
      check(d == ro_count[c], "snapshot count");
      if (d == ro_count[c] && d != 0) m_snapshot++;
    end
    bus_write(0, R_MON_SEL, NI - 1);
    bus_read(0, R_MON_COUNT, d);
    check(d == ro_count[NI-1], "snapshot count, last channel");

    // ---- rail glitch on Hub-1: power status drops, ROD sequencer faults
    @(negedge clk);
    rail_ok[0][3] = 0;
    @(negedge clk);
    rail_ok[0][3] = 1;
    repeat (4) @(negedge clk);
    check(rod_pwr_ctrl[0] == 2'b00, "ROD switched off after power glitch");
    bus_read(0, R_RAILFAULT, d);
    check(d == 32'h8, "rail 3 fault recorded");
    if (d == 32'h8) m_rail_fault++;
    bus_read(0, R_POWER, d);
    check(d[0] && d[7:5] == 3'd4, "power good again, ROD sequencer in fault");
    if (d[7:5] == 3'd4) m_rod_fault++;
    bus_write(0, R_PULSE, 32'h1);
    bus_read(0, R_RAILFAULT, d);
    check(d == 0, "rail fault cleared");
    bus_write(0, R_CTRL, 32'h6);                // enable off, then on again
    bus_write(0, R_CTRL, 32'h7);
    repeat (12) @(negedge clk);
    bus_read(0, R_POWER, d);
    check(d[7:5] == 3'd3, "ROD powered again");

    // ---- unmapped address
    bus_read(0, 29, d);
    check(bus_err[0] && d == 0, "unmapped address");

    traffic_on = 0;
    repeat (4) @(negedge clk);

    check(m_geo > 0, "mechanism: geographic address");
    check(m_ttc_fanout > 0, "mechanism: TTC fan-out");
    check(m_tie_low > 0, "mechanism: Hub-2 tie-low");
    check(m_relay > 0, "mechanism: Hub-1 to Hub-2 relay");
    check(m_rod1_back > 0, "mechanism: ROD-1 back data");
    check(m_rod2_back > 0, "mechanism: ROD-2 back data");
    check(m_contention > 0, "mechanism: contention");
    check(m_overflow > 0, "mechanism: overflow");
    check(m_ro_fanout > 0, "mechanism: readout fan-out");
    check(m_hub_ro > 0, "mechanism: Hub FPGA streams across Hubs");
    check(m_polarity > 0, "mechanism: polarity correction");
    check(m_snapshot > 0, "mechanism: counter snapshot");
    check(m_rod_on > 0, "mechanism: ROD power-up");
    check(m_rail_fault > 0, "mechanism: rail fault");
    check(m_rod_fault > 0, "mechanism: ROD power fault");
    check(m_bus_err > 0, "mechanism: bus error");
    check(m_clock > 0, "mechanism: clock fan-out");
    check(m_rx_decode == 2, "mechanism: received-stream decode on both Hubs");
    $display("mechanisms: geo=%0d ttc=%0d tie_low=%0d relay=%0d rod1=%0d rod2=%0d contention=%0d overflow=%0d",
             m_geo, m_ttc_fanout, m_tie_low, m_relay, m_rod1_back, m_rod2_back, m_contention, m_overflow);
    $display("mechanisms: ro_fanout=%0d hub_ro=%0d polarity=%0d snapshot=%0d rod_on=%0d rail_fault=%0d rod_fault=%0d bus_err=%0d",
             m_ro_fanout, m_hub_ro, m_polarity, m_snapshot, m_rod_on, m_rail_fault, m_rod_fault, m_bus_err);
    $display("mechanisms: clock=%0d rx_decode=%0d", m_clock, m_rx_decode);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
