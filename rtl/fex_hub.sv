// fex_hub: digital logic of one FEX-Hub module, the switch module of an L1Calo FEX ATCA shelf.
//
// A shelf holds 12 FEX node modules and two Hubs. Every FEX sends 6 readout streams to each
// Hub; each Hub copies all 72 of them, plus the 2 streams of the other Hub's FPGA, to its ROD
// mezzanine and to its own FPGA, and adds its own FPGA's 2 streams for its ROD (76 in all).
// The Hub in logical slot 1 also owns timing: it takes the LHC clock and TTC data from its
// TTC-FMC, merges the TTC data with the back data of both RODs, and fans the clock and the
// combined stream out to the 12 nodes, its ROD, its FPGA and Hub-2. Both Hubs are the same
// board; which role it plays is decoded from the hardware address pins.
//
// Inside:
//   geo_addr        geographic address for the ROD, Hub-1 / Hub-2 decode
//   ctrl_regs       slow-control registers (Status / Control / Pulse rules), register map in hub_pkg
//   ttc_ctrl_merge  TTC + ROD-1 + ROD-2 back data -> combined control stream (used on Hub-1)
//   ttc_fanout      clock and combined-stream fan-out; node outputs tied low on Hub-2
//   readout_monitor polarity correction and word counting of the 74 streams into the FPGA
//   ctl_stream_rx   decode of the combined stream as this FPGA receives it (last TTC word,
//                   TTC and back-word counts), for checking TTC distribution
//   power_monitor   1-bit overall power status, sticky rail faults
//   rod_power_ctrl  ROD power-up sequence over 2 control / 2 status signals
// The 2-way readout fan-out chips are wires here: each incoming stream drives both the ROD
// port (rod_ro_*) and the monitor.
//
// Hub-to-Hub control pair: on Hub-1 it carries the combined stream to Hub-2; on Hub-2 the same
// pair carries Hub-2's ROD back data to Hub-1, in the back field of a ctl_word_t
// (back_src = ROD-2), registered once. Hub-1 takes ROD-2 back data from that field.
//
// Ports not driven by logic here attach to parts outside it: the TTC-FMC (fmc_*), the ROD
// (rod_*), the other Hub (hub_*), the FEX node slots (node_*, fex_ro_*), the IPbus endpoint
// (bus_*), the supply supervisors (rail_ok). Readout words are modelled after
// deserialisation: RO_W bits per clock with a valid bit, in the clk domain. clk is the FPGA
// logic clock, in the real board derived from the fanned-out LHC clock (fpga_clk).
//
// Stream numbering on rod_ro_*: index n*FEX_STREAMS+s is stream s of node n (node 0 is FEX 01
// in logical slot 3), then the 2 streams of the other Hub's FPGA, then this Hub FPGA's 2
// streams. The board fixes the physical mapping only at layout time; this order is this
// design's. mon_* uses the same order for its first 74 entries.
module fex_hub #(
  parameter int unsigned N_NODES     = 12,
  parameter int unsigned FEX_STREAMS = 6,
  parameter int unsigned HUB_STREAMS = 2,
  parameter int unsigned RO_W        = 32,
  parameter int unsigned ROD_PWR_TIMEOUT = 40000
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // board identity
  input  logic [7:0]                    ha,
  output logic [7:0]                    ga,
  output logic                          ga_valid,
  output logic                          is_hub1,
  // register bus from the IPbus endpoint
  input  logic [hub_pkg::REG_ADDR_W-1:0] bus_addr,
  input  logic [31:0]                   bus_wdata,
  input  logic                          bus_we,
  input  logic                          bus_re,
  output logic [31:0]                   bus_rdata,
  output logic                          bus_ack,
  output logic                          bus_err,
  // TTC-FMC
  input  logic                          fmc_clk,
  input  logic                          fmc_ttc_valid,
  input  logic [hub_pkg::TTC_W-1:0]     fmc_ttc_data,
  // ROD on this Hub: back data in, combined stream and clock out
  input  logic                          rod_back_valid,
  input  logic [hub_pkg::BACK_W-1:0]    rod_back_data,
  output logic                          rod_clk,
  output hub_pkg::ctl_word_t            rod_ctl,
  // this Hub's FPGA copy of the clock and combined stream
  output logic                          fpga_clk,
  output hub_pkg::ctl_word_t            fpga_ctl,
  // other Hub, clock and control pairs
  input  logic                          hub_clk_in,
  input  hub_pkg::ctl_word_t            hub_ctl_in,
  output logic                          hub_clk_out,
  output hub_pkg::ctl_word_t            hub_ctl_out,
  // node slots, TTC clock and combined stream
  output logic [N_NODES-1:0]            node_clk,
  output hub_pkg::ctl_word_t            node_ctl [N_NODES],
  // readout streams in
  input  logic [N_NODES*FEX_STREAMS-1:0] fex_ro_valid,
  input  logic [RO_W-1:0]               fex_ro_data [N_NODES*FEX_STREAMS],
  input  logic [HUB_STREAMS-1:0]        hub_ro_in_valid,     // from the other Hub's FPGA
  input  logic [RO_W-1:0]               hub_ro_in_data [HUB_STREAMS],
  input  logic [HUB_STREAMS-1:0]        own_ro_valid,        // this FPGA's own readout payload
  input  logic [RO_W-1:0]               own_ro_data [HUB_STREAMS],
  // readout streams out
  output logic [N_NODES*FEX_STREAMS+2*HUB_STREAMS-1:0] rod_ro_valid,
  output logic [RO_W-1:0]               rod_ro_data [N_NODES*FEX_STREAMS+2*HUB_STREAMS],
  output logic [HUB_STREAMS-1:0]        hub_ro_out_valid,    // to the other Hub's ROD
  output logic [RO_W-1:0]               hub_ro_out_data [HUB_STREAMS],
  output logic [N_NODES*FEX_STREAMS+HUB_STREAMS-1:0] mon_valid,
  output logic [RO_W-1:0]               mon_data [N_NODES*FEX_STREAMS+HUB_STREAMS],
  // power
  input  logic [hub_pkg::N_RAILS-1:0]   rail_ok,
  output logic                          power_good,
  output logic [1:0]                    rod_pwr_ctrl,
  input  logic [1:0]                    rod_pwr_stat
);
  import hub_pkg::ctl_word_t;
  import hub_pkg::BACK_ROD2;

  localparam int unsigned N_FEX = N_NODES * FEX_STREAMS;
  localparam int unsigned N_IN  = N_FEX + HUB_STREAMS;      // into the Hub FPGA
  localparam int unsigned NR    = hub_pkg::N_REGS;

  // ------------------------------------------------------------------ registers
  logic [31:0] status_w [NR];
  logic [31:0] ctrl_w   [NR];
  logic [31:0] pulse_w  [NR];

  ctrl_regs #(.N_REGS(NR), .ADDR_W(hub_pkg::REG_ADDR_W)) u_regs (
    .clk, .rst_n,
    .bus_addr, .bus_wdata, .bus_we, .bus_re, .bus_rdata, .bus_ack, .bus_err,
    .status_in(status_w), .ctrl_out(ctrl_w), .pulse_out(pulse_w)
  );

  logic        rod_pwr_en, merge_en1, merge_en2;
  logic        clr_rail, snap_cnt, clr_cnt, clr_ovf;
  logic [95:0] pol_all;
  logic [N_IN-1:0] pol_inv;
  logic [$clog2(N_IN)-1:0] mon_sel;

  assign rod_pwr_en = ctrl_w[hub_pkg::R_CTRL][0];
  assign merge_en1  = ctrl_w[hub_pkg::R_CTRL][1];
  assign merge_en2  = ctrl_w[hub_pkg::R_CTRL][2];
  assign clr_rail   = pulse_w[hub_pkg::R_PULSE][0];
  assign snap_cnt   = pulse_w[hub_pkg::R_PULSE][1];
  assign clr_cnt    = pulse_w[hub_pkg::R_PULSE][2];
  assign clr_ovf    = pulse_w[hub_pkg::R_PULSE][3];
  assign pol_all    = {ctrl_w[hub_pkg::R_POL2], ctrl_w[hub_pkg::R_POL1], ctrl_w[hub_pkg::R_POL0]};
  assign pol_inv    = pol_all[N_IN-1:0];
  assign mon_sel    = ctrl_w[hub_pkg::R_MON_SEL][$clog2(N_IN)-1:0];

  // ------------------------------------------------------------------ identity
  logic [3:0] slot;

  geo_addr #(.GA_W(8)) u_geo (
    .clk, .rst_n, .ha,
    .shelf_addr(ctrl_w[hub_pkg::R_SHELF][7:0]), .shelf_valid(ctrl_w[hub_pkg::R_SHELF][8]),
    .ga, .ga_valid, .is_hub1, .slot
  );

  // ------------------------------------------------------------------ TTC / ROD control stream
  ctl_word_t merged;
  ctl_word_t fo_hub_ctl;
  ctl_word_t fwd_word;
  logic [1:0] merge_ovf;
  logic       merge_drop, merge_contention;

  ttc_ctrl_merge #(.FIFO_DEPTH(4)) u_merge (
    .clk, .rst_n,
    .ttc_valid(fmc_ttc_valid && is_hub1), .ttc_data(fmc_ttc_data),
    .rod1_valid(rod_back_valid), .rod1_data(rod_back_data),
    .rod2_valid(hub_ctl_in.back_valid && hub_ctl_in.back_src == BACK_ROD2),
    .rod2_data(hub_ctl_in.back),
    .en_rod1(merge_en1 && is_hub1), .en_rod2(merge_en2 && is_hub1), .clr_ovf,
    .ctl_out(merged), .ovf(merge_ovf), .drop(merge_drop), .contention(merge_contention)
  );

  ttc_fanout #(.N_NODES(N_NODES)) u_ttc_fo (
    .is_hub1,
    .fmc_clk, .local_ctl(merged),
    .hub_clk_in, .hub_ctl_in,
    .node_clk, .node_ctl,
    .rod_clk, .rod_ctl,
    .fpga_clk, .fpga_ctl,
    .hub_clk_out, .hub_ctl_out(fo_hub_ctl)
  );

  // Hub-2 sends its ROD's back data to Hub-1 on the Hub-to-Hub control pair
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fwd_word <= '0;
    end else begin
      fwd_word            <= '0;
      fwd_word.back_valid <= rod_back_valid && !is_hub1;
      fwd_word.back_src   <= BACK_ROD2;
      fwd_word.back       <= (rod_back_valid && !is_hub1) ? rod_back_data : '0;
    end
  end

  assign hub_ctl_out = is_hub1 ? fo_hub_ctl : fwd_word;

  // ------------------------------------------------------------------ readout path
  logic [N_IN-1:0] in_valid;
  logic [RO_W-1:0] in_data [N_IN];
  logic [31:0]     sel_count;

  // 2-way fan-out: each incoming stream to the ROD and to this FPGA
  always_comb begin
    in_valid = {hub_ro_in_valid, fex_ro_valid};
    for (int i = 0; i < N_FEX; i++) in_data[i] = fex_ro_data[i];
    for (int i = 0; i < HUB_STREAMS; i++) in_data[N_FEX+i] = hub_ro_in_data[i];
    rod_ro_valid = {own_ro_valid, in_valid};
    for (int i = 0; i < N_IN; i++) rod_ro_data[i] = in_data[i];
    for (int i = 0; i < HUB_STREAMS; i++) rod_ro_data[N_IN+i] = own_ro_data[i];
  end

  // This FPGA's own streams also go to the ROD on the other Hub
  assign hub_ro_out_valid = own_ro_valid;
  assign hub_ro_out_data  = own_ro_data;

  readout_monitor #(.N_CH(N_IN), .W(RO_W), .CNT_W(32)) u_mon (
    .clk, .rst_n,
    .rx_valid(in_valid), .rx_data(in_data), .pol_inv,
    .snap(snap_cnt), .clr(clr_cnt), .sel(mon_sel),
    .mon_valid, .mon_data, .sel_count
  );

  // ------------------------------------------------------------------ received combined stream
  logic [hub_pkg::TTC_W-1:0] rx_last_ttc;
  logic                      rx_ttc_seen;
  logic [31:0]               rx_cnt_ttc, rx_cnt_back1, rx_cnt_back2;

  ctl_stream_rx #(.CNT_W(32)) u_ctl_rx (
    .clk, .rst_n, .ctl_in(fpga_ctl), .snap(snap_cnt), .clr(clr_cnt),
    .last_ttc(rx_last_ttc), .ttc_seen(rx_ttc_seen),
    .cnt_ttc(rx_cnt_ttc), .cnt_back1(rx_cnt_back1), .cnt_back2(rx_cnt_back2)
  );

  // ------------------------------------------------------------------ power
  logic [hub_pkg::N_RAILS-1:0] rail_fault;
  logic [2:0] rod_state;
  logic       rod_fault;

  power_monitor #(.N_RAILS(hub_pkg::N_RAILS)) u_pwr (
    .clk, .rst_n, .rail_ok, .clr(clr_rail), .power_good, .fault(rail_fault)
  );

  rod_power_ctrl #(.TIMEOUT_CYC(ROD_PWR_TIMEOUT)) u_rod_pwr (
    .clk, .rst_n, .enable(rod_pwr_en), .hub_power_good(power_good),
    .rod_status(rod_pwr_stat), .rod_ctrl(rod_pwr_ctrl), .state_o(rod_state), .fault(rod_fault)
  );

  // ------------------------------------------------------------------ status words
  always_comb begin
    for (int i = 0; i < NR; i++) status_w[i] = '0;
    status_w[hub_pkg::R_GEO]       = {22'd0, is_hub1, ga_valid, ga};
    status_w[hub_pkg::R_POWER]     = {24'd0, rod_state, rod_pwr_ctrl, rod_pwr_stat, power_good};
    status_w[hub_pkg::R_RAILFAULT] = 32'(rail_fault);
    status_w[hub_pkg::R_MON_COUNT] = sel_count;
    status_w[hub_pkg::R_MERGE]     = {30'd0, merge_ovf};
    status_w[hub_pkg::R_RX_TTC]    = {23'd0, rx_ttc_seen, rx_last_ttc};
    status_w[hub_pkg::R_RX_NTTC]   = rx_cnt_ttc;
    status_w[hub_pkg::R_RX_NBACK1] = rx_cnt_back1;
    status_w[hub_pkg::R_RX_NBACK2] = rx_cnt_back2;
  end

endmodule
