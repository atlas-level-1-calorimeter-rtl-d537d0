// ttc_fanout: board-level distribution of the TTC clock and the combined TTC + ROD control
// stream.
//
// Both Hubs carry the same fan-out; what it does depends on the logical slot. On Hub-1 (the
// board with the TTC-FMC) the clock comes from the TTC-FMC and the data from the merge logic
// of the local FPGA; both are copied to 15 destinations: the 12 node slots, the local ROD,
// the local Hub FPGA and Hub-2. On Hub-2 clock and data arrive from Hub-1 over the Fabric
// Interface and are copied only to the local ROD and FPGA (the 2-way fan-out); the node-slot
// outputs and the outputs towards the other Hub are tied low. The clock is passed on without
// processing. Each data line is modelled here as the control word it carries per bunch
// crossing, not as the serial signal. Purely combinational: no clock, no latency.
//
// Which slot the board sits in comes from is_hub1 (decoded from the hardware address); the
// slot rules follow the document, the word-level modelling is this design's choice.
module ttc_fanout
  import hub_pkg::ctl_word_t;
#(
  parameter int unsigned N_NODES = 12
) (
  input  logic               is_hub1,
  // sources
  input  logic               fmc_clk,       // LHC clock from the TTC-FMC (Hub-1)
  input  ctl_word_t          local_ctl,     // combined stream from this FPGA (Hub-1)
  input  logic               hub_clk_in,    // clock from the other Hub (Hub-2)
  input  ctl_word_t          hub_ctl_in,    // combined stream from the other Hub (Hub-2)
  // destinations
  output logic [N_NODES-1:0] node_clk,
  output ctl_word_t          node_ctl [N_NODES],
  output logic               rod_clk,
  output ctl_word_t          rod_ctl,
  output logic               fpga_clk,
  output ctl_word_t          fpga_ctl,
  output logic               hub_clk_out,
  output ctl_word_t          hub_ctl_out
);

  logic      src_clk;
  ctl_word_t src_ctl;

  assign src_clk = is_hub1 ? fmc_clk   : hub_clk_in;
  assign src_ctl = is_hub1 ? local_ctl : hub_ctl_in;

  // Local destinations are fed on both Hubs
  assign rod_clk  = src_clk;
  assign rod_ctl  = src_ctl;
  assign fpga_clk = src_clk;
  assign fpga_ctl = src_ctl;

  // Backplane destinations are driven by Hub-1 only, tied low on Hub-2
  assign hub_clk_out = is_hub1 && fmc_clk;
  assign hub_ctl_out = is_hub1 ? local_ctl : '0;

  always_comb begin
    for (int i = 0; i < N_NODES; i++) begin
      node_clk[i] = is_hub1 && fmc_clk;
      node_ctl[i] = is_hub1 ? local_ctl : '0;
    end
  end

endmodule
