// rod_power_ctrl: sequences the power-up of the ROD mezzanine.
//
// The Hub gives the ROD its bulk +12 V; the ROD's own converters are brought up under two
// control signals from the Hub, and the ROD answers on two status signals. The document
// gives only those signal counts and their purpose; the sequence is this design's:
//   OFF    rod_ctrl = 00. Leaves for STAGE1 when enable is set and the Hub power is good.
//   STAGE1 rod_ctrl = 01 (first group of ROD supplies). Waits for rod_status[0].
//   STAGE2 rod_ctrl = 11 (remaining ROD supplies). Waits for rod_status[1].
//   ON     rod_ctrl = 11, both status bits expected high.
//   FAULT  rod_ctrl = 00. Entered when a stage waits more than TIMEOUT_CYC clocks, when
//          the Hub power fails, or when a status bit drops while ON. Left only by
//          clearing enable, which returns to OFF.
// Clearing enable in any state switches the ROD off at once (back to OFF).
//
// Timing: rod_ctrl is registered with the state; each transition takes one clock after its
// condition is seen. TIMEOUT_CYC is counted in clocks of clk.
module rod_power_ctrl #(
  parameter int unsigned TIMEOUT_CYC = 40000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       enable,
  input  logic       hub_power_good,
  input  logic [1:0] rod_status,
  output logic [1:0] rod_ctrl,
  output logic [2:0] state_o,
  output logic       fault
);
  typedef enum logic [2:0] {
    S_OFF    = 3'd0,
    S_STAGE1 = 3'd1,
    S_STAGE2 = 3'd2,
    S_ON     = 3'd3,
    S_FAULT  = 3'd4
  } state_e;

  localparam int unsigned TW = $clog2(TIMEOUT_CYC + 1);

  state_e        state, nxt;
  logic [TW-1:0] timer;
  logic          timed_out;

  assign timed_out = (timer >= TW'(TIMEOUT_CYC));

  always_comb begin
    nxt = state;
    unique case (state)
      S_OFF:    if (enable && hub_power_good) nxt = S_STAGE1;
      S_STAGE1: if (!enable)                         nxt = S_OFF;
                else if (!hub_power_good || timed_out) nxt = S_FAULT;
                else if (rod_status[0])              nxt = S_STAGE2;
      S_STAGE2: if (!enable)                         nxt = S_OFF;
                else if (!hub_power_good || timed_out || !rod_status[0]) nxt = S_FAULT;
                else if (rod_status[1])              nxt = S_ON;
      S_ON:     if (!enable)                         nxt = S_OFF;
                else if (!hub_power_good || rod_status != 2'b11) nxt = S_FAULT;
      S_FAULT:  if (!enable)                         nxt = S_OFF;
      default:                                       nxt = S_FAULT;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_OFF;
      timer    <= '0;
      rod_ctrl <= 2'b00;
    end else begin
      state <= nxt;
      timer <= (nxt != state) ? '0 : (timed_out ? timer : timer + 1'b1);
      unique case (nxt)
        S_STAGE1:     rod_ctrl <= 2'b01;
        S_STAGE2, S_ON: rod_ctrl <= 2'b11;
        default:      rod_ctrl <= 2'b00;
      endcase
    end
  end

  assign state_o = state;
  assign fault   = (state == S_FAULT);

  // The second group of ROD supplies is never enabled without the first
  a_order: assert property (@(posedge clk) disable iff (!rst_n) rod_ctrl != 2'b10);

endmodule
