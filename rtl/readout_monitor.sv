// readout_monitor: Hub FPGA receiver side of the 74 fanned-out readout streams (72 from the
// FEX modules, 2 from the other Hub's FPGA).
//
// The PCB routing of the readout pairs does not preserve the direct and complement sides of
// each differential pair, so a received stream may be inverted. Each channel therefore has a
// polarity bit, set from a control register once the routing is known; when set, the
// received word is inverted bit by bit. The corrected words are passed on (mon_valid /
// mon_data) for monitoring or supplemental processing, and every channel has a word counter.
// So that a counter read while it is counting returns a well-defined value, the counters are
// not read directly: a snapshot pulse copies all of them at once into shadow registers, and
// sel picks which shadow is shown on sel_count (zero for a channel number out of range).
// A clear pulse zeroes counters and shadows; clear wins over a snapshot in the same clock.
// Counters wrap.
//
// Words are modelled as already deserialised by the transceivers, one W-bit word per clock
// with a valid bit, in this block's clock. Timing: mon_* follow rx_* by one clock; a word
// present in the clock of a snapshot is not in that snapshot. Channel count follows the
// document; word width, counter width and the snapshot scheme are this design's choices.
module readout_monitor #(
  parameter int unsigned N_CH  = 74,
  parameter int unsigned W     = 32,
  parameter int unsigned CNT_W = 32
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [N_CH-1:0]           rx_valid,
  input  logic [W-1:0]              rx_data  [N_CH],
  input  logic [N_CH-1:0]           pol_inv,
  input  logic                      snap,
  input  logic                      clr,
  input  logic [$clog2(N_CH)-1:0]   sel,
  output logic [N_CH-1:0]           mon_valid,
  output logic [W-1:0]              mon_data [N_CH],
  output logic [CNT_W-1:0]          sel_count
);

  logic [CNT_W-1:0] cnt    [N_CH];
  logic [CNT_W-1:0] shadow [N_CH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mon_valid <= '0;
      for (int i = 0; i < N_CH; i++) begin
        mon_data[i] <= '0;
        cnt[i]      <= '0;
        shadow[i]   <= '0;
      end
    end else begin
      mon_valid <= rx_valid;
      for (int i = 0; i < N_CH; i++) begin
        mon_data[i] <= rx_valid[i] ? (rx_data[i] ^ {W{pol_inv[i]}}) : '0;
        if (clr) begin
          cnt[i]    <= '0;
          shadow[i] <= '0;
        end else begin
          if (rx_valid[i]) cnt[i] <= cnt[i] + 1'b1;
          if (snap)        shadow[i] <= cnt[i];
        end
      end
    end
  end

  always_comb begin
    sel_count = '0;
    for (int i = 0; i < N_CH; i++)
      if (sel == i[$clog2(N_CH)-1:0]) sel_count = shadow[i];
  end

endmodule
