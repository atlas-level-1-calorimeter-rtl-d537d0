// ctl_stream_rx: receive-side decoder of the combined TTC + ROD control stream inside the Hub
// FPGA.
//
// Every object that receives the combined stream picks out what it needs in its own
// firmware; the Hub FPGA is one of those objects. This block splits each received
// ctl_word_t into its parts. It keeps the last TTC word seen and counts TTC words and back
// words from ROD-1 and ROD-2, so the controller can verify TTC distribution through one or
// two Hubs. Hub-1 sees its own merged stream here; Hub-2 sees the stream relayed from Hub-1.
// Consistent reads use the readout monitor's scheme: a snapshot pulse copies the three
// counters at once into shadow registers. A clear pulse zeroes counters, shadows and the
// last-word register, and wins over a snapshot in the same clock. Counters wrap.
//
// Interface: ctl_in is sampled every clock. last_ttc / ttc_seen change one clock after a
// valid TTC field arrives. cnt_* are the shadows, which change only one clock after snap.
// A word arriving in the clock of a snapshot is not in that snapshot.
// That every destination decodes the stream in its own firmware follows the specification.
// The word format, the counters and the snapshot scheme are this design's own.
module ctl_stream_rx
  import hub_pkg::*;
#(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ctl_word_t        ctl_in,
  input  logic             snap,
  input  logic             clr,
  output logic [TTC_W-1:0] last_ttc,
  output logic             ttc_seen,
  output logic [CNT_W-1:0] cnt_ttc,
  output logic [CNT_W-1:0] cnt_back1,
  output logic [CNT_W-1:0] cnt_back2
);
  logic [CNT_W-1:0] run_ttc, run_back1, run_back2;
  logic             is_back1, is_back2;

  assign is_back1 = ctl_in.back_valid && ctl_in.back_src == BACK_ROD1;
  assign is_back2 = ctl_in.back_valid && ctl_in.back_src == BACK_ROD2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_ttc   <= '0;
      run_back1 <= '0;
      run_back2 <= '0;
      cnt_ttc   <= '0;
      cnt_back1 <= '0;
      cnt_back2 <= '0;
      last_ttc  <= '0;
      ttc_seen  <= 1'b0;
    end else if (clr) begin
      run_ttc   <= '0;
      run_back1 <= '0;
      run_back2 <= '0;
      cnt_ttc   <= '0;
      cnt_back1 <= '0;
      cnt_back2 <= '0;
      last_ttc  <= '0;
      ttc_seen  <= 1'b0;
    end else begin
      if (ctl_in.ttc_valid) begin
        run_ttc  <= run_ttc + 1'b1;
        last_ttc <= ctl_in.ttc;
        ttc_seen <= 1'b1;
      end
      if (is_back1) run_back1 <= run_back1 + 1'b1;
      if (is_back2) run_back2 <= run_back2 + 1'b1;
      if (snap) begin
        cnt_ttc   <= run_ttc;
        cnt_back1 <= run_back1;
        cnt_back2 <= run_back2;
      end
    end
  end
endmodule
