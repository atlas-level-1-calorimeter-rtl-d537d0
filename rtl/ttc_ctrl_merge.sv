// ttc_ctrl_merge: combines the TTC control data with the back data of the two RODs into the
// single control stream that Hub-1 fans out to the FEX modules, its ROD, its own FPGA and
// Hub-2.
//
// Three inputs are merged, as on the Hub-1 FPGA: the TTC data word from the TTC-FMC (one per
// bunch crossing), the back data of the ROD on this Hub (ROD-1) and the back data of the ROD
// on the other Hub (ROD-2), which reaches Hub-1 over the Fabric Interface. The document leaves
// the merged format open; this design's format is the ctl_word_t of hub_pkg: every output word
// carries the TTC field of its crossing and one back-data slot. TTC data is never delayed by
// back data: it always appears one clock after it is presented. Back data is sporadic, so each
// ROD has a small FIFO; when both FIFOs hold data the slot alternates between them
// (round robin). The links from the RODs have no ready signal, so a word that arrives while
// its FIFO is full is dropped and a sticky overflow flag is set (cleared by clr_ovf).
// A ROD whose enable is low is ignored.
//
// Timing: TTC latency 1 clock. Back-data latency 2 clocks when the FIFO is empty and the
// other ROD has nothing waiting. One back word per clock at most leaves the block.
module ttc_ctrl_merge
  import hub_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  // TTC data from the TTC-FMC
  input  logic              ttc_valid,
  input  logic [TTC_W-1:0]  ttc_data,
  // back data from ROD-1 (this Hub) and ROD-2 (other Hub)
  input  logic              rod1_valid,
  input  logic [BACK_W-1:0] rod1_data,
  input  logic              rod2_valid,
  input  logic [BACK_W-1:0] rod2_data,
  // control
  input  logic              en_rod1,
  input  logic              en_rod2,
  input  logic              clr_ovf,
  // combined stream
  output ctl_word_t         ctl_out,
  // status
  output logic [1:0]        ovf,         // sticky overflow, [0] ROD-1, [1] ROD-2
  output logic              drop,        // a back word was dropped this clock
  output logic              contention   // both RODs had data waiting this clock
);

  logic [BACK_W-1:0] head1, head2;
  logic              empty1, empty2, full1, full2;
  logic              push1, push2, pop1, pop2;
  logic [$clog2(FIFO_DEPTH):0] cnt1, cnt2;
  back_src_e         last_grant;

  assign push1 = rod1_valid && en_rod1;
  assign push2 = rod2_valid && en_rod2;

  sync_fifo #(.W(BACK_W), .DEPTH(FIFO_DEPTH)) u_fifo1 (
    .clk, .rst_n, .wr_en(push1), .wr_data(rod1_data), .rd_en(pop1),
    .rd_data(head1), .full(full1), .empty(empty1), .count(cnt1)
  );
  sync_fifo #(.W(BACK_W), .DEPTH(FIFO_DEPTH)) u_fifo2 (
    .clk, .rst_n, .wr_en(push2), .wr_data(rod2_data), .rd_en(pop2),
    .rd_data(head2), .full(full2), .empty(empty2), .count(cnt2)
  );

  // Round-robin choice of the back-data slot
  always_comb begin
    pop1 = 1'b0;
    pop2 = 1'b0;
    if (!empty1 && !empty2) begin
      if (last_grant == BACK_ROD1) pop2 = 1'b1;
      else                         pop1 = 1'b1;
    end else if (!empty1) begin
      pop1 = 1'b1;
    end else if (!empty2) begin
      pop2 = 1'b1;
    end
  end

  assign contention = !empty1 && !empty2;
  assign drop       = (push1 && full1) || (push2 && full2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctl_out    <= '0;
      last_grant <= BACK_ROD2;
      ovf        <= '0;
    end else begin
      ctl_out.ttc_valid  <= ttc_valid;
      ctl_out.ttc        <= ttc_valid ? ttc_data : '0;
      ctl_out.back_valid <= pop1 || pop2;
      ctl_out.back_src   <= pop2 ? BACK_ROD2 : BACK_ROD1;
      ctl_out.back       <= pop2 ? head2 : (pop1 ? head1 : '0);
      if (pop1) last_grant <= BACK_ROD1;
      if (pop2) last_grant <= BACK_ROD2;
      if (clr_ovf) ovf <= '0;
      else         ovf <= ovf | {push2 && full2, push1 && full1};
    end
  end

  // A back word can only leave from a FIFO that holds one
  a_pop_nonempty: assert property (@(posedge clk) disable iff (!rst_n)
    !(pop1 && pop2) && !(pop1 && empty1) && !(pop2 && empty2));

endmodule
