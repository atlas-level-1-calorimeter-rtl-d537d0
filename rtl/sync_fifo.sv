// sync_fifo: single-clock first-in first-out buffer used to hold ROD back data until the
// combined control stream has a free slot.
//
// A memory of DEPTH words with read and write pointers one bit wider than the address, so
// that full and empty can be told apart. The head word is shown on rd_data while empty is
// low (first-word fall-through); rd_en pops it. A write when full and a read when empty are
// ignored; the caller is expected to check full and empty. A word written in cycle t can be
// read from cycle t+1. Depth must be a power of two. Reset empties the buffer.
module sync_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         full,
  output logic         empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wp, rp;

  assign empty   = (wp == rp);
  assign full    = (wp[AW] != rp[AW]) && (wp[AW-1:0] == rp[AW-1:0]);
  assign rd_data = mem[rp[AW-1:0]];
  assign count   = wp - rp;

  always_ff @(posedge clk) begin
    if (wr_en && !full) mem[wp[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (wr_en && !full) wp <= wp + 1'b1;
      if (rd_en && !empty) rp <= rp + 1'b1;
    end
  end

  initial begin
    assert ((DEPTH & (DEPTH - 1)) == 0 && DEPTH >= 2) else $error("sync_fifo: DEPTH must be a power of two >= 2");
  end

endmodule
