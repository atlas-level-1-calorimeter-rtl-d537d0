// geo_addr: forms the 8-bit System Geographic Address that the Hub FPGA sends to its ROD,
// and decodes which of the two Hub slots the board sits in.
//
// The address combines the board's hardware address pins (backplane connector J10) with the
// shelf address, which the IPMC retrieves from the Shelf Manager and writes into a control
// register. The document leaves the crate/slot packing of the 8 bits open; this design packs
// {shelf[3:0], slot[3:0]}, taking the logical slot from ha[3:0], and reports the address as
// valid only once the shelf address has been written. The board is Hub-1, the host of the
// TTC-FMC, when the logical slot is 1. The pins are static but asynchronous to the FPGA
// clock, so they pass through two flip-flops first.
//
// Timing: ga, ga_valid and is_hub1 follow a change of ha three clocks later and a change of
// the shelf register one clock later. All outputs are zero after reset.
module geo_addr #(
  parameter int unsigned GA_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [7:0]      ha,           // hardware address pins
  input  logic [7:0]      shelf_addr,   // from the IPMC, via a control register
  input  logic            shelf_valid,
  output logic [GA_W-1:0] ga,
  output logic            ga_valid,
  output logic            is_hub1,
  output logic [3:0]      slot
);
  logic [7:0] ha_meta, ha_sync;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ha_meta  <= '0;
      ha_sync  <= '0;
      ga       <= '0;
      ga_valid <= 1'b0;
      is_hub1  <= 1'b0;
      slot     <= '0;
    end else begin
      ha_meta  <= ha;
      ha_sync  <= ha_meta;
      slot     <= ha_sync[3:0];
      is_hub1  <= (ha_sync[3:0] == 4'd1);
      ga       <= GA_W'({shelf_addr[3:0], ha_sync[3:0]});
      ga_valid <= shelf_valid;
    end
  end

endmodule
