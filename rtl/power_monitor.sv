// power_monitor: the Hub's overall power status.
//
// Every DC/DC rail on the board is watched by a Hi/Low supply supervisor; each window
// comparator reports rail_ok high while its rail is inside the window. This block gives the
// 1-bit overall status of the power system (power_good: all rails inside their windows) and
// keeps a sticky record of which rails have left their window since the last clear, so that
// a short glitch is not lost before the controller reads it. The comparators themselves are
// analog and outside this block.
//
// The 1-bit overall status follows the document; the sticky fault record, the two-flop
// synchronisation of the comparator outputs and the rail count (the twelve DC/DC outputs of
// the board's power section: FPGA core, I/O, AUX, GTH VCC, GTH VTT, GTH VAUX and switch VDD,
// VDDX, VTT, VDDA, VDD33, VDDA33) are this design's choices.
//
// Timing: power_good and fault follow rail_ok three clocks later. clr clears the record;
// nothing is recorded until the synchroniser has filled after reset; a rail still out of
// window sets its bit again in the next clock. Zero after reset.
module power_monitor #(
  parameter int unsigned N_RAILS = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_RAILS-1:0] rail_ok,
  input  logic               clr,
  output logic               power_good,
  output logic [N_RAILS-1:0] fault
);
  logic [N_RAILS-1:0] ok_meta, ok_sync;
  logic [1:0]         armed;   // synchroniser filled after reset

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ok_meta    <= '0;
      ok_sync    <= '0;
      armed      <= '0;
      power_good <= 1'b0;
      fault      <= '0;
    end else begin
      ok_meta    <= rail_ok;
      ok_sync    <= ok_meta;
      if (armed != 2'd2) armed <= armed + 1'b1;
      power_good <= (armed == 2'd2) && (&ok_sync);
      if (clr)                 fault <= '0;
      else if (armed == 2'd2)  fault <= fault | ~ok_sync;
    end
  end

endmodule
