// ctrl_regs: slow-control register bank of the Hub FPGA, the target of the IPbus accesses.
//
// It implements the register rules of the Hub programming model:
//   - every register can be read; there are no write-only registers;
//   - Status registers are read only and reflect the hardware (status_in);
//   - Control registers are read/write, changed only by the controller, and read back the
//     last value written;
//   - Pulse registers turn each bit written as 1 into a one-clock pulse on pulse_out and
//     read as zero;
//   - writes to read-only registers or to undefined bits leave them unchanged (undefined
//     bits read zero);
//   - all bits are zero after reset.
// The type and defined bits of each register come from REG_TYPE and REG_MASK; the default
// map of hub_pkg is this design's, since the document leaves the register map open.
//
// Bus: one access per strobe. bus_we or bus_re is held for one clock with bus_addr (word
// address) and bus_wdata; one clock later bus_ack is high with bus_rdata (reads) and bus_err
// set if the address is outside the map. A written Control value appears on ctrl_out and a
// Pulse on pulse_out in that same clock as the ack. A status read samples status_in in the
// clock of the strobe, so the whole 32-bit word comes from one clock.
module ctrl_regs #(
  parameter int unsigned N_REGS = 16,
  parameter int unsigned ADDR_W = 5,
  parameter hub_pkg::reg_type_e REG_TYPE [N_REGS] = hub_pkg::REG_TYPE,
  parameter logic [31:0]        REG_MASK [N_REGS] = hub_pkg::REG_MASK
) (
  input  logic              clk,
  input  logic              rst_n,
  // register bus
  input  logic [ADDR_W-1:0] bus_addr,
  input  logic [31:0]       bus_wdata,
  input  logic              bus_we,
  input  logic              bus_re,
  output logic [31:0]       bus_rdata,
  output logic              bus_ack,
  output logic              bus_err,
  // hardware side
  input  logic [31:0]       status_in [N_REGS],
  output logic [31:0]       ctrl_out  [N_REGS],
  output logic [31:0]       pulse_out [N_REGS]
);
  import hub_pkg::*;

  logic              in_map;
  reg_type_e         acc_type;
  logic [31:0]       rd_value;

  always_comb begin
    in_map   = 32'(bus_addr) < N_REGS;
    acc_type = REG_UNDEF;
    for (int i = 0; i < N_REGS; i++) begin
      if (32'(bus_addr) == i) begin
        acc_type = REG_TYPE[i];
      end
    end
    rd_value = '0;
    for (int i = 0; i < N_REGS; i++) begin
      if (32'(bus_addr) == i) begin
        unique case (REG_TYPE[i])
          REG_STATUS:  rd_value = status_in[i] & REG_MASK[i];
          REG_CONTROL: rd_value = ctrl_out[i];
          default:     rd_value = '0;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bus_ack   <= 1'b0;
      bus_err   <= 1'b0;
      bus_rdata <= '0;
      for (int i = 0; i < N_REGS; i++) begin
        ctrl_out[i]  <= '0;
        pulse_out[i] <= '0;
      end
    end else begin
      bus_ack   <= bus_we || bus_re;
      bus_err   <= (bus_we || bus_re) && !(in_map && acc_type != REG_UNDEF);
      bus_rdata <= bus_re ? rd_value : '0;
      for (int i = 0; i < N_REGS; i++) begin
        pulse_out[i] <= '0;
        if (bus_we && 32'(bus_addr) == i) begin
          if (REG_TYPE[i] == REG_CONTROL)
            ctrl_out[i] <= (ctrl_out[i] & ~REG_MASK[i]) | (bus_wdata & REG_MASK[i]);
          if (REG_TYPE[i] == REG_PULSE)
            pulse_out[i] <= bus_wdata & REG_MASK[i];
        end
      end
    end
  end

  // One access at a time
  a_one_access: assert property (@(posedge clk) disable iff (!rst_n) !(bus_we && bus_re));

endmodule
