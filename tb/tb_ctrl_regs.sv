// tb_ctrl_regs: self-checking test of the slow-control register rules.
//
// With the default register map it checks: all registers read zero after reset; Control
// registers read back the last value written, restricted to their defined bits; writes to
// Status registers change nothing and reads return the hardware value of the strobe clock;
// Pulse registers give a one-clock pulse of the written bits and read zero; addresses outside
// the map read zero and raise the error flag; the ack comes one clock after the strobe.
module tb_ctrl_regs;
  import hub_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [REG_ADDR_W-1:0] bus_addr = '0;
  logic [31:0] bus_wdata = '0;
  logic bus_we = 1'b0, bus_re = 1'b0;
  logic [31:0] bus_rdata;
  logic bus_ack, bus_err;
  logic [31:0] status_in [N_REGS];
  logic [31:0] ctrl_out  [N_REGS];
  logic [31:0] pulse_out [N_REGS];

  int checks = 0, failures = 0;
  logic [31:0] shadow [N_REGS];
  int pulse_seen = 0;

  ctrl_regs #(.N_REGS(N_REGS), .ADDR_W(REG_ADDR_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 12) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic write(input int a, input logic [31:0] d);
    @(negedge clk);
    bus_addr = REG_ADDR_W'(a); bus_wdata = d; bus_we = 1;
    @(negedge clk);
    bus_we = 0;
    check(bus_ack, "write ack");
    check(bus_err == !(a < N_REGS), "write err flag");
  endtask

  task automatic read(input int a, output logic [31:0] d);
    @(negedge clk);
    bus_addr = REG_ADDR_W'(a); bus_re = 1;
    @(negedge clk);
    bus_re = 0;
    check(bus_ack, "read ack");
    check(bus_err == !(a < N_REGS), "read err flag");
    d = bus_rdata;
  endtask

  // Only Pulse registers ever pulse
  always @(negedge clk) begin
    if (rst_n) begin
      for (int i = 0; i < N_REGS; i++)
        if (REG_TYPE[i] != REG_PULSE) check(pulse_out[i] == 0, "no pulse on other registers");
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    for (int i = 0; i < N_REGS; i++) begin status_in[i] = '0; shadow[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // power-up: everything zero (status inputs are zero too)
    for (int a = 0; a < N_REGS; a++) begin read(a, d); check(d == 0, "reset value"); end

    // random accesses against a model
    for (int k = 0; k < 3000; k++) begin
      automatic int a = $urandom % (1 << REG_ADDR_W);
      automatic logic [31:0] v = $urandom;
      for (int i = 0; i < N_REGS; i++) status_in[i] = $urandom;
      if ($urandom % 2) begin
        if (a < N_REGS && REG_TYPE[a] == REG_PULSE) begin
          @(negedge clk);
          bus_addr = REG_ADDR_W'(a); bus_wdata = v; bus_we = 1;
          @(negedge clk);
          bus_we = 0;
          check(bus_ack && !bus_err, "pulse write ack");
          check(pulse_out[a] == (v & REG_MASK[a]), "pulse value");   // with the ack
          if (pulse_out[a] != 0) pulse_seen++;
          @(negedge clk);
          check(pulse_out[a] == 0, "pulse lasts one clock");
        end else begin
          write(a, v);
        end
        if (a < N_REGS && REG_TYPE[a] == REG_CONTROL)
          shadow[a] = (shadow[a] & ~REG_MASK[a]) | (v & REG_MASK[a]);
      end else begin
        automatic logic [31:0] exp = '0;
        if (a < N_REGS) begin
          case (REG_TYPE[a])
            REG_STATUS:  exp = status_in[a] & REG_MASK[a];
            REG_CONTROL: exp = shadow[a];
            default:     exp = '0;
          endcase
        end
        read(a, d);
        check(d == exp, "read value");
      end
      for (int i = 0; i < N_REGS; i++)
        if (REG_TYPE[i] == REG_CONTROL) check(ctrl_out[i] == shadow[i], "ctrl_out");
    end

    // an idle clock gives no ack
    @(negedge clk); @(negedge clk);
    check(!bus_ack, "no ack when idle");
    check(pulse_seen > 0, "pulses produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
