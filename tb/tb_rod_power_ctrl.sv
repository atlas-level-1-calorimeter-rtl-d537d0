// tb_rod_power_ctrl: self-checking test of the ROD power-up sequencer.
//
// With a short timeout it walks the normal sequence (00 -> 01 -> 11, then ON), checks that
// power-up waits for the Hub power, that each stage times out into FAULT after exactly
// TIMEOUT_CYC clocks, that a status bit dropping or the Hub power failing while ON gives FAULT
// with the ROD switched off, and that only clearing enable leaves FAULT.
module tb_rod_power_ctrl;
  localparam int unsigned TO = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic enable = 1'b0, hub_power_good = 1'b0;
  logic [1:0] rod_status = 2'b00;
  logic [1:0] rod_ctrl;
  logic [2:0] state_o;
  logic fault;

  int checks = 0, failures = 0;

  rod_power_ctrl #(.TIMEOUT_CYC(TO)) dut (.*);

  always #5 clk = ~clk;

  localparam logic [2:0] OFF = 3'd0, ST1 = 3'd1, ST2 = 3'd2, ON = 3'd3, FLT = 3'd4;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t state=%0d ctrl=%b", what, $time, state_o, rod_ctrl);
    end
  endtask

  task automatic tick(int n = 1); repeat (n) @(negedge clk); endtask

  task automatic power_up();
    enable = 1; tick();
    check(state_o == ST1 && rod_ctrl == 2'b01, "stage 1");
    tick(3);
    check(state_o == ST1, "waits for status 0");
    rod_status = 2'b01; tick();
    check(state_o == ST2 && rod_ctrl == 2'b11, "stage 2");
    tick(2);
    check(state_o == ST2, "waits for status 1");
    rod_status = 2'b11; tick();
    check(state_o == ON && rod_ctrl == 2'b11 && !fault, "on");
  endtask

  task automatic reset_seq();
    enable = 0; rod_status = 2'b00; tick();
    check(state_o == OFF && rod_ctrl == 2'b00, "off");
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tick(2);
    rst_n = 1;
    tick();
    check(state_o == OFF && rod_ctrl == 0, "reset");

    // waits for Hub power
    enable = 1; tick(4);
    check(state_o == OFF, "no power-up without Hub power");
    enable = 0; hub_power_good = 1; tick();

    power_up();
    tick(10);
    check(state_o == ON, "stays on");

    // status drop while on
    rod_status = 2'b01; tick();
    check(fault && rod_ctrl == 2'b00, "status drop -> fault");
    rod_status = 2'b11; tick(3);
    check(fault, "fault holds while enabled");
    reset_seq();

    // Hub power failure while on
    power_up();
    hub_power_good = 0; tick();
    check(fault && rod_ctrl == 2'b00, "hub power fail -> fault");
    hub_power_good = 1;
    reset_seq();

    // stage 1 timeout: exactly TO clocks in STAGE1
    enable = 1; tick();
    check(state_o == ST1, "stage 1 again");
    tick(TO);
    check(state_o == ST1, "not timed out yet");
    tick();
    check(fault, "stage 1 timeout");
    reset_seq();

    // stage 2 timeout
    enable = 1; tick();
    rod_status = 2'b01; tick();
    check(state_o == ST2, "stage 2 again");
    tick(TO);
    check(state_o == ST2, "stage 2 not timed out yet");
    tick();
    check(fault, "stage 2 timeout");
    reset_seq();

    // enable cleared mid-sequence switches off
    enable = 1; tick(); rod_status = 2'b01; tick();
    enable = 0; tick();
    check(state_o == OFF && rod_ctrl == 0, "abort");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
