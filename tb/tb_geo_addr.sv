// tb_geo_addr: self-checking test of the geographic address and Hub slot decode.
//
// For every logical slot 0..15 and random shelf addresses it checks the packing
// {shelf[3:0], slot[3:0]}, the valid flag following the shelf-valid bit, the Hub-1 decode
// (logical slot 1 only) and the latency: three clocks from the address pins, one clock from
// the shelf register.
module tb_geo_addr;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [7:0] ha = '0, shelf_addr = '0;
  logic shelf_valid = 1'b0;
  logic [7:0] ga;
  logic ga_valid, is_hub1;
  logic [3:0] slot;

  int checks = 0, failures = 0;

  geo_addr #(.GA_W(8)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s ha=%h shelf=%h ga=%h", what, ha, shelf_addr, ga);
    end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    check(ga == 0 && !ga_valid && !is_hub1, "reset");
    rst_n = 1;
    for (int s = 0; s < 16; s++) begin
      logic [7:0] old_ga;
      logic old_hub1;
      old_ga = ga; old_hub1 = is_hub1;
      ha = {4'($urandom), 4'(s)};
      @(negedge clk);
      check(ga == old_ga && is_hub1 == old_hub1, "no change after 1 clock");
      @(negedge clk);
      check(ga == old_ga, "no change after 2 clocks");
      @(negedge clk);
      check(slot == 4'(s), "slot after 3 clocks");
      check(is_hub1 == (s == 1), "hub1 decode");
      check(ga[3:0] == 4'(s), "ga slot field");
      // shelf address: one clock
      shelf_addr = 8'($urandom);
      shelf_valid = 1'($urandom);
      @(negedge clk);
      check(ga == {shelf_addr[3:0], 4'(s)}, "ga packing");
      check(ga_valid == shelf_valid, "ga valid");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
