// tb_rpg_checker: self-checking test of the runtime pin grounding check.
// With all 164 unused pins low, pins_grounded stays 1 and pin_alarm 0. Then each single
// pin in turn is driven high for one cycle (with a reset in between): pins_grounded must
// drop in the following cycle and pin_alarm must rise and stay up after the pin is low
// again. A pattern with several pins high is also checked.
module tb_rpg_checker;
  localparam int unsigned NU = 164;
  logic clk = 0, rst_n = 0;
  logic [NU-1:0] unused_pins = '0;
  logic pins_grounded, pin_alarm;
  int checks = 0, failures = 0;

  rpg_checker #(.NUM_UNUSED(NU)) dut (.clk, .rst_n, .unused_pins, .pins_grounded, .pin_alarm);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what, input int pin);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s pin=%0d grounded=%b alarm=%b", what, pin, pins_grounded, pin_alarm);
    end
  endtask

  initial begin
    @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < 20; i++) begin
      @(posedge clk); #1;
      chk(pins_grounded && !pin_alarm, "all grounded", -1);
    end
    for (int p = 0; p < NU; p++) begin
      unused_pins = '0;
      unused_pins[p] = 1'b1;
      @(posedge clk); #1;
      chk(!pins_grounded && pin_alarm, "pin high detected", p);
      unused_pins = '0;
      @(posedge clk); #1;
      chk(pins_grounded && pin_alarm, "alarm sticky", p);
      rst_n = 0;
      @(posedge clk); #1;
      chk(!pin_alarm, "reset clears alarm", p);
      rst_n = 1;
      @(posedge clk); #1;
      chk(pins_grounded && !pin_alarm, "clean after reset", p);
    end
    unused_pins = {NU{1'b1}};
    @(posedge clk); #1;
    chk(!pins_grounded && pin_alarm, "all pins high", -1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
