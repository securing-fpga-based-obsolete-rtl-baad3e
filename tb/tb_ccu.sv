// tb_ccu: self-checking test of the consistency checking unit.
// Phase 1: equal inputs for many cycles; dout must follow one cycle later, flag low.
// Phase 2: one mismatching cycle; in the next cycle dout must be zero and the flag set,
// and both must stay so while the inputs agree again (termination until reset).
// Phase 3: reset clears the flag and normal operation resumes.
module tb_ccu;
  localparam int unsigned M = 32;
  logic clk = 0, rst_n = 0;
  logic [M-1:0] out_a = '0, out_b = '0, dout;
  logic trojan_flag;
  int checks = 0, failures = 0;
  int cycles = 0;

  ccu #(.M_OUT(M)) dut (.clk, .rst_n, .out_a, .out_b, .dout, .trojan_flag);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at cycle %0d dout=%h flag=%b", what, cycles, dout, trojan_flag);
    end
  endtask

  task automatic run_equal(input int n);
    logic [M-1:0] v;
    for (int i = 0; i < n; i++) begin
      v = M'($urandom) | 1;
      out_a = v; out_b = v;
      @(posedge clk); #1;
      chk(dout == v && !trojan_flag, "match passes through");
    end
  endtask

  initial begin
    logic [M-1:0] v;
    @(posedge clk); #1;
    chk(dout == '0 && !trojan_flag, "reset state");
    rst_n = 1;
    run_equal(200);
    // Single mismatch in one bit
    v = M'($urandom);
    out_a = v; out_b = v ^ (M'(1) << ($urandom % M));
    @(posedge clk); #1;
    chk(dout == '0, "grounded on mismatch");
    chk(trojan_flag, "flag on mismatch");
    // Inputs agree again: still terminated
    for (int i = 0; i < 50; i++) begin
      v = M'($urandom) | 1;
      out_a = v; out_b = v;
      @(posedge clk); #1;
      chk(dout == '0 && trojan_flag, "stays terminated");
    end
    // Reset and resume
    rst_n = 0;
    @(posedge clk); #1;
    chk(!trojan_flag && dout == '0, "reset clears");
    rst_n = 1;
    run_equal(50);
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
