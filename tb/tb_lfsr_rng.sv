// tb_lfsr_rng: self-checking test of the replica-selection random number generator.
// A reference model in the testbench (right shift, XOR of 0xB400 when the
// shifted-out bit is 1) predicts every state after reset; the test also checks that the
// enable holds the state, that the state is never zero, and that the sequence returns to
// the seed after exactly 65535 steps and not before (maximal period).
module tb_lfsr_rng;
  localparam logic [15:0] SEED = 16'hACE1;
  logic clk = 0, rst_n = 0, en = 0;
  logic [15:0] rnd;
  int checks = 0, failures = 0;
  int cycles = 0;

  lfsr_rng #(.WIDTH(16), .SEED(SEED)) dut (.clk, .rst_n, .en, .rnd);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  function automatic logic [15:0] step(input logic [15:0] s);
    logic fb;
    fb = s[0];
    s  = {1'b0, s[15:1]};
    if (fb) s = s ^ 16'hB400;
    return s;
  endfunction

  task automatic expect_eq(input logic [15:0] got, input logic [15:0] want, input string what);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%h want=%h", what, got, want);
    end
  endtask

  initial begin
    logic [15:0] model;
    int period;
    repeat (2) @(posedge clk);
    #1 expect_eq(rnd, SEED, "reset value");
    rst_n = 1;
    // Hold while en = 0
    repeat (3) @(posedge clk);
    #1 expect_eq(rnd, SEED, "hold with en=0");
    // Step and compare with the reference model
    en = 1;
    model = SEED;
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk); #1;
      model = step(model);
      expect_eq(rnd, model, "sequence");
      checks++;
      if (rnd == 16'h0) failures++;
    end
    // Period: continue until the seed recurs
    period = 2000;
    while (rnd != SEED && period < 70000) begin
      @(posedge clk); #1;
      period++;
    end
    checks++;
    if (period != 65535) begin
      failures++;
      $display("FAIL period=%0d", period);
    end
    // Reset mid-run reloads the seed
    rst_n = 0;
    @(posedge clk); #1;
    expect_eq(rnd, SEED, "reset reload");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
