// tb_trojan_bypass: Trojan bypass rate of the secured replacement against the number of
// inserted Trojans and the size of the FPGA.
//
// The bypass rate is the number of wrong results delivered to U1 because of Trojans,
// divided by the number of test cases. Per trial the testbench resets the design, then
// places T Trojans in random slices of an FPGA of S_FPGA slices; a Trojan that falls into
// the S_REP slices of one of the NUM_REP replicas makes that replica's result wrong by a
// fixed payload (all Trojans carry the same payload, as a tool that knows the design can
// insert the same Trojan into several copies). Trojans in other slices do nothing here.
// The replica outputs are overridden with force: each replica's output is the product of
// its own (gated) inputs, XORed with the payload when it holds a Trojan. The rest of the
// design (random generator, Rin, Rout, CCU) is the real RTL.
// Each trial runs CASES random operations. A colluding pair (both replicas with a Trojan)
// lets a wrong result through; a pair with exactly one Trojan makes the CCU ground the
// outputs and stop, after which no wrong result is delivered.
// Self-checks: every cycle's result and flag match the testbench's own model; with a
// single Trojan the bypass rate is exactly 0; the rate at 10 Trojans exceeds that at 1;
// a larger FPGA (fewer collisions) does not give a higher summed rate than the smaller one.
// Sizes: S_FPGA = 2278 (the Spartan-6 XC6SLX16) and a larger 4556; S_REP = 150 slices per
// replica is an estimate for a 16x16 array multiplier, not a measured number.
module tb_trojan_bypass;
  import hmtd_pkg::*;

  localparam logic [15:0] SEED    = 16'hACE1;
  localparam logic [31:0] PAYLOAD = 32'h0000_0100;
  localparam int          S_REP   = 150;
  localparam int          TRIALS  = 300;
  localparam int          CASES   = 40;
  localparam int          MAX_T   = 10;

  logic clk = 0, rst_n = 0;
  logic [15:0] u2_a = '0, u2_b = '0;
  logic [31:0] u1_p;
  logic [NUM_UNUSED-1:0] unused_pins = '0;
  logic trojan_flag, pin_alarm;

  int checks = 0, failures = 0;
  int cycles = 0;

  secure_mtr_top dut (
    .clk, .rst_n, .u2_a, .u2_b, .u1_p, .unused_pins, .trojan_flag, .pin_alarm
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // Trojan-carrying replica outputs
  bit          has_troj [NUM_REP];
  logic [31:0] tv [NUM_REP];
  always_comb
    for (int k = 0; k < NUM_REP; k++)
      tv[k] = (32'(dut.rep_in[k][15:0]) * 32'(dut.rep_in[k][31:16])) ^ (has_troj[k] ? PAYLOAD : '0);

  for (genvar k = 0; k < NUM_REP; k++) begin : g_force
    initial force dut.g_cp[k].u_cp.p = tv[k];
  end

  logic [15:0] m_rnd;
  bit          m_flag;

  function automatic logic [15:0] lfsr_step(input logic [15:0] s);
    return (s >> 1) ^ (s[0] ? 16'hB400 : 16'h0000);
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at cycle %0d", what, cycles);
    end
  endtask

  // One trial: returns the number of wrong results delivered.
  task automatic trial(input int t, input int s_fpga, output int wrong, output bit detected);
    int x, y, slice;
    logic [31:0] truth, vx, vy, want;
    bit mism;
    for (int k = 0; k < NUM_REP; k++) has_troj[k] = 0;
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    // The design always restarts from its seed; let it run a random number of clean
    // cycles so that trials do not all see the same pair sequence.
    m_rnd = SEED;
    repeat ($urandom % 97) begin
      @(posedge clk);
      m_rnd = lfsr_step(m_rnd);
    end
    #1;
    // Insert the Trojans.
    for (int i = 0; i < t; i++) begin
      slice = int'($urandom % s_fpga);
      if (slice < NUM_REP * S_REP) has_troj[slice / S_REP] = 1;
    end
    m_flag   = 0;
    wrong    = 0;
    for (int n = 0; n < CASES; n++) begin
      u2_a = 16'($urandom); u2_b = 16'($urandom);
      x = int'(m_rnd[7:0]) % NUM_REP;
      y = (x + 1 + int'(m_rnd[15:8]) % (NUM_REP - 1)) % NUM_REP;
      truth = 32'(u2_a) * 32'(u2_b);
      vx = has_troj[x] ? truth ^ PAYLOAD : truth;
      vy = has_troj[y] ? truth ^ PAYLOAD : truth;
      mism = (vx != vy);
      want = (m_flag || mism) ? '0 : vx;
      @(posedge clk);
      m_flag = m_flag || mism;
      m_rnd  = lfsr_step(m_rnd);
      #1;
      chk(u1_p == want && trojan_flag == m_flag, "result and flag against model");
      if (!trojan_flag && u1_p != truth) wrong++;
    end
    detected = trojan_flag;
  endtask

  initial begin
    int sizes [2] = '{2278, 4556};
    int wrong, sum_wrong [2][MAX_T+1];
    real rate, total [2];
    bit det;
    int n_det = 0;
    @(posedge clk); #1;
    for (int s = 0; s < 2; s++) begin
      total[s] = 0;
      for (int t = 1; t <= MAX_T; t++) begin
        sum_wrong[s][t] = 0;
        for (int r = 0; r < TRIALS; r++) begin
          trial(t, sizes[s], wrong, det);
          sum_wrong[s][t] += wrong;
          if (det) n_det++;
        end
        rate = real'(sum_wrong[s][t]) / real'(TRIALS * CASES);
        total[s] += rate;
        $display("slices=%0d trojans=%0d bypass_rate=%f", sizes[s], t, rate);
      end
      chk(sum_wrong[s][1] == 0, "single Trojan never bypasses");
      chk(sum_wrong[s][MAX_T] > sum_wrong[s][1], "bypass grows with Trojan count");
    end
    chk(total[1] <= total[0], "larger FPGA no worse");
    chk(n_det > 0, "detections happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
