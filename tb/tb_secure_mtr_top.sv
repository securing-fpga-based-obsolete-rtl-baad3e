// tb_secure_mtr_top: end-to-end test of the secured replacement at its default size
// (4 replicas of the 16x16 multiplier, 164 unused pins under runtime checking).
//
// The testbench plays the legacy units: it drives random operands as U2 and checks, as
// U1, that each result arrives one clock later. It keeps its own model of the random
// generator and of the pair mapping, so it predicts for every cycle which two replicas
// are compared, without looking at the design's selection.
// Hardware Trojans are modelled by forcing one product bit of a replica to 1 (an
// always-on payload that corrupts the result whenever that bit should be 0).
// Scenarios, each started from reset:
//   1. clean run: results pass, every pair is used, unselected replicas are gated to 0;
//   2. Trojan in one replica: it goes unnoticed while that replica is idle (bypass of an
//      idle copy), is detected the first cycle it is compared with a corrupted result,
//      after which the output is grounded and the flag stays on;
//   3. the same Trojan in two replicas: when exactly these two are paired the corrupted
//      result passes (collusion bypass), when one is paired with a clean copy it is caught;
//   4. an unused pin driven high: the pin alarm rises; the datapath keeps working.
// Each mechanism is counted; one that never happens is a failure.
module tb_secure_mtr_top;
  import hmtd_pkg::*;

  localparam logic [15:0] SEED = 16'hACE1;
  localparam int unsigned TBIT = 5;         // product bit the Trojan payload sets

  logic clk = 0, rst_n = 0;
  logic [15:0] u2_a = '0, u2_b = '0;
  logic [31:0] u1_p;
  logic [NUM_UNUSED-1:0] unused_pins = '0;
  logic trojan_flag, pin_alarm;

  int checks = 0, failures = 0;
  int cycles = 0;

  // mechanism counters
  int n_pair_seen = 0, n_gated = 0, n_idle_bypass = 0, n_detect = 0, n_grounded = 0;
  int n_collusion_bypass = 0, n_pin_alarm = 0, n_pass = 0;

  secure_mtr_top dut (
    .clk, .rst_n, .u2_a, .u2_b, .u1_p, .unused_pins, .trojan_flag, .pin_alarm
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // ---------------- reference models ----------------
  logic [15:0] m_rnd;
  bit          m_flag;
  bit          troj [NUM_REP];
  bit          seen_pair [NUM_REP][NUM_REP];

  function automatic logic [15:0] lfsr_step(input logic [15:0] s);
    return (s >> 1) ^ (s[0] ? 16'hB400 : 16'h0000);
  endfunction

  function automatic void model_pair(input logic [15:0] r, output int x, output int y);
    x = int'(r[7:0]) % NUM_REP;
    y = (x + 1 + int'(r[15:8]) % (NUM_REP - 1)) % NUM_REP;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 15) $display("FAIL %s at cycle %0d u1_p=%h flag=%b", what, cycles, u1_p, trojan_flag);
    end
  endtask

  task automatic do_reset();
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    m_rnd  = SEED;
    m_flag = 0;
    chk(u1_p == '0 && !trojan_flag && !pin_alarm, "reset state");
  endtask

  // One operation: drive operands, check gating before the edge, check the result after.
  task automatic one_op(input logic [15:0] a, input logic [15:0] b);
    int x, y;
    logic [31:0] truth, vx, vy, want;
    bit mism;
    u2_a = a; u2_b = b;
    model_pair(m_rnd, x, y);
    #1;
    // input gating: exactly the two selected replicas see the operands
    for (int k = 0; k < NUM_REP; k++) begin
      if (k == x || k == y) chk(dut.rep_in[k] == {b, a}, "selected replica fed");
      else begin
        chk(dut.rep_in[k] == '0, "unselected replica gated");
        n_gated++;
      end
    end
    if (!seen_pair[x][y]) n_pair_seen++;
    seen_pair[x][y] = 1;
    truth = 32'(a) * 32'(b);
    vx = troj[x] ? (truth | (32'(1) << TBIT)) : truth;
    vy = troj[y] ? (truth | (32'(1) << TBIT)) : truth;
    mism = (vx != vy);
    if (m_flag || mism) want = '0;
    else want = vx;
    // bookkeeping of what happened this cycle
    if (!m_flag && mism) n_detect++;
    if (m_flag) n_grounded++;
    if (!m_flag && !mism && vx != truth) n_collusion_bypass++;
    if (!m_flag && !mism && vx == truth) begin
      n_pass++;
      for (int k = 0; k < NUM_REP; k++)
        if (troj[k] && k != x && k != y) begin n_idle_bypass++; break; end
    end
    @(posedge clk);
    m_flag = m_flag || mism;
    m_rnd  = lfsr_step(m_rnd);
    #1;
    chk(u1_p == want, "result to U1");
    chk(trojan_flag == m_flag, "trojan flag");
  endtask

  initial begin
    int det_cycle;
    @(posedge clk); #1;
    // ---------- 1: clean ----------
    do_reset();
    for (int n = 0; n < 2000; n++) one_op(16'($urandom), 16'($urandom));
    chk(!trojan_flag, "no false alarm");
    // ---------- 2: one Trojan in replica 2 ----------
    do_reset();
    force dut.g_cp[2].u_cp.p[TBIT] = 1'b1;
    troj[2] = 1;
    for (int n = 0; n < 300; n++) one_op(16'($urandom), 16'($urandom));
    chk(trojan_flag, "single Trojan detected");
    release dut.g_cp[2].u_cp.p[TBIT];
    troj[2] = 0;
    // ---------- 3: identical Trojan in replicas 1 and 3 ----------
    // With a = 1 and bit TBIT of b clear, bit TBIT of the product is 0, so every
    // cycle that compares a Trojan copy shows its payload.
    do_reset();
    force dut.g_cp[1].u_cp.p[TBIT] = 1'b1;
    force dut.g_cp[3].u_cp.p[TBIT] = 1'b1;
    troj[1] = 1; troj[3] = 1;
    for (int n = 0; n < 300; n++) one_op(16'h0001, 16'($urandom) & ~(16'(1) << TBIT));
    release dut.g_cp[1].u_cp.p[TBIT];
    release dut.g_cp[3].u_cp.p[TBIT];
    troj[1] = 0; troj[3] = 0;
    // ---------- 4: runtime pin check ----------
    do_reset();
    for (int n = 0; n < 20; n++) one_op(16'($urandom), 16'($urandom));
    chk(!pin_alarm, "pins grounded");
    unused_pins[NUM_UNUSED/2] = 1'b1;
    one_op(16'($urandom), 16'($urandom));
    chk(pin_alarm, "pin alarm raised");
    if (pin_alarm) n_pin_alarm++;
    unused_pins = '0;
    for (int n = 0; n < 20; n++) one_op(16'($urandom), 16'($urandom));
    chk(pin_alarm, "pin alarm held");

    // ---------- mechanism coverage ----------
    $display("pairs=%0d gated=%0d pass=%0d idle_bypass=%0d detect=%0d grounded=%0d collusion_bypass=%0d pin_alarm=%0d",
             n_pair_seen, n_gated, n_pass, n_idle_bypass, n_detect, n_grounded,
             n_collusion_bypass, n_pin_alarm);
    chk(n_pair_seen == NUM_REP * (NUM_REP - 1), "every ordered pair used");
    chk(n_gated > 0, "input gating happened");
    chk(n_idle_bypass > 0, "Trojan in an idle replica happened");
    chk(n_detect >= 2, "Trojan detection happened in scenarios 2 and 3");
    chk(n_grounded > 0, "output grounding happened");
    chk(n_collusion_bypass > 0, "colluding pair happened");
    chk(n_pin_alarm > 0, "pin alarm happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired after %0d cycles", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
