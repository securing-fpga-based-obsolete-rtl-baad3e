// tb_rin_unit: self-checking test of the input gating unit Rin.
// For random words and inputs it recomputes the replica pair independently (low byte mod
// NUM_REP, then a nonzero offset from the high byte), and checks sel_a, sel_b, that the
// two selected replicas receive the input and that every other replica receives zero.
// It also checks that every one of the NUM_REP*(NUM_REP-1) ordered pairs occurs.
// Run at the default of 4 replicas and, with a second instance, at 3 replicas.
module tb_rin_unit;
  localparam int unsigned N_IN = 32;
  int checks = 0, failures = 0;

  logic [15:0]   rnd;
  logic [N_IN-1:0] din;

  logic [3:0][N_IN-1:0] rep_in4;
  logic [1:0]           sa4, sb4;
  logic [2:0][N_IN-1:0] rep_in3;
  logic [1:0]           sa3, sb3;

  rin_unit #(.N_IN(N_IN), .NUM_REP(4), .RND_W(16)) dut4 (
    .rnd, .din, .rep_in(rep_in4), .sel_a(sa4), .sel_b(sb4));
  rin_unit #(.N_IN(N_IN), .NUM_REP(3), .RND_W(16)) dut3 (
    .rnd, .din, .rep_in(rep_in3), .sel_a(sa3), .sel_b(sb3));

  bit seen4 [4][4];
  bit seen3 [3][3];

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s rnd=%h", what, rnd);
    end
  endtask

  initial begin
    int ea, eb;
    for (int n = 0; n < 5000; n++) begin
      rnd = 16'($urandom);
      din = N_IN'($urandom);
      #1;
      // four replicas
      ea = int'(rnd[7:0]) % 4;
      eb = (ea + 1 + int'(rnd[15:8]) % 3) % 4;
      chk(sa4 == 2'(ea) && sb4 == 2'(eb), "pair of 4");
      chk(sa4 != sb4, "distinct of 4");
      for (int k = 0; k < 4; k++)
        chk(rep_in4[k] == ((k == ea || k == eb) ? din : '0), "gating of 4");
      seen4[sa4][sb4] = 1;
      // three replicas
      ea = int'(rnd[7:0]) % 3;
      eb = (ea + 1 + int'(rnd[15:8]) % 2) % 3;
      chk(int'(sa3) == ea && int'(sb3) == eb, "pair of 3");
      for (int k = 0; k < 3; k++)
        chk(rep_in3[k] == ((k == ea || k == eb) ? din : '0), "gating of 3");
      seen3[sa3][sb3] = 1;
    end
    for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
      if (i != j) chk(seen4[i][j], "pair coverage 4");
    for (int i = 0; i < 3; i++) for (int j = 0; j < 3; j++)
      if (i != j) chk(seen3[i][j], "pair coverage 3");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
