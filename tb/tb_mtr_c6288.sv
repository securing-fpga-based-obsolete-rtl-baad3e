// tb_mtr_c6288: self-checking test of the 16x16 array multiplier replica.
// Applies corner operands (0, 1, all ones, single bits, alternating patterns) and
// 20000 random pairs, and compares p with the product computed by the simulator's own
// 64-bit arithmetic. The block is combinational; a small delay separates stimulus and check.
module tb_mtr_c6288;
  localparam int unsigned W = 16;
  logic [W-1:0]   a, b;
  logic [2*W-1:0] p;
  int checks = 0, failures = 0;

  mtr_c6288 #(.W(W)) dut (.a, .b, .p);

  task automatic check(input logic [W-1:0] x, input logic [W-1:0] y);
    longint unsigned expv;
    a = x; b = y;
    #1;
    expv = longint'(x) * longint'(y);
    checks++;
    if (p !== expv[2*W-1:0]) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h p=%h exp=%h", x, y, p, expv[2*W-1:0]);
    end
  endtask

  initial begin
    logic [W-1:0] corners [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000,
                                  16'h5555, 16'hAAAA, 16'h00FF, 16'h7FFF};
    foreach (corners[i]) foreach (corners[j]) check(corners[i], corners[j]);
    for (int i = 0; i < W; i++) for (int j = 0; j < W; j++) check(W'(1) << i, W'(1) << j);
    for (int n = 0; n < 20000; n++) check(W'($urandom), W'($urandom));
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
