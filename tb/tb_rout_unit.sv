// tb_rout_unit: self-checking test of the output selection unit Rout.
// Loads random outputs for four replicas, walks through every (sel_a, sel_b) pair and
// random pairs, and checks that out_a and out_b are the outputs of the named replicas.
module tb_rout_unit;
  localparam int unsigned M = 32;
  logic [3:0][M-1:0] rep_out;
  logic [1:0] sel_a, sel_b;
  logic [M-1:0] out_a, out_b;
  int checks = 0, failures = 0;

  rout_unit #(.M_OUT(M), .NUM_REP(4)) dut (.rep_out, .sel_a, .sel_b, .out_a, .out_b);

  task automatic apply(input logic [1:0] x, input logic [1:0] y);
    logic [M-1:0] want_a, want_b;
    sel_a = x; sel_b = y;
    #1;
    want_a = rep_out[x];
    want_b = rep_out[y];
    checks += 2;
    if (out_a !== want_a) begin failures++; $display("FAIL out_a sel=%0d", x); end
    if (out_b !== want_b) begin failures++; $display("FAIL out_b sel=%0d", y); end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      for (int k = 0; k < 4; k++) rep_out[k] = M'($urandom);
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++)
        if (i != j) apply(2'(i), 2'(j));
      apply(2'($urandom), 2'($urandom));
    end
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
