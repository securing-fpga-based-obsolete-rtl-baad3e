// rout_unit: HMTD output unit (Rout).
//
// Two multiplexers controlled by the same random selection as Rin: out_a is the M-bit
// output of replica sel_a and out_b that of replica sel_b. Both go to the consistency
// checking unit. Combinational.
module rout_unit #(
  parameter int unsigned M_OUT   = hmtd_pkg::M_OUT,
  parameter int unsigned NUM_REP = hmtd_pkg::NUM_REP,
  localparam int unsigned SEL_W  = (NUM_REP > 1) ? $clog2(NUM_REP) : 1
) (
  input  logic [NUM_REP-1:0][M_OUT-1:0] rep_out,
  input  logic [SEL_W-1:0]              sel_a,
  input  logic [SEL_W-1:0]              sel_b,
  output logic [M_OUT-1:0]              out_a,
  output logic [M_OUT-1:0]              out_b
);

  always_comb begin
    out_a = '0;
    out_b = '0;
    for (int k = 0; k < NUM_REP; k++) begin
      if (SEL_W'(k) == sel_a) out_a = rep_out[k];
      if (SEL_W'(k) == sel_b) out_b = rep_out[k];
    end
  end

endmodule
