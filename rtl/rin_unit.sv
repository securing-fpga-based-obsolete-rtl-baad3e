// rin_unit: HMTD input unit (Rin).
//
// From the current random word it picks two distinct replicas, sel_a and sel_b, and feeds
// the N-bit input coming from legacy unit U2 to those two replicas only. Every other
// replica sees an all-zero input, so it does not switch: this is the input (power)
// gating of the scheme. The pair mapping is hmtd_pkg::pick_pair (low half of the random
// word mod NUM_REP for the first index, a nonzero offset from the high half for the
// second). Zero as the gated value and the mapping are this design's choices.
//
// Interface: rnd (random word), din (from U2), rep_in[k] (input of replica k), sel_a and
// sel_b (to Rout). Combinational; the selection changes whenever rnd does.
// The replicas built here are combinational, so no state restore is needed when a
// replica is gated off and on again.
module rin_unit #(
  parameter int unsigned N_IN    = hmtd_pkg::N_IN,
  parameter int unsigned NUM_REP = hmtd_pkg::NUM_REP,
  parameter int unsigned RND_W   = hmtd_pkg::RND_W,
  localparam int unsigned SEL_W  = (NUM_REP > 1) ? $clog2(NUM_REP) : 1
) (
  input  logic [RND_W-1:0]              rnd,
  input  logic [N_IN-1:0]               din,
  output logic [NUM_REP-1:0][N_IN-1:0]  rep_in,
  output logic [SEL_W-1:0]              sel_a,
  output logic [SEL_W-1:0]              sel_b
);

  always_comb begin
    int unsigned fa, fb;
    hmtd_pkg::pick_pair(rnd, NUM_REP, fa, fb);
    sel_a = SEL_W'(fa);
    sel_b = SEL_W'(fb);
    for (int k = 0; k < NUM_REP; k++)
      rep_in[k] = (k == int'(fa) || k == int'(fb)) ? din : '0;
  end

  // The two compared replicas must be different copies.
  a_distinct: assert final (sel_a != sel_b);

endmodule
