// secure_mtr_top: FPGA replacement of an obsolete legacy part, hardened against Trojans
// placed by an untrusted FPGA vendor or CAD tool.
//
// Two countermeasures sit between legacy unit U2 (which drives the operands) and legacy
// unit U1 (which takes the result):
//   * Runtime pin grounding (RPG): every unused user I/O pin comes in on unused_pins
//     (pulled down by the pin constraints) and rpg_checker NORs them every clock;
//     pin_alarm rises if any pin is not at ground.
//   * Hardware moving target defence (HMTD): NUM_REP replicas of the module-to-replace
//     (mtr_c6288, a 16x16 multiplier) are built. Each clock lfsr_rng gives a new random
//     word; rin_unit turns it into two distinct replica indices and feeds the operands to
//     those two replicas only; rout_unit picks their outputs; ccu compares them, drives
//     the result to U1 when they agree and grounds the output and raises trojan_flag for
//     good when they differ.
// The placement of the replicas far apart on the die is a constraint-file matter and is
// not expressed here; keep the g_cp[k] instances separate (no sharing) when placing.
//
// Timing: operands presented before a rising clock edge give u1_p after that edge (one
// register stage in ccu); the replica pair used for them is the one selected by the
// random word held during that cycle. The random word advances every clock.
// Replica count, seed, per-cycle reselection and the separate pin alarm are this design's
// choices. The RPG's per-cycle pins_grounded status stays internal (u_rpg.pins_grounded)
// so that the pin budget is exactly the 232 user I/O pins; only the sticky alarm is a port.
module secure_mtr_top #(
  parameter int unsigned                  NUM_REP    = hmtd_pkg::NUM_REP,
  parameter int unsigned                  NUM_UNUSED = hmtd_pkg::NUM_UNUSED,
  parameter logic [hmtd_pkg::RND_W-1:0]   SEED       = 16'hACE1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // From legacy unit U2
  input  logic [hmtd_pkg::OP_W-1:0]   u2_a,
  input  logic [hmtd_pkg::OP_W-1:0]   u2_b,
  // To legacy unit U1
  output logic [hmtd_pkg::M_OUT-1:0]  u1_p,
  // Unused, pulled-down user I/O pins under runtime checking
  input  logic [NUM_UNUSED-1:0]       unused_pins,
  // Status
  output logic                        trojan_flag,
  output logic                        pin_alarm
);
  import hmtd_pkg::*;

  localparam int unsigned SEL_W = (NUM_REP > 1) ? $clog2(NUM_REP) : 1;

  logic [RND_W-1:0]                rnd;
  logic [NUM_REP-1:0][N_IN-1:0]    rep_in;
  logic [NUM_REP-1:0][M_OUT-1:0]   rep_out;
  logic [SEL_W-1:0]                sel_a, sel_b;
  logic [M_OUT-1:0]                out_a, out_b;
  logic                            pins_grounded;

  // ---------------- Runtime pin grounding ----------------
  rpg_checker #(.NUM_UNUSED(NUM_UNUSED)) u_rpg (
    .clk, .rst_n, .unused_pins, .pins_grounded, .pin_alarm
  );

  // ---------------- Hardware moving target defence ----------------
  lfsr_rng #(.WIDTH(RND_W), .SEED(SEED)) u_rng (
    .clk, .rst_n, .en(1'b1), .rnd
  );

  rin_unit #(.N_IN(N_IN), .NUM_REP(NUM_REP), .RND_W(RND_W)) u_rin (
    .rnd, .din({u2_b, u2_a}), .rep_in, .sel_a, .sel_b
  );

  // Identical replicas must stay separate copies: merging them would defeat the scheme.
  for (genvar k = 0; k < NUM_REP; k++) begin : g_cp
    (* keep_hierarchy = "yes" *)
    mtr_c6288 #(.W(OP_W)) u_cp (
      .a(rep_in[k][OP_W-1:0]),
      .b(rep_in[k][N_IN-1:OP_W]),
      .p(rep_out[k])
    );
  end

  rout_unit #(.M_OUT(M_OUT), .NUM_REP(NUM_REP)) u_rout (
    .rep_out, .sel_a, .sel_b, .out_a, .out_b
  );

  ccu #(.M_OUT(M_OUT)) u_ccu (
    .clk, .rst_n, .out_a, .out_b, .dout(u1_p), .trojan_flag
  );

endmodule
