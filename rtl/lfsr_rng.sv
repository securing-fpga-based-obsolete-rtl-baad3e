// lfsr_rng: low-cost on-chip random number generator for replica selection.
//
// The HMTD scheme needs a random source on the FPGA itself so that the pair of replicas
// that is compared changes at run time and cannot be predicted when the bitstream is
// built. The design uses a Galois linear-feedback shift register: each enabled clock the
// register shifts right by one and, if the bit shifted out was 1, XORs in the tap mask.
// With the default 16-bit width and taps 0xB400 (x^16+x^14+x^13+x^11+1) the sequence has
// the maximal period 65535. The generator kind, width and seed are this design's choices.
//
// Interface: clk, synchronous active-low rst_n (loads SEED; a zero SEED is replaced by 1
// so the register cannot lock at zero), en (advance), rnd (current state, registered).
module lfsr_rng #(
  parameter int unsigned     WIDTH = 16,
  parameter logic [WIDTH-1:0] TAPS = 16'hB400,
  parameter logic [WIDTH-1:0] SEED = 16'hACE1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  output logic [WIDTH-1:0] rnd
);

  localparam logic [WIDTH-1:0] SEED_NZ = (SEED == '0) ? WIDTH'(1) : SEED;

  always_ff @(posedge clk) begin
    if (!rst_n)
      rnd <= SEED_NZ;
    else if (en)
      rnd <= (rnd >> 1) ^ (rnd[0] ? TAPS : '0);
  end

  // A correctly seeded LFSR never reaches the all-zero state.
  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) rnd != '0);

endmodule
