// hmtd_pkg: constants and helpers shared by the hardware moving target defence
// (HMTD) blocks and the secure top level.
//
// The replaced legacy part is a 16x16 multiplier (the c6288 benchmark function), so the
// replica input width is 32 bits (two 16-bit operands) and the output width is 32 bits.
// The replica count and the random word width are this design's own choices; the
// design only requires at least two replicas so that a pair can be compared.
package hmtd_pkg;

  // Operand width of one multiplier input (c6288: two 16-bit operands).
  localparam int unsigned OP_W     = 16;
  // N-bit input from legacy unit U2 and M-bit output to legacy unit U1.
  localparam int unsigned N_IN     = 2 * OP_W;
  localparam int unsigned M_OUT    = 2 * OP_W;
  // Number of MTR replicas CP_0 .. CP_{NUM_REP-1}.
  localparam int unsigned NUM_REP  = 4;
  // Width of the on-chip random number generator.
  localparam int unsigned RND_W    = 16;
  // Nexys-3 (XC6SLX16-CSG324) user I/O pins, and the pins the top level uses:
  // 32 inputs + 32 outputs + clk + rst_n + trojan_flag + pin_alarm.
  localparam int unsigned USER_IO    = 232;
  localparam int unsigned USED_IO    = N_IN + M_OUT + 4;
  localparam int unsigned NUM_UNUSED = USER_IO - USED_IO;

  // Map a random word to two distinct replica indices.
  //   first  = low half  mod n
  //   second = (first + 1 + (high half mod (n-1))) mod n
  // The offset lies in 1 .. n-1, so the two indices always differ.
  function automatic void pick_pair(input logic [RND_W-1:0] rnd, input int unsigned n,
                                    output int unsigned first, output int unsigned second);
    int unsigned lo, hi;
    lo     = int'(rnd[RND_W/2-1:0]);
    hi     = int'(rnd[RND_W-1:RND_W/2]);
    first  = lo % n;
    second = (first + 1 + (hi % (n - 1))) % n;
  endfunction

endpackage
