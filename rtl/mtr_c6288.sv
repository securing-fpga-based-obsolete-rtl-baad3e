// mtr_c6288: module-to-replace, one replica of the obsolete legacy part.
//
// Functionally the ISCAS'85 c6288 benchmark: an unsigned W x W multiplier, p = a * b.
// Like c6288 it is built as an array multiplier: the partial-product rows are reduced
// one at a time by a row of full adders in carry-save form; after each row the lowest
// sum bit is a finished product bit, and a final ripple-carry adder merges the last
// sum and carry vectors into the upper W product bits. Exact gate netlist of the
// benchmark is not reproduced, only its function and array organisation.
//
// Interface: a, b (W bits each) in, p (2W bits) out. Purely combinational, no clock.
// The HMTD top instantiates several copies of this module; each copy is a replica CP_k.
module mtr_c6288 #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // One-bit full adder as a function: returns {carry, sum}.
  function automatic logic [1:0] fa(input logic x, input logic y, input logic z);
    return {(x & y) | (x & z) | (y & z), x ^ y ^ z};
  endfunction

  always_comb begin
    logic [W-1:0] s, c, ns, nc;
    logic [W-1:0] hi_s;
    logic         rc;
    logic [1:0]   r;

    p = '0;
    // Row 0: partial products a[j] & b[0], no carries yet.
    s = a & {W{b[0]}};
    c = '0;
    p[0] = s[0];
    // Rows 1 .. W-1: before row i, s[j] has weight 2^(i-1+j) and c[j] weight 2^(i+j).
    for (int i = 1; i < W; i++) begin
      for (int j = 0; j < W; j++) begin
        r     = fa(a[j] & b[i], (j < W-1) ? s[j+1] : 1'b0, c[j]);
        ns[j] = r[0];
        nc[j] = r[1];
      end
      s    = ns;
      c    = nc;
      p[i] = s[0];
    end
    // Final ripple-carry adder: {0, s[W-1:1]} + c gives product bits W .. 2W-1.
    hi_s = {1'b0, s[W-1:1]};
    rc   = 1'b0;
    for (int j = 0; j < W; j++) begin
      r      = fa(hi_s[j], c[j], rc);
      p[W+j] = r[0];
      rc     = r[1];
    end
  end

endmodule
