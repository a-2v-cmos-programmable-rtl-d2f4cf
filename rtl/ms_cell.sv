// ms_cell - multiply part of one multiply-and-sum (M&S) cell.
//
// Multiplies a D_W-bit two's complement sample d by the cell's coefficient
// without a multiplier. For SHIFT = 1 (coefficients 0, +2, -2) the sample is
// shifted left by one with a constant 0 as new LSB; for SHIFT = 0 (the two end
// coefficients, +-1) it is only sign-extended by one bit. The D_W+1 bits are
// XORed with c.neg (one's complement), gated by c.en (0 gives a zero
// coefficient) and sign-extended to ACC_W bits. The +1 that completes the
// negation is not added here: it leaves as cin, the carry-in of the stage's
// ripple adder, so p + cin = coefficient * d.
//
// The XOR / AND / carry-in arrangement follows the reference cell for +-2;
// the SHIFT = 0 variant for the end cells is this design's own addition.
// Purely combinational.
module ms_cell
  import pddmf_pkg::*;
#(
  parameter int D_W   = pddmf_pkg::D_W_DEF,
  parameter int ACC_W = pddmf_pkg::ACC_W_DEF,
  parameter bit SHIFT = 1'b1
) (
  input  logic [D_W-1:0]   d,
  input  coef_t            c,
  output logic [ACC_W-1:0] p,
  output logic             cin
);

  logic [D_W:0] scaled;   // d * 1 or d * 2, D_W+1 bits
  logic [D_W:0] gated;

  always_comb begin
    if (SHIFT) scaled = {d, 1'b0};
    else       scaled = {d[D_W-1], d};
    gated = (scaled ^ {(D_W+1){c.neg}}) & {(D_W+1){c.en}};
    p     = {{(ACC_W-D_W-1){gated[D_W]}}, gated};
    cin   = c.cin & c.en;
  end

endmodule
