// diff_encoder - differential encoder: turns the code a_1..a_N into the N+1
// coefficients of the differential matched filter.
//
//   b_1 = a_1,  b_i = a_i - a_(i-1) (i = 2..N),  b_(N+1) = -a_N
//
// With a_i = +-1 the inner coefficients are 0 or +-2 and the end ones +-1.
// Each coefficient leaves as a coef_t for one M&S cell: en = 0 for a zero
// coefficient (adjacent chips equal), neg = cin = 1 for a negative one.
// coef[0] is b_1 (the cell next to the output), coef[N] is b_(N+1).
// The coding rule and the neg / cin / enable controls follow the reference
// design; that code bit 1 means +1 is this design's choice. Purely
// combinational.
module diff_encoder
  import pddmf_pkg::*;
#(
  parameter int N = pddmf_pkg::TAPS_DEF
) (
  input  logic  [N-1:0] code,
  output coef_t [N:0]   coef
);

  always_comb begin
    // b_1 = a_1: always non-zero, negative when a_1 = -1
    coef[0] = '{en: 1'b1, neg: ~code[0], cin: ~code[0]};
    // b_i = a_i - a_(i-1): -2 when a_i = -1 and a_(i-1) = +1
    for (int i = 1; i < N; i++) begin
      coef[i].en  = code[i] ^ code[i-1];
      coef[i].neg = (code[i] ^ code[i-1]) & ~code[i];
      coef[i].cin = (code[i] ^ code[i-1]) & ~code[i];
    end
    // b_(N+1) = -a_N: negative when a_N = +1
    coef[N] = '{en: 1'b1, neg: code[N-1], cin: code[N-1]};
  end

endmodule
