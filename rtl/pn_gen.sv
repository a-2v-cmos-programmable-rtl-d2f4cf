// pn_gen - PN (pseudo-noise) chip generator, a Fibonacci LFSR of order R.
//
// The register holds the last R chips, s[0] the newest. On each 'step' a new
// chip b[n] = XOR of the chips selected by TAPS_MASK is shifted in. With the
// default R = 4 and TAPS_MASK = 4'b1100 the recurrence is
// b[n] = b[n-3] ^ b[n-4] (polynomial x^4 + x^3 + 1, primitive), giving an
// m-sequence of period 2^4 - 1 = 15 with 8 ones and 7 zeros. The order follows
// the reference design's coefficient count; the polynomial and the seed are
// this design's choice. pn_bit is the newest chip (1 means +1). Reset loads
// SEED, which must be non-zero.
module pn_gen #(
  parameter int         R         = pddmf_pkg::PN_ORDER_DEF,
  parameter logic [R-1:0] TAPS_MASK = 4'b1100,
  parameter logic [R-1:0] SEED      = 4'b0001
) (
  input  logic clk,
  input  logic rst_n,
  input  logic step,
  output logic pn_bit
);

  logic [R-1:0] s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    s <= SEED;
    else if (step) s <= {s[R-2:0], ^(s & TAPS_MASK)};
  end

  assign pn_bit = s[0];

endmodule
