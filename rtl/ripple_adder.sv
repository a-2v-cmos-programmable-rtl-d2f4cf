// ripple_adder - W-bit ripple-carry adder built from a chain of full adders.
//
// s = a + b + ci modulo 2^W; the carry out of the top bit is dropped, so the
// result wraps like two's complement arithmetic. The ripple structure trades
// speed for low power, as in the reference design. Purely combinational.
module ripple_adder #(
  parameter int W = 9
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         ci,
  output logic [W-1:0] s
);

  logic [W-1:0] c;   // c[i] = carry into bit i

  assign c[0] = ci;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i] = a[i] ^ b[i] ^ c[i];
    if (i < W - 1) begin : g_carry
      assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
    end
  end

endmodule
