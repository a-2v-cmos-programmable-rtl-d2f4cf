// pddmf_core - datapath of the pipelined digital differential matched filter.
//
// The ordinary oversampled matched filter correlates the last TAPS*OSR samples
// with the code, each chip a_k repeated over OSR samples:
//   y(t) = sum_{j=0}^{TAPS*OSR-1} a_(j/OSR+1) * x(t-j)
// Its first difference y(t) - y(t-1) only has non-zero coefficients where the
// repeated code changes, at j = 0, OSR, 2*OSR, ..., TAPS*OSR:
//   D(t) = sum_{k=1}^{TAPS+1} b_k * x(t-(k-1)*OSR)
// with b_k from the differential encoder (0, +-2 inside, +-1 at the ends).
// This core computes D(t) with a transposed (pipelined) FIR: the registered
// sample is broadcast to TAPS+1 adder stages, each adding its product to the
// partial sum coming from its right and passing it left through OSR registers,
// so no multi-input adder and no long carry path exist and the clock rate does
// not depend on the code length. The accumulator then rebuilds
// y(t) = D(t) + y(t-1). All arithmetic wraps modulo 2^ACC_W.
//
// Interface: x_in is a D_W-bit two's complement sample per clock; coef must be
// held steady while the filter runs. Timing: f_out(t) = y(t - (OSR+2)) mod
// 2^ACC_W, i.e. the sample presented before edge t0 is in f_out after
// OSR+2 more edges (input register, OSR stage registers, accumulator).
// Reset clears every register, which is what makes the running sum exact.
// Because the accumulator integrates differences, a code change while data
// flows would leave a permanent offset; clr (synchronous, one clock) zeroes
// every register so the filter restarts as if all earlier samples were 0.
// The top asserts it whenever the code register shifts.
// The coefficient assertion is disabled while rst_n is low; verilator reports
// that as rst_n being used both synchronously and asynchronously, but every
// flip-flop uses it only as an asynchronous reset.
// The structure follows the reference design; the one-chip spacing of the
// stages and the +-1 end cells are read from its equation and sizes.
module pddmf_core
  import pddmf_pkg::*;
#(
  parameter int TAPS  = pddmf_pkg::TAPS_DEF,
  parameter int OSR   = pddmf_pkg::OSR_DEF,
  parameter int D_W   = pddmf_pkg::D_W_DEF,
  parameter int ACC_W = pddmf_pkg::ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [D_W-1:0]   x_in,
  input  coef_t [TAPS:0]   coef,
  output logic [ACC_W-1:0] f_out
);

  logic [D_W-1:0]   x_r;             // input register, broadcast to all cells
  logic [ACC_W-1:0] s [TAPS+2];      // s[k] = partial sum leaving stage k

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) x_r <= '0;
    else if (clr) x_r <= '0;
    else        x_r <= x_in;
  end

  assign s[TAPS+1] = '0;

  for (genvar k = 0; k <= TAPS; k++) begin : g_stage
    adder_stage #(
      .D_W(D_W), .ACC_W(ACC_W), .DELAY(OSR),
      .SHIFT((k == 0 || k == TAPS) ? 1'b0 : 1'b1)
    ) u_stage (
      .clk(clk), .rst_n(rst_n), .clr(clr), .x(x_r), .c(coef[k]),
      .s_in(s[k+1]), .s_out(s[k])
    );

    // the negation carry only makes sense with neg, and a zero coefficient
    // must not be negated
    a_coef : assert property (@(posedge clk) disable iff (!rst_n)
      (coef[k].cin == coef[k].neg) && (coef[k].en || !coef[k].neg));
  end

  accumulator #(.ACC_W(ACC_W)) u_acc (
    .clk(clk), .rst_n(rst_n), .clr(clr), .d(s[0]), .f(f_out)
  );

endmodule
