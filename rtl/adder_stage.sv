// adder_stage - one pipeline stage of the transposed differential filter.
//
// The stage multiplies the broadcast sample x by its coefficient (ms_cell),
// adds the partial sum s_in arriving from the stage on its right with a
// ripple adder (the cell's negation carry enters as carry-in), and passes the
// result to the left through DELAY registers. With DELAY = samples per chip
// the stages sit one chip apart, which is where the non-zero coefficients of
// the oversampled differential filter lie.
//
// The cell / adder / latch stage follows the reference design; the DELAY of
// one chip (OSR registers) and the clear are this design's reading of it.
//
// Timing: s_out(t) = c*x(t-DELAY) + s_in(t-DELAY). Registers reset to 0, and
// clr (synchronous) zeroes them as well.
module adder_stage
  import pddmf_pkg::*;
#(
  parameter int D_W   = pddmf_pkg::D_W_DEF,
  parameter int ACC_W = pddmf_pkg::ACC_W_DEF,
  parameter int DELAY = pddmf_pkg::OSR_DEF,
  parameter bit SHIFT = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [D_W-1:0]   x,
  input  coef_t            c,
  input  logic [ACC_W-1:0] s_in,
  output logic [ACC_W-1:0] s_out
);

  logic [ACC_W-1:0] p, sum;
  logic             cin;
  logic [ACC_W-1:0] lat [DELAY];

  ms_cell #(.D_W(D_W), .ACC_W(ACC_W), .SHIFT(SHIFT)) u_cell (
    .d(x), .c(c), .p(p), .cin(cin)
  );

  ripple_adder #(.W(ACC_W)) u_add (
    .a(s_in), .b(p), .ci(cin), .s(sum)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DELAY; i++) lat[i] <= '0;
    end else if (clr) begin
      for (int i = 0; i < DELAY; i++) lat[i] <= '0;
    end else begin
      lat[0] <= sum;
      for (int i = 1; i < DELAY; i++) lat[i] <= lat[i-1];
    end
  end

  assign s_out = lat[DELAY-1];

endmodule
