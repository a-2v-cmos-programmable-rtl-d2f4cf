// accumulator - output integrator of the differential matched filter.
//
// f(T) = D(T) + f(T-1): the differential sum d is added to the registered
// previous output with a ripple adder, and the sum is registered. Because the
// arithmetic wraps modulo 2^ACC_W and every register starts at 0, the running
// sum equals the ordinary correlation modulo 2^ACC_W.
//
// The integrator follows the reference design; the synchronous clear is this
// design's addition for reprogramming the code.
//
// Timing: f is registered, f(t+1) = f(t) + d(t). Reset and the synchronous
// clr clear f.
module accumulator #(
  parameter int ACC_W = pddmf_pkg::ACC_W_DEF
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic [ACC_W-1:0] d,
  output logic [ACC_W-1:0] f
);

  logic [ACC_W-1:0] sum;

  ripple_adder #(.W(ACC_W)) u_add (.a(f), .b(d), .ci(1'b0), .s(sum));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) f <= '0;
    else if (clr) f <= '0;
    else        f <= sum;
  end

endmodule
