// tb_adder_stage - checks one pipeline stage: with random samples,
// coefficients and incoming partial sums, s_out must equal
// coefficient * x + s_in from DELAY = 2 clocks earlier, modulo 2^9, and the
// synchronous clear must empty the stage.
module tb_adder_stage;
  import pddmf_pkg::*;
  localparam int DELAY = 2;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [3:0] x = '0;
  coef_t      c = '0;
  logic [8:0] s_in = '0, s_out;
  int exp_q[$];
  int checks = 0, failures = 0;

  adder_stage #(.D_W(4), .ACC_W(9), .DELAY(DELAY), .SHIFT(1'b1)) dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .x(x), .c(c), .s_in(s_in), .s_out(s_out));

  always #5 clk = ~clk;

  initial begin
    int k, coefv, xv;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < DELAY; i++) exp_q.push_back(0);
    for (int n = 0; n < 500; n++) begin
      k  = $urandom_range(2);
      xv = int'($urandom_range(15)) - 8;
      x  = 4'(xv);
      c  = '{en: k != 0, neg: k == 2, cin: k == 2};
      s_in = 9'($urandom);
      clr  = ($urandom_range(19) == 0);
      coefv = (k == 0) ? 0 : (k == 1 ? 2 : -2);
      exp_q.push_back((coefv * xv + int'(s_in)) & 511);
      checks++;
      if (int'(s_out) != exp_q[0]) begin
        failures++;
        $display("FAIL n=%0d s_out=%0d exp=%0d", n, s_out, exp_q[0]);
      end
      @(negedge clk);
      void'(exp_q.pop_front());
      if (clr) foreach (exp_q[i]) exp_q[i] = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
