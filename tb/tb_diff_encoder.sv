// tb_diff_encoder - checks the differential encoder on random codes and on an
// m-sequence window: each coefficient's enable and sign must match
// b_1 = a_1, b_i = a_i - a_(i-1), b_(N+1) = -a_N computed with integers.
module tb_diff_encoder;
  import pddmf_pkg::*;
  localparam int N = 16;
  logic [N-1:0] code;
  coef_t [N:0]  coef;
  logic         clk = 0;
  int checks = 0, failures = 0;
  int zeros_seen = 0;

  diff_encoder #(.N(N)) dut (.code(code), .coef(coef));

  always #5 clk = ~clk;

  function automatic int a_of(input logic [N-1:0] cd, input int i);  // i = 1..N
    return cd[i-1] ? 1 : -1;
  endfunction

  task automatic check_code(input logic [N-1:0] cd);
    int b, got;
    code = cd;
    #1;
    for (int k = 1; k <= N + 1; k++) begin
      if (k == 1)      b = a_of(cd, 1);
      else if (k <= N) b = a_of(cd, k) - a_of(cd, k - 1);
      else             b = -a_of(cd, N);
      if (b == 0) zeros_seen++;
      // coefficient as the cell sees it: sign only, magnitude fixed per cell
      got = !coef[k-1].en ? 0 : (coef[k-1].neg ? -1 : 1);
      checks++;
      if (got != (b > 0 ? 1 : (b < 0 ? -1 : 0)) || coef[k-1].cin != coef[k-1].neg) begin
        failures++;
        $display("FAIL code=%h k=%0d b=%0d en=%b neg=%b cin=%b", cd, k, b,
                 coef[k-1].en, coef[k-1].neg, coef[k-1].cin);
      end
    end
  endtask

  initial begin
    logic [N-1:0] cd;
    int nz;
    check_code('0);
    check_code('1);
    check_code(16'hAAAA);
    for (int i = 0; i < 500; i++) check_code(N'($urandom));
    // 16 chips of the period-15 m-sequence of x^4+x^3+1: 8 non-zero inner
    // coefficients, 7 zero ones
    cd = 16'b1001_1010_1111_0001;
    check_code(cd);
    nz = 0;
    for (int i = 1; i < N; i++) nz += coef[i].en;
    checks++;
    if (nz != 8) begin
      failures++;
      $display("FAIL m-sequence window gives %0d non-zero inner coefficients", nz);
    end
    checks++;
    if (zeros_seen == 0) begin
      failures++;
      $display("FAIL no zero coefficient exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
