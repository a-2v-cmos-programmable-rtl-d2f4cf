// tb_test_ctrl - checks the test-mode control: in normal mode samples and
// code strobes pass straight through; in self-test the PN step comes every
// OSR clocks, exactly N chips are shifted into the code register and then
// none, and the sample is +7 / -7 following the PN chip. Leaving and
// re-entering self-test reloads the code.
module tb_test_ctrl;
  localparam int N = 16, OSR = 2;
  logic clk = 0, rst_n = 0, self_test = 0, code_in = 0, code_shift = 0, pn_bit = 0;
  logic [3:0] x_ext = '0, x;
  logic pn_step, reg_shift, reg_din;
  int checks = 0, failures = 0;

  test_ctrl #(.N(N), .OSR(OSR), .D_W(4), .AMP(4'd7)) dut (
    .clk(clk), .rst_n(rst_n), .self_test(self_test), .x_ext(x_ext),
    .code_in(code_in), .code_shift(code_shift), .pn_bit(pn_bit),
    .pn_step(pn_step), .reg_shift(reg_shift), .reg_din(reg_din), .x(x));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic normal_phase(input int n);
    for (int i = 0; i < n; i++) begin
      x_ext = 4'($urandom); code_in = 1'($urandom); code_shift = 1'($urandom);
      pn_bit = 1'($urandom);
      #1;
      chk(x == x_ext && reg_shift == code_shift && reg_din == code_in && !pn_step,
          "normal passthrough");
      @(negedge clk);
    end
  endtask

  task automatic selftest_phase(input int n);
    int steps = 0, shifts = 0, last_step = -1;
    self_test = 1;
    for (int i = 0; i < n; i++) begin
      pn_bit = 1'($urandom);
      code_shift = 1'($urandom);
      x_ext = 4'($urandom);
      #1;
      chk(x == (pn_bit ? 4'd7 : 4'd9), "self-test sample");
      if (reg_shift) begin
        shifts++;
        chk(reg_din == pn_bit, "self-test loads PN chip");
        chk(pn_step, "shift only on a chip step");
      end
      if (pn_step) begin
        if (last_step >= 0) chk(i - last_step == OSR, "chip period");
        last_step = i;
        steps++;
      end
      @(negedge clk);
    end
    chk(shifts == N, "N chips loaded");
    chk(steps >= n / OSR - 2, "PN generator stepped");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    normal_phase(50);
    selftest_phase(100);
    self_test = 0;
    @(negedge clk);
    normal_phase(20);
    selftest_phase(80);
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
