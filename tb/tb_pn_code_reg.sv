// tb_pn_code_reg - checks the code register against a queue model: random
// chips shifted in on random cycles, newest chip at bit 0.
module tb_pn_code_reg;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, shift = 0, din = 0;
  logic [N-1:0] code;
  logic [N-1:0] model = '0;
  int checks = 0, failures = 0;

  pn_code_reg #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .shift(shift), .din(din), .code(code));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (code != 0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 400; n++) begin
      shift = 1'($urandom_range(1));
      din   = 1'($urandom_range(1));
      @(negedge clk);
      if (shift) model = {model[N-2:0], din};
      checks++;
      if (code != model) begin
        failures++;
        $display("FAIL n=%0d code=%h exp=%h", n, code, model);
      end
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
