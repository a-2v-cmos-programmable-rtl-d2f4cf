// tb_accumulator - checks f(T) = D(T) + f(T-1) modulo 2^9 with random
// differential inputs, one clock of latency, and the synchronous clear.
module tb_accumulator;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [8:0] d = '0, f;
  int model = 0;
  int checks = 0, failures = 0;

  accumulator #(.ACC_W(9)) dut (.clk(clk), .rst_n(rst_n), .clr(clr), .d(d), .f(f));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      checks++;
      if (int'(f) != model) begin
        failures++;
        $display("FAIL n=%0d f=%0d exp=%0d", n, f, model);
      end
      d = 9'($urandom);
      clr = ($urandom_range(19) == 0);
      @(negedge clk);
      model = clr ? 0 : (model + int'(d)) & 511;
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
