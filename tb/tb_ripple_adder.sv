// tb_ripple_adder - checks the 9-bit ripple adder against integer addition
// modulo 2^9 for corner values and random operands.
module tb_ripple_adder;
  localparam int W = 9;
  logic [W-1:0] a, b, s;
  logic         ci;
  logic         clk = 0;
  int checks = 0, failures = 0;

  ripple_adder #(.W(W)) dut (.a(a), .b(b), .ci(ci), .s(s));

  always #5 clk = ~clk;

  task automatic check(input int av, input int bv, input int cv);
    int exp;
    a = W'(av); b = W'(bv); ci = cv[0];
    #1;
    exp = (av + bv + cv) & ((1 << W) - 1);
    checks++;
    if (int'(s) != exp) begin
      failures++;
      $display("FAIL a=%0d b=%0d ci=%0d s=%0d exp=%0d", av, bv, cv, s, exp);
    end
  endtask

  initial begin
    check(0, 0, 0); check(511, 1, 0); check(511, 0, 1); check(511, 511, 1);
    check(255, 1, 0); check(256, 256, 0); check(170, 85, 1);
    for (int i = 0; i < 3000; i++)
      check(int'($urandom_range(511)), int'($urandom_range(511)), int'($urandom_range(1)));
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
