// tb_ms_cell - checks the M&S multiply cell: for every 4-bit sample and every
// coefficient setting, product bits plus the carry-in must equal
// coefficient * sample modulo 2^9, for the x2 cell (0, +2, -2) and the x1 end
// cell (0, +1, -1).
module tb_ms_cell;
  import pddmf_pkg::*;
  logic [3:0] d;
  coef_t      c;
  logic [8:0] p2, p1;
  logic       cin2, cin1;
  logic       clk = 0;
  int checks = 0, failures = 0;

  ms_cell #(.D_W(4), .ACC_W(9), .SHIFT(1'b1)) dut2 (.d(d), .c(c), .p(p2), .cin(cin2));
  ms_cell #(.D_W(4), .ACC_W(9), .SHIFT(1'b0)) dut1 (.d(d), .c(c), .p(p1), .cin(cin1));

  always #5 clk = ~clk;

  initial begin
    for (int v = -8; v < 8; v++) begin
      for (int k = 0; k < 3; k++) begin
        // k = 0: zero, 1: positive, 2: negative coefficient
        int sign, e2, e1;
        d = 4'(v);
        c.en  = (k != 0);
        c.neg = (k == 2);
        c.cin = (k == 2);
        sign = (k == 0) ? 0 : (k == 1 ? 1 : -1);
        #1;
        e2 = (2 * sign * v) & 511;
        e1 = (sign * v) & 511;
        checks += 2;
        if (((int'(p2) + int'(cin2)) & 511) != e2) begin
          failures++;
          $display("FAIL x2 d=%0d k=%0d p=%0d cin=%0d", v, k, p2, cin2);
        end
        if (((int'(p1) + int'(cin1)) & 511) != e1) begin
          failures++;
          $display("FAIL x1 d=%0d k=%0d p=%0d cin=%0d", v, k, p1, cin1);
        end
        // a zero coefficient must give all-zero product bits
        if (k == 0) begin
          checks++;
          if (p2 != 0 || cin2 || p1 != 0 || cin1) begin
            failures++;
            $display("FAIL zero coefficient not zero d=%0d", v);
          end
        end
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
