// tb_pn_gen - checks the PN generator: the chip sequence follows
// b[n] = b[n-3] ^ b[n-4] from the seed, has period 15 with 8 ones per
// period, and holds when step is low.
module tb_pn_gen;
  logic clk = 0, rst_n = 0, step = 0, pn_bit;
  int checks = 0, failures = 0;
  int hist[$];

  pn_gen dut (.clk(clk), .rst_n(rst_n), .step(step), .pn_bit(pn_bit));

  always #5 clk = ~clk;

  initial begin
    int ones, nb;
    // seed 0001: newest chip 1, then three 0s before it
    hist = '{0, 0, 0, 1};
    repeat (2) @(negedge clk);
    rst_n = 1;
    checks++;
    if (pn_bit !== 1'b1) begin failures++; $display("FAIL seed chip"); end
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      step = (n % 3 != 2);   // some idle cycles
      @(negedge clk);
      if (step) begin
        nb = hist[hist.size()-3] ^ hist[hist.size()-4];
        hist.push_back(nb);
      end
      step = 0;
      checks++;
      if (int'(pn_bit) != hist[hist.size()-1]) begin
        failures++;
        $display("FAIL n=%0d pn=%0d exp=%0d", n, pn_bit, hist[hist.size()-1]);
      end
    end
    // period 15, 8 ones per period
    ones = 0;
    for (int i = 3; i < 18; i++) ones += hist[i];
    checks++;
    if (ones != 8) begin failures++; $display("FAIL ones=%0d", ones); end
    for (int i = 3; i + 15 < hist.size(); i++) begin
      checks++;
      if (hist[i] != hist[i+15]) begin failures++; $display("FAIL period at %0d", i); end
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
