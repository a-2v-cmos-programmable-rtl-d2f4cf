// tb_pddmf_core - checks the filter datapath against the ordinary
// oversampled matched filter
//   y(t) = sum_{j=0}^{TAPS*OSR-1} a_(j/OSR+1) * x(t-j)   (mod 2^9)
// computed directly from the code (32 multiply-adds per sample), for random
// codes and random 4-bit samples. The coefficients are built here from the
// code, independently of the encoder. f_out must equal y(t - (OSR+2)).
// Between codes the synchronous clear restarts the filter, after which the
// reference treats all earlier samples as 0.
module tb_pddmf_core;
  import pddmf_pkg::*;
  localparam int TAPS = 16, OSR = 2, LAT = OSR + 2;
  logic clk = 0, rst_n = 0, clr = 0;
  logic [3:0] x_in = '0;
  coef_t [TAPS:0] coef;
  logic [8:0] f_out;
  int a[TAPS+1];          // a[1..TAPS] = +-1
  int xs[$];              // samples presented, index = cycle
  int checks = 0, failures = 0;

  pddmf_core #(.TAPS(TAPS), .OSR(OSR), .D_W(4), .ACC_W(9)) dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .x_in(x_in), .coef(coef), .f_out(f_out));

  always #5 clk = ~clk;

  function automatic int y_ref(input int t);
    int acc = 0;
    for (int j = 0; j < TAPS * OSR; j++)
      if (t - j >= 0) acc += a[j / OSR + 1] * xs[t - j];
    return acc & 511;
  endfunction

  task automatic set_code();
    int b;
    for (int i = 1; i <= TAPS; i++) a[i] = $urandom_range(1) ? 1 : -1;
    for (int k = 1; k <= TAPS + 1; k++) begin
      b = (k == 1) ? a[1] : (k <= TAPS ? a[k] - a[k-1] : -a[TAPS]);
      coef[k-1] = '{en: b != 0, neg: b < 0, cin: b < 0};
    end
  endtask

  task automatic run(input int n_samples, input bit extreme);
    // one clear cycle with a non-zero sample that must be discarded
    clr  = 1;
    x_in = 4'd7;
    @(negedge clk);
    clr = 0;
    xs.delete();
    for (int n = 0; n < n_samples + LAT; n++) begin
      int v;
      v = extreme ? -8 : int'($urandom_range(15)) - 8;
      xs.push_back(v);
      x_in = 4'(v);
      checks++;
      if (int'(f_out) != ((n - LAT >= 0) ? y_ref(n - LAT) : 0)) begin
        failures++;
        $display("FAIL n=%0d f_out=%0d exp=%0d", n, f_out, (n - LAT >= 0) ? y_ref(n - LAT) : 0);
      end
      @(negedge clk);
    end
  endtask

  initial begin
    set_code();
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 8; r++) begin
      set_code();
      run(200, 1'b0);
    end
    // all-(-1) code with the most negative sample: the sum reaches 256 and wraps
    for (int k = 0; k <= TAPS; k++) coef[k] = '0;
    for (int i = 1; i <= TAPS; i++) a[i] = -1;
    coef[0]    = '{en: 1'b1, neg: 1'b1, cin: 1'b1};
    coef[TAPS] = '{en: 1'b1, neg: 1'b0, cin: 1'b0};
    run(60, 1'b1);
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
