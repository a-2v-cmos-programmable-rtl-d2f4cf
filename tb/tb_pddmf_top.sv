// tb_pddmf_top - end-to-end test of the programmable differential matched
// filter at its default size (16 chips, 2 samples per chip, 4-bit samples,
// 9-bit output).
//
//  1. Normal mode: several random codes are shifted in serially, each
//     followed by random samples; the output is compared on every clock with
//     the ordinary 32-coefficient matched filter computed here.
//  2. Self-test: the PN generator, modelled here from its recurrence, must
//     load its first 16 chips into the code register and then drive the
//     filter with +7/-7; the output must match the reference and show the
//     autocorrelation peak 16*2*7 = 224 once per PN period (15 chips =
//     30 samples); the loaded code must have 8 non-zero inner coefficients.
//  3. Back to normal mode with a new code and an extreme input whose sum
//     passes 255 and wraps.
// It counts how often each mechanism occurred: zero, +2 and -2 differential
// coefficients, serial code loads, self-test loads, autocorrelation peaks,
// mode switches, wrap-around, and fails if one never did.
module tb_pddmf_top;
  localparam int TAPS = 16, OSR = 2, LAT = OSR + 2, AMP = 7;
  logic clk = 0, rst_n = 0, self_test = 0, code_in = 0, code_shift = 0;
  logic [3:0]      x_ext = '0;
  logic [8:0]      f_out;
  logic [TAPS-1:0] code;

  int xs[$];               // every sample the filter received, index = cycle
  int clear_upto = -1;     // samples at or before this index were cleared
  int a[TAPS+1];           // model of the code, a[1] newest chip
  int pn_hist[$];          // model of the PN generator chips
  int cyc = 0;
  int checks = 0, failures = 0;
  int n_zero = 0, n_plus2 = 0, n_minus2 = 0, n_serial_load = 0, n_self_load = 0,
      n_peak = 0, n_mode_switch = 0, n_wrap = 0;

  pddmf_top dut (
    .clk(clk), .rst_n(rst_n), .self_test(self_test), .x_ext(x_ext),
    .code_in(code_in), .code_shift(code_shift), .f_out(f_out), .code(code));

  always #5 clk = ~clk;

  function automatic int y_full(input int t);
    int acc = 0;
    for (int j = 0; j < TAPS * OSR; j++)
      if (t - j > clear_upto) acc += a[j / OSR + 1] * xs[t - j];
    return acc;
  endfunction

  // drive one sample (already set up) for one clock and check the output
  task automatic tick(input int x_seen, input bit shifting);
    int exp;
    xs.push_back(x_seen);
    exp = (cyc - LAT > clear_upto) ? (y_full(cyc - LAT) & 511) : 0;
    checks++;
    if (int'(f_out) != exp) begin
      failures++;
      if (failures < 10) $display("FAIL cycle %0d f_out=%0d exp=%0d", cyc, f_out, exp);
    end
    if (cyc - LAT > clear_upto && y_full(cyc - LAT) > 255) n_wrap++;
    @(negedge clk);
    if (shifting) clear_upto = cyc;
    cyc++;
  endtask

  task automatic count_coefs();
    for (int k = 2; k <= TAPS; k++) begin
      if (a[k] == a[k-1])     n_zero++;
      else if (a[k] > a[k-1]) n_plus2++;
      else                    n_minus2++;
    end
  endtask

  task automatic check_code_reg();
    logic [TAPS-1:0] exp_code;
    for (int i = 1; i <= TAPS; i++) exp_code[i-1] = (a[i] > 0);
    checks++;
    if (code != exp_code) begin
      failures++;
      $display("FAIL code register %h, expected %h", code, exp_code);
    end
  endtask

  // normal mode: shift a code in serially, then stream samples
  task automatic normal_run(input int n, input bit extreme);
    for (int i = 0; i < TAPS; i++) begin
      int bitv;
      bitv = extreme ? 0 : int'($urandom_range(1));
      code_in = bitv[0]; code_shift = 1;
      x_ext = 4'($urandom);
      tick(int'(signed'(x_ext)), 1'b1);   // old code still active this clock
      for (int k = TAPS; k > 1; k--) a[k] = a[k-1];
      a[1] = bitv ? 1 : -1;
    end
    code_shift = 0;
    n_serial_load++;
    check_code_reg();
    count_coefs();
    for (int i = 0; i < n; i++) begin
      x_ext = extreme ? 4'b1000 : 4'($urandom);
      tick(int'(signed'(x_ext)), 1'b0);
    end
  endtask

  task automatic pn_advance();
    pn_hist.push_back(pn_hist[pn_hist.size()-3] ^ pn_hist[pn_hist.size()-4]);
  endtask

  // self-test: the generator's chips load the code and form the input
  task automatic selftest_run(input int n_chips);
    int chip, last_peak = -1;
    self_test = 1;
    n_mode_switch++;
    x_ext = 4'($urandom);   // ignored in self-test
    for (int c = 0; c < n_chips; c++) begin
      chip = pn_hist[pn_hist.size()-1];
      for (int s = 0; s < OSR; s++) begin
        if (f_out == 9'(TAPS * OSR * AMP)) begin
          n_peak++;
          if (last_peak >= 0) begin
            checks++;
            if (cyc - last_peak != 15 * OSR) begin
              failures++;
              $display("FAIL peak spacing %0d", cyc - last_peak);
            end
          end
          last_peak = cyc;
        end
        tick(chip ? AMP : -AMP, (c < TAPS) && (s == OSR - 1));
      end
      if (c < TAPS) begin
        for (int k = TAPS; k > 1; k--) a[k] = a[k-1];
        a[1] = chip ? 1 : -1;
      end
      pn_advance();
      if (c == TAPS - 1) begin
        n_self_load++;
        check_code_reg();
        count_coefs();
        // 16 chips of the period-15 m-sequence: 7 zero and 8 non-zero
        // inner coefficients
        begin
          int nz = 0;
          for (int k = 2; k <= TAPS; k++) nz += (a[k] != a[k-1]);
          checks++;
          if (nz != 8) begin
            failures++;
            $display("FAIL self-test code has %0d non-zero inner coefficients", nz);
          end
        end
      end
    end
    self_test = 0;
    n_mode_switch++;
  endtask

  task automatic mech(input int n, input string name);
    checks++;
    $display("mechanism %-22s %0d", name, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism %s never happened", name);
    end
  endtask

  initial begin
    for (int i = 1; i <= TAPS; i++) a[i] = -1;   // reset code 0 = all -1
    pn_hist = '{0, 0, 0, 1};                     // generator seed
    repeat (2) @(negedge clk);
    rst_n = 1;
    // idle samples with the reset code
    for (int i = 0; i < 20; i++) begin
      x_ext = 4'($urandom);
      tick(int'(signed'(x_ext)), 1'b0);
    end
    for (int r = 0; r < 4; r++) normal_run(120, 1'b0);
    selftest_run(15 * 5 + TAPS);
    normal_run(80, 1'b0);
    normal_run(60, 1'b1);
    mech(n_zero, "zero coefficient");
    mech(n_plus2, "+2 coefficient");
    mech(n_minus2, "-2 coefficient");
    mech(n_serial_load, "serial code load");
    mech(n_self_load, "self-test code load");
    mech(n_peak, "autocorrelation peak");
    mech(n_mode_switch, "mode switch");
    mech(n_wrap, "output wrap");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
