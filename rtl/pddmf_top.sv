// pddmf_top - programmable pipelined digital differential matched filter.
//
// A PN generator, a PN code register, the differential encoder and the
// filter datapath, with the test-mode control choosing between self-test
// (code and input both from the PN generator) and normal operation (input
// samples on x_ext, code shifted in on code_in / code_shift).
//
// Interface: one sample of x_ext (4-bit two's complement) per clk; f_out is
// the 9-bit correlation of the last TAPS chips (TAPS*OSR samples) with the
// code in the register, OSR+2 clocks after the sample; in self-test the
// sample is the one generated internally. code shows the register (bit 0 is
// a_1, the newest chip). Every shift of the code register also clears the
// filter's registers, so the output is exact for the new code once TAPS*OSR
// samples have entered after the last shift. The chip runs at two samples per
// chip, for example a 2.5 MHz clock for a 1.25 Mchip/s code.
module pddmf_top
  import pddmf_pkg::*;
#(
  parameter int TAPS = pddmf_pkg::TAPS_DEF,
  parameter int OSR  = pddmf_pkg::OSR_DEF
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                self_test,
  input  logic [pddmf_pkg::D_W_DEF-1:0] x_ext,
  input  logic                code_in,
  input  logic                code_shift,
  output logic [pddmf_pkg::ACC_W_DEF-1:0] f_out,
  output logic [TAPS-1:0]     code
);

  logic           pn_bit, pn_step, reg_shift, reg_din;
  logic [pddmf_pkg::D_W_DEF-1:0] x;
  coef_t [TAPS:0] coef;

  pn_gen u_pn (
    .clk(clk), .rst_n(rst_n), .step(pn_step), .pn_bit(pn_bit)
  );

  test_ctrl #(.N(TAPS), .OSR(OSR)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .self_test(self_test), .x_ext(x_ext),
    .code_in(code_in), .code_shift(code_shift), .pn_bit(pn_bit),
    .pn_step(pn_step), .reg_shift(reg_shift), .reg_din(reg_din), .x(x)
  );

  pn_code_reg #(.N(TAPS)) u_code (
    .clk(clk), .rst_n(rst_n), .shift(reg_shift), .din(reg_din), .code(code)
  );

  diff_encoder #(.N(TAPS)) u_enc (.code(code), .coef(coef));

  pddmf_core #(.TAPS(TAPS), .OSR(OSR)) u_core (
    .clk(clk), .rst_n(rst_n), .clr(reg_shift), .x_in(x), .coef(coef), .f_out(f_out)
  );

endmodule
