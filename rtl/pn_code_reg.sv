// pn_code_reg - the PN code register holding the N chips a_1..a_N that the
// filter is matched to.
//
// A serial shift register: on 'shift' the chip din enters at a_1 (bit 0) and
// every chip moves one place towards a_N (bit N-1), the oldest chip falling
// out. Since a_1 multiplies the newest sample, shifting a transmitted
// sequence in chip by chip leaves the register matched to it. Bit value 1
// means +1, 0 means -1. Reset clears the register. The serial loading is this
// design's choice.
module pn_code_reg #(
  parameter int N = pddmf_pkg::TAPS_DEF
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic         din,
  output logic [N-1:0] code
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     code <= '0;
    else if (shift) code <= {code[N-2:0], din};
  end

endmodule
