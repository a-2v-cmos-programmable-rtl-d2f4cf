// pddmf_pkg - constants and types shared by the pipelined digital differential
// matched filter (PDDMF).
//
// The default sizes are those of the reference chip: 16 chip taps, 2 samples
// per chip, 4-bit two's complement soft-decision samples, 9-bit adders and
// output, and a 4-stage PN generator (period 15, whose 16 consecutive chips
// have 8 sign changes, hence 8 non-zero +-2 coefficients).
//
// coef_t is what the differential encoder sends to one multiply-and-sum (M&S)
// cell: 'en' gates the product (0 makes the coefficient 0), 'neg' inverts it
// and 'cin' adds the +1 that completes the two's complement negation.
package pddmf_pkg;

  localparam int TAPS_DEF     = 16;  // chips in the matched code
  localparam int OSR_DEF      = 2;   // samples per chip
  localparam int D_W_DEF      = 4;   // input sample width
  localparam int ACC_W_DEF    = 9;   // adder / output width
  localparam int PN_ORDER_DEF = 4;   // PN generator order r

  typedef struct packed {
    logic en;   // product enabled (coefficient non-zero)
    logic neg;  // coefficient negative
    logic cin;  // carry-in for the negation
  } coef_t;

  typedef enum logic {
    MODE_NORMAL   = 1'b0,
    MODE_SELFTEST = 1'b1
  } mode_e;

endpackage
