// test_ctrl - test-mode control: chooses where the filter's input samples and
// its code come from.
//
// Normal mode (self_test = 0): samples come from x_ext, and the code register
// shifts in code_in whenever code_shift is high, so the user picks the code.
// Self-test mode (self_test = 1): a chip counter divides the sample clock by
// OSR and steps the PN generator once per chip. The first N chips after
// entering self-test are also shifted into the code register (state LOAD);
// after that the register is frozen (state RUN). Throughout, the current PN
// chip is sent to the filter as +AMP or -AMP, held for OSR samples, so the
// filter output shows the code's autocorrelation, peaking once per PN period.
// The first self-test sample is presented in the first clock in which
// self_test is high. Normal mode holds the sequencer at the start of LOAD, so
// entering self-test again reloads the code; the PN generator keeps its state.
//
// The two modes are those of the reference chip; how self-test sequences its
// loading, and AMP, are this design's choices. All outputs are combinational
// from registered state and the mode/strobe inputs. The assertion is disabled
// while rst_n is low, which verilator reports as a synchronous use of the
// asynchronous reset; the flip-flops use it only asynchronously.
module test_ctrl
  import pddmf_pkg::*;
#(
  parameter int             N   = pddmf_pkg::TAPS_DEF,
  parameter int             OSR = pddmf_pkg::OSR_DEF,
  parameter int             D_W = pddmf_pkg::D_W_DEF,
  parameter logic [D_W-1:0] AMP = 4'd7
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           self_test,
  input  logic [D_W-1:0] x_ext,
  input  logic           code_in,
  input  logic           code_shift,
  input  logic           pn_bit,
  output logic           pn_step,
  output logic           reg_shift,
  output logic           reg_din,
  output logic [D_W-1:0] x
);

  typedef enum logic {S_LOAD, S_RUN} state_e;

  localparam int PH_W = $clog2(OSR + 1);
  localparam int LD_W = $clog2(N + 1);
  localparam logic [PH_W-1:0] LAST_PH = PH_W'(OSR - 1);
  localparam logic [LD_W-1:0] LAST_LD = LD_W'(N - 1);

  mode_e           mode;
  state_e          state;
  logic [PH_W-1:0] phase;    // sample within the chip
  logic [LD_W-1:0] loaded;   // chips loaded in this self-test

  assign mode = mode_e'(self_test);

  // in normal mode the self-test sequencer waits at the start of LOAD
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_LOAD;
      phase  <= '0;
      loaded <= '0;
    end else if (mode == MODE_NORMAL) begin
      state  <= S_LOAD;
      phase  <= '0;
      loaded <= '0;
    end else begin
      phase <= pn_step ? '0 : phase + 1'b1;
      if (state == S_LOAD && pn_step) begin
        loaded <= loaded + 1'b1;
        if (loaded == LAST_LD) state <= S_RUN;
      end
    end
  end

  always_comb begin
    if (mode == MODE_NORMAL) begin
      pn_step   = 1'b0;
      reg_shift = code_shift;
      reg_din   = code_in;
      x         = x_ext;
    end else begin
      pn_step   = (phase == LAST_PH);
      reg_shift = (state == S_LOAD) && pn_step;
      reg_din   = pn_bit;
      x         = pn_bit ? AMP : -AMP;
    end
  end

  a_frozen : assert property (@(posedge clk) disable iff (!rst_n)
    (mode == MODE_SELFTEST && state == S_RUN) |-> !reg_shift);

endmodule
