// dlms_dfe: DFE(6,5) equaliser with delayed-LMS, real-error adaptation.
//
// The pipelined feedforward filter (dfe_fff, 6 taps, 4-symbol latency)
// removes pre-cursor interference and the carrier phase; the transposed
// feedback filter (dfe_fbf, 5 taps, no latency) subtracts the post-cursor
// interference of past decisions. The feedback section forms one real error
// per symbol on that symbol's GMSK axis and feeds it back to both sections.
// The feedforward coefficients adapt with the error delayed by one more
// symbol, which is what allows a pipelined filter under LMS (delayed LMS).
// In training mode the known preamble symbol replaces the decision.
// Structure and tap counts follow the document; the mode and enable signals
// are this design's interface.
//
// Timing: x (the derotated sample) changes on the ph = 1 edge. The decision
// dec and the error eps for symbol t refer to the input x(t-5-CURSOR) and are
// combinational during symbol t; axis, train and train_sym must be given for
// that symbol.
module dlms_dfe
  import hl1_pkg::*;
#(
  parameter int NFF    = 6,
  parameter int NFB    = 5,
  parameter int CURSOR = 3,
  parameter int MU_FF  = 6,
  parameter int MU_FB  = 6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ph,
  input  logic  init,
  input  logic  run,
  input  logic  adapt,
  input  logic  axis,
  input  logic  train,
  input  logic  train_sym,
  input  cplx_t x,
  output cplx_t y,
  output logic  dec,
  output logic signed [8:0] eps
);
  cplx_t f;
  logic signed [15:0] ff_re [NFF], ff_im [NFF];
  logic signed [15:0] fb_re [NFB], fb_im [NFB];

  dfe_fff #(.NFF(NFF), .CURSOR(CURSOR), .MU(MU_FF)) u_fff (
    .clk, .rst_n, .ph, .init, .adapt, .x,
    .err_valid(run), .eps, .err_axis(axis), .f,
    .coef_re(ff_re), .coef_im(ff_im));

  dfe_fbf #(.NFB(NFB), .MU(MU_FB)) u_fbf (
    .clk, .rst_n, .ph, .init, .run, .adapt, .f, .axis, .train, .train_sym,
    .y, .dec, .eps, .coef_re(fb_re), .coef_im(fb_im));
endmodule
