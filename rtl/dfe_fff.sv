// dfe_fff: pipelined feedforward filter of the DLMS decision feedback
// equaliser, with its coefficient update.
//
// Filter: NFF complex taps on a delay line of the (frequency-corrected) input.
// Each tap uses a double-frequency complex multiplier (2-symbol latency); the
// six products are added in pairs in a registered adder stage and the three
// pair sums in a second registered stage, all saturated to 8 bits. Counting
// from the multiplier operand registers the pipeline is 4 symbols deep, so
// with x(t) the input present during symbol t and f(t) the output during t
//   f(t) = sum_i c_i * x(t-5-i).
// Update (delayed LMS): the real error eps(t) of output f(t) arrives from the
// feedback section during symbol t and is registered; in symbol t+1 every
// coefficient moves by mu * e * conj(x(t-5-i)), where the error vector e is
// eps on the real axis for even (I) symbols and j*eps for odd (Q) symbols:
//   axis I: dc = mu * ( eps*Re x, -eps*Im x),  axis Q: dc = mu * (eps*Im x, eps*Re x).
// The extra symbol of delay is what lets the error path and the update be
// pipelined. mu = 2^-MU. Coefficients are kept to 16 bits (Q1.14); the top 8
// bits (Q1.6) drive the multipliers.
//
// Follows the document: 6 taps, pipelined structure with complex
// double-frequency multipliers, 4-symbol latency, 8-bit limiting, delayed LMS
// with real error. This design's choices: the adder-tree pairing, Q formats,
// step size, 16-bit coefficient accumulators, the cursor tap CURSOR set to 1.0
// on init and the one-symbol update delay.
//
// Timing: x changes on the ph = 1 edge; f and the coefficients change on it.
// init (one clock) resets the coefficients; adapt enables updates.
module dfe_fff
  import hl1_pkg::*;
#(
  parameter int NFF    = 6,
  parameter int CURSOR = 3,
  parameter int MU     = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ph,
  input  logic        init,
  input  logic        adapt,
  input  cplx_t       x,
  input  logic        err_valid,   // eps belongs to the current f
  input  logic signed [8:0] eps,
  input  logic        err_axis,    // 0: I symbol, 1: Q symbol
  output cplx_t       f,
  output logic signed [15:0] coef_re [NFF],
  output logic signed [15:0] coef_im [NFF]
);
  localparam int NH = NFF + 5;     // history x(t-1) .. x(t-NFF-5)
  localparam int NP = (NFF + 1) / 2;

  cplx_t hx [NH];
  cplx_t prod [NFF];
  samp_t pr_re [NP], pr_im [NP];
  logic  e_v;
  logic signed [8:0] e_q;
  logic  e_ax;

  for (genvar i = 0; i < NFF; i++) begin : g_tap
    cmul_dbl u_mul (.clk, .rst_n, .ph,
      .v(i == 0 ? x : hx[(i == 0) ? 0 : i-1]),
      .c('{re: coef_re[i][15:8], im: coef_im[i][15:8]}),
      .y(prod[i]));
  end

  logic signed [31:0] sum_re, sum_im;
  logic signed [31:0] g_re [NFF], g_im [NFF];

  always_comb begin
    sum_re = 0; sum_im = 0;
    for (int p = 0; p < NP; p++) begin
      sum_re += 32'(pr_re[p]);
      sum_im += 32'(pr_im[p]);
    end
    // gradient e * conj(x(t-1-5-i)) for the error registered from symbol t-1
    for (int i = 0; i < NFF; i++) begin
      if (!e_ax) begin
        g_re[i] = 32'(e_q) * 32'(hx[5+i].re);
        g_im[i] = -(32'(e_q) * 32'(hx[5+i].im));
      end else begin
        g_re[i] = 32'(e_q) * 32'(hx[5+i].im);
        g_im[i] = 32'(e_q) * 32'(hx[5+i].re);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hx <= '{default: '0};
      pr_re <= '{default: '0}; pr_im <= '{default: '0};
      f <= '0; e_v <= 1'b0; e_q <= '0; e_ax <= 1'b0;
    end else if (ph) begin
      hx[0] <= x;
      for (int k = 1; k < NH; k++) hx[k] <= hx[k-1];
      // adder stage 1: pairs
      for (int p = 0; p < NP; p++) begin
        if (2*p+1 < NFF) begin
          pr_re[p] <= sat8(32'(prod[2*p].re) + 32'(prod[2*p+1].re));
          pr_im[p] <= sat8(32'(prod[2*p].im) + 32'(prod[2*p+1].im));
        end else begin
          pr_re[p] <= prod[2*p].re;
          pr_im[p] <= prod[2*p].im;
        end
      end
      // adder stage 2
      f <= '{re: sat8(sum_re), im: sat8(sum_im)};
      // error register (delayed LMS)
      e_v  <= err_valid & adapt;
      e_q  <= eps;
      e_ax <= err_axis;
    end
  end

  // Coefficient update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NFF; i++) begin
        coef_re[i] <= (i == CURSOR) ? 16'sh4000 : '0;
        coef_im[i] <= '0;
      end
    end else if (init) begin
      for (int i = 0; i < NFF; i++) begin
        coef_re[i] <= (i == CURSOR) ? 16'sh4000 : '0;
        coef_im[i] <= '0;
      end
    end else if (ph && e_v && adapt) begin
      for (int i = 0; i < NFF; i++) begin
        coef_re[i] <= sat16(32'(coef_re[i]) + (g_re[i] >>> (MU - 2)));
        coef_im[i] <= sat16(32'(coef_im[i]) + (g_im[i] >>> (MU - 2)));
      end
    end
  end
endmodule
