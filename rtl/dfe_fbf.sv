// dfe_fbf: feedback section of the DLMS decision feedback equaliser:
// decision, training multiplexer, real error and a transposed feedback
// filter, all within one symbol period.
//
// GMSK symbols alternate between the real axis (I symbols) and the imaginary
// axis (Q symbols), so each decision is a sign on a known axis and each past
// decision d = +/-1 or +/-j. Per symbol t:
//   y     = f + P1                      (equalised sample, 8-bit saturated)
//   y_act = Re y (axis 0) or Im y (axis 1)
//   s     = training symbol in training mode, else sign(y_act)
//   eps   = s*A - y_act                 (real error, A = 1.0)
// The feedback filter is transposed: the partial sums P1..P5 are loaded with
//   P_j <- P_{j+1} + b_j * d(t)
// so the feedback of five past decisions is ready at the start of each symbol
// with no adder chain on the decision path. Because d is +/-1 or +/-j the
// products b_j*d are only a swap of real and imaginary part and sign changes
// (multiplexers, no multipliers). The coefficients are updated one symbol
// later (delayed LMS) by mu*e*conj(d(t-j)), where e = eps on the axis of
// symbol t; this is again only a sign and a choice of real or imaginary part.
// Tap k multiplies a decision k+1 symbols old, which lies on the same axis
// as the current symbol for odd k and on the other axis for even k. With a
// real error the update is therefore purely real for odd taps and purely
// imaginary for even taps, so half of the coefficient components stay at
// zero; they are kept as ports to give every tap the same complex form.
//
// Follows the document: 5 transposed taps with no latency, multiplexed
// feedback products, training input, real error output, real-error LMS. This
// design's choices: A = 1.0 (64 in Q1.6), the Q formats, mu = 2^-MU,
// 16-bit coefficient accumulators and the one-symbol update delay.
//
// Timing: f, axis, train and train_sym are valid for the whole symbol; y,
// dec and eps are combinational from them; state changes on the ph = 1 edge.
module dfe_fbf
  import hl1_pkg::*;
#(
  parameter int NFB = 5,
  parameter int MU  = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ph,
  input  logic        init,       // clear coefficients and feedback state
  input  logic        run,        // symbol is part of the packet
  input  logic        adapt,      // update coefficients
  input  cplx_t       f,          // feedforward output
  input  logic        axis,       // 0: I symbol, 1: Q symbol
  input  logic        train,      // use train_sym as the decision
  input  logic        train_sym,  // 1: +1, 0: -1
  output cplx_t       y,
  output logic        dec,        // decided sign, 1: +1
  output logic signed [8:0] eps,
  output logic signed [15:0] coef_re [NFB],
  output logic signed [15:0] coef_im [NFB]
);
  localparam logic signed [8:0] A = 9'sd64;

  cplx_t p [NFB];              // transposed partial sums, p[0] = P1
  logic  sd [NFB+1];           // sd[j] = sign of d(t-j) as seen in symbol t
  logic  e_v, e_ax;
  logic signed [8:0] e_q;
  samp_t y_act;
  cplx_t bd [NFB];

  always_comb begin
    y     = '{re: sat8(32'(f.re) + 32'(p[0].re)), im: sat8(32'(f.im) + 32'(p[0].im))};
    y_act = axis ? y.im : y.re;
    dec   = train ? train_sym : ~y_act[7];
    eps   = (dec ? A : -A) - 9'(y_act);
    // b_j * d(t), d = +/-1 (axis 0) or +/-j (axis 1)
    for (int j = 0; j < NFB; j++) begin
      samp_t br, bi;
      br = coef_re[j][15:8];
      bi = coef_im[j][15:8];
      if (!axis) bd[j] = dec ? '{re: br, im: bi} : '{re: -br, im: -bi};
      else       bd[j] = dec ? '{re: -bi, im: br} : '{re: bi, im: -br};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p <= '{default: '0}; sd <= '{default: 1'b0};
      e_v <= 1'b0; e_q <= '0; e_ax <= 1'b0;
    end else if (init) begin
      p <= '{default: '0}; sd <= '{default: 1'b0};
      e_v <= 1'b0;
    end else if (ph) begin
      if (run) begin
        for (int j = 0; j < NFB - 1; j++)
          p[j] <= '{re: sat8(32'(p[j+1].re) + 32'(bd[j].re)),
                    im: sat8(32'(p[j+1].im) + 32'(bd[j].im))};
        p[NFB-1] <= bd[NFB-1];
        sd[0] <= dec;
        for (int j = 1; j <= NFB; j++) sd[j] <= sd[j-1];
      end
      e_v  <= run & adapt;
      e_q  <= eps;
      e_ax <= axis;
    end
  end

  // Coefficient update, one symbol after the error was formed. Tap k
  // multiplies d(t-1-k); during symbol t+1 its sign is sd[k+1], and it lies on
  // the axis of symbol t exactly when k is odd.
  logic signed [31:0] g [NFB];
  always_comb
    for (int k = 0; k < NFB; k++) begin
      g[k] = (32'(e_q) <<< 8) >>> MU;
      if (!sd[k+1]) g[k] = -g[k];
    end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NFB; k++) begin coef_re[k] <= '0; coef_im[k] <= '0; end
    end else if (init) begin
      for (int k = 0; k < NFB; k++) begin coef_re[k] <= '0; coef_im[k] <= '0; end
    end else if (ph && e_v && adapt) begin
      for (int k = 0; k < NFB; k++) begin
        if (k % 2 == 1)
          coef_re[k] <= sat16(32'(coef_re[k]) + g[k]);
        else if (e_ax)                     // e on Q, d on I: e*conj(d) = j*eps*s
          coef_im[k] <= sat16(32'(coef_im[k]) + g[k]);
        else                               // e on I, d on Q: e*conj(d) = -j*eps*s
          coef_im[k] <= sat16(32'(coef_im[k]) - g[k]);
      end
    end
  end
endmodule
