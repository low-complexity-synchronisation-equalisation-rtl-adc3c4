// tb_dfe_fbf: feedback section of the equaliser.
// The input f is a GMSK-style symbol stream with post-cursor interference
// from the two previous symbols plus small noise. The first 400 symbols are
// trained with the true symbols, the rest is decision-directed. Every symbol
// the testbench checks, against its own model:
//   y   = f + sum_j b_j(t-1-j) * d(t-1-j)  (transposed filter, coefficients
//         as they were when each product entered the partial sums)
//   dec = training symbol or sign of y on the symbol's axis
//   eps = dec*64 - y_axis
//   coefficient change = (e(t-1) * conj(d(t-2-k)) << 8) >> MU
// and at the end that the error is small and no decision errors occur in
// decision-directed mode.
`timescale 1ns/1ps
module tb_dfe_fbf;
  import hl1_pkg::*;
  localparam int NFB = 5, MU = 6, N = 3000, NTRAIN = 400;
  logic clk = 0, rst_n = 0, ph = 0, init = 0, run = 0, adapt = 0;
  logic axis = 0, train = 0, train_sym = 0;
  cplx_t f = '0, y;
  logic dec;
  logic signed [8:0] eps;
  logic signed [15:0] coef_re [NFB], coef_im [NFB];
  dfe_fbf #(.NFB(NFB), .MU(MU)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst_n ? ~ph : 1'b0;
  int checks = 0, failures = 0;

  int s [0:N];                 // true symbols +/-1
  int dr [0:N], di [0:N];      // decided symbol as complex (+/-1 or +/-j)
  int br [0:N][NFB], bi [0:N][NFB];  // coefficient top bytes seen in symbol t
  int cr [0:N][NFB], ci [0:N][NFB];  // full coefficients seen in symbol t
  int er [0:N], ei [0:N];      // error vector of symbol t

  task automatic fail(string what, int t);
    failures++;
    if (failures < 8) $display("FAIL %s at symbol %0d", what, t);
  endtask

  initial begin
    int dd_err, sum_abs;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    dd_err = 0; sum_abs = 0;
    for (int t = 0; t < N; t++) begin
      int fr, fi, yr, yi, ya, sd, dec_exp;
      @(posedge clk iff ph);
      #1;
      for (int k = 0; k < NFB; k++) begin
        cr[t][k] = coef_re[k]; ci[t][k] = coef_im[k];
        br[t][k] = coef_re[k] >>> 8; bi[t][k] = coef_im[k] >>> 8;
      end
      // coefficient update made at the edge just passed used e(t-2)
      if (t >= 2 + NFB + 1) begin
        for (int k = 0; k < NFB; k++) begin
          int pr, pi, gr, gi;
          // e * conj(d)
          pr = er[t-2] * dr[t-3-k] + ei[t-2] * di[t-3-k];
          pi = ei[t-2] * dr[t-3-k] - er[t-2] * di[t-3-k];
          gr = (pr <<< 8) >>> MU; gi = (pi <<< 8) >>> MU;
          checks++;
          if (cr[t][k] - cr[t-1][k] != gr || ci[t][k] - ci[t-1][k] != gi)
            fail($sformatf("update tap %0d", k), t);
        end
      end
      // new symbol on axis t%2, channel: 0.94 s(t) + 0.25 s(t-1) rotated by j
      // + (-0.15) s(t-2), plus noise
      s[t] = $urandom_range(0, 1) ? 1 : -1;
      fr = $urandom_range(0, 6) - 3; fi = $urandom_range(0, 6) - 3;
      if (t % 2 == 0) fr += 60 * s[t]; else fi += 60 * s[t];
      if (t >= 1) begin   // 0.25j * s(t-1) on axis (t-1)%2
        if ((t-1) % 2 == 0) fi += 16 * s[t-1]; else fr -= 16 * s[t-1];
      end
      if (t >= 2) begin
        if ((t-2) % 2 == 0) fr -= 10 * s[t-2]; else fi -= 10 * s[t-2];
      end
      f = '{re: samp_t'(fr), im: samp_t'(fi)};
      axis = t % 2;
      train = (t < NTRAIN);
      train_sym = (s[t] > 0);
      run = 1; adapt = 1;
      // model
      yr = fr; yi = fi;
      for (int j = 0; j < NFB; j++) begin
        int u;
        u = t - 1 - j;
        if (u >= 0) begin
          // b_j(u) * d(u)
          yr += br[u][j] * dr[u] - bi[u][j] * di[u];
          yi += br[u][j] * di[u] + bi[u][j] * dr[u];
        end
      end
      ya = axis ? yi : yr;
      dec_exp = train ? s[t] : (ya < 0 ? -1 : 1);
      #1;
      checks++;
      if (y.re != yr || y.im != yi) fail($sformatf("y (%0d,%0d) exp (%0d,%0d)", y.re, y.im, yr, yi), t);
      checks++;
      if ((dec ? 1 : -1) != dec_exp) fail("decision", t);
      checks++;
      if (eps != dec_exp * 64 - ya) fail("error", t);
      sd = dec ? 1 : -1;
      dr[t] = axis ? 0 : sd; di[t] = axis ? sd : 0;
      er[t] = axis ? 0 : int'(eps); ei[t] = axis ? int'(eps) : 0;
      if (!train && sd != s[t]) dd_err++;
      if (t >= N - 500) sum_abs += (eps < 0) ? -eps : eps;
    end
    $display("decision-directed errors %0d, mean |eps| over last 500 = %0d/500", dd_err, sum_abs);
    checks++; if (dd_err != 0) fail("decision errors", N);
    checks++; if (sum_abs > 500 * 12) fail("no convergence", N);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
