// tb_dlms_dfe: DFE(6,5) with delayed LMS on a multipath channel.
// GMSK-style symbols (I and Q axes alternating) pass through a channel with a
// pre-cursor, a main path and two post-cursors, a fixed 25 degree carrier
// phase and small noise. The equaliser trains for 450 symbols (the preamble
// length) and then runs decision-directed. Checks: the decision/training
// alignment (decision in symbol t refers to the input 5 + CURSOR symbols
// earlier), dec equals the training symbol while training, no decision
// errors after training, and a small final error.
`timescale 1ns/1ps
module tb_dlms_dfe;
  import hl1_pkg::*;
  localparam int CUR = 3, LAT = 5 + CUR, N = 4000, NTRAIN = 450;
  logic clk = 0, rst_n = 0, ph = 0, init = 0, run = 0, adapt = 0;
  logic axis = 0, train = 0, train_sym = 0;
  cplx_t x = '0, y;
  logic dec;
  logic signed [8:0] eps;
  dlms_dfe #(.CURSOR(CUR)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst_n ? ~ph : 1'b0;
  int checks = 0, failures = 0;
  int s [0:N+2];

  initial begin
    real h_re [4], h_im [4];
    real c, sn;
    int dd_err, sum_abs;
    // taps for sym(t+1), sym(t), sym(t-1), sym(t-2)
    h_re = '{0.12, 0.70, 0.0, -0.15};
    h_im = '{0.0, 0.0, 0.28, 0.05};
    c = $cos(25.0 * 3.14159265 / 180.0); sn = $sin(25.0 * 3.14159265 / 180.0);
    for (int t = 0; t <= N + 1; t++) s[t] = $urandom_range(0, 1) ? 1 : -1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk); init = 1; @(negedge clk); init = 0;
    dd_err = 0; sum_abs = 0;
    for (int t = 0; t < N; t++) begin
      real ar, ai, zr, zi;
      int k;
      @(posedge clk iff ph);
      #1;
      // channel output for input index t
      ar = 0; ai = 0;
      for (int m = 0; m < 4; m++) begin
        int u;
        real sr, si;
        u = t + 1 - m;
        if (u >= 0) begin
          sr = (u % 2 == 0) ? s[u] : 0.0;
          si = (u % 2 == 1) ? s[u] : 0.0;
          ar += h_re[m] * sr - h_im[m] * si;
          ai += h_re[m] * si + h_im[m] * sr;
        end
      end
      zr = (ar * c - ai * sn) * 64.0 + ($urandom_range(0, 4) - 2.0);
      zi = (ar * sn + ai * c) * 64.0 + ($urandom_range(0, 4) - 2.0);
      x = '{re: samp_t'($rtoi(zr)), im: samp_t'($rtoi(zi))};
      // controls for the decision made in this symbol (refers to t - LAT)
      k = t - LAT;
      run = (k >= 0);
      adapt = (k >= 0);
      axis = (k >= 0) ? k[0] : 1'b0;
      train = (k >= 0) && (k < NTRAIN);
      train_sym = (k >= 0) ? (s[k] > 0) : 1'b0;
      #1;
      // check the decision of this symbol
      k = t - LAT;
      if (k >= 0) begin
        if (train) begin
          checks++;
          if ((dec ? 1 : -1) != s[k]) begin
            failures++; $display("FAIL training decision at %0d", k);
          end
        end else begin
          checks++;
          if ((dec ? 1 : -1) != s[k]) begin
            dd_err++; failures++;
            if (dd_err < 5) $display("FAIL decision error at %0d", k);
          end
          if (t >= N - 500) sum_abs += (eps < 0) ? -eps : eps;
        end
      end
    end
    $display("decision-directed errors %0d, mean |eps| over last 500 = %0d/500", dd_err, sum_abs);
    checks++;
    if (sum_abs > 500 * 14) begin failures++; $display("FAIL no convergence"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
