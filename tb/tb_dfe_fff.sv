// tb_dfe_fff: feedforward filter of the equaliser.
// Part 1: after init (cursor tap = 1.0) and without adaptation the output must
// be the input delayed by exactly 5 + CURSOR symbols (input register plus a 4-symbol pipeline).
// Part 2: the testbench closes an LMS loop around the filter: the input is a
// GMSK-style symbol stream through a 2-path channel, and the testbench forms
// the real error eps = s*64 - (Re or Im of f) on each symbol's axis. Every
// coefficient change must equal the delayed-LMS step computed here from eps
// two symbols earlier and the input history (mu = 2^-6), and the loop must
// converge (mean |eps| small at the end).
`timescale 1ns/1ps
module tb_dfe_fff;
  import hl1_pkg::*;
  localparam int NFF = 6, CUR = 3, MU = 6;
  logic clk = 0, rst_n = 0, ph = 0, init = 0, adapt = 0, err_valid = 0, err_axis = 0;
  logic signed [8:0] eps = '0;
  cplx_t x = '0, f;
  logic signed [15:0] coef_re [NFF], coef_im [NFF];
  dfe_fff #(.NFF(NFF), .CURSOR(CUR), .MU(MU)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst_n ? ~ph : 1'b0;
  int checks = 0, failures = 0;

  cplx_t xh [0:4000];
  int eh [0:4000];
  bit axh [0:4000];
  int sgn [0:4000];

  initial begin
    int u, sum_abs;
    logic signed [15:0] pre_re [NFF], pre_im [NFF];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    init = 1; @(negedge clk); init = 0;
    // Part 1
    for (u = 0; u < 200; u++) begin
      @(posedge clk iff ph);
      #1;
      if (u >= 5 + CUR + 1) begin
        checks++;
        if (f !== xh[u - 5 - CUR]) begin
          failures++;
          if (failures < 5) $display("FAIL latency u=%0d f=%h exp %h", u, f, xh[u - 5 - CUR]);
        end
      end
      xh[u] = '{re: samp_t'($urandom_range(0, 200) - 100), im: samp_t'($urandom_range(0, 200) - 100)};
      x = xh[u];
    end
    // Part 2: LMS loop
    @(negedge clk);
    init = 1; @(negedge clk); init = 0;
    adapt = 1;
    sum_abs = 0;
    for (u = 0; u < 3000; u++) begin
      int s0, s1;
      real yr, yi;
      @(posedge clk iff ph);
      #1;
      // check coefficient changes made at the edge just passed
      if (u >= 12) begin
        for (int i = 0; i < NFF; i++) begin
          int gr, gi, e;
          cplx_t xv;
          e = eh[u - 2]; xv = xh[u - 7 - i];
          if (!axh[u - 2]) begin gr = e * xv.re; gi = -(e * xv.im); end
          else begin gr = e * xv.im; gi = e * xv.re; end
          checks++;
          if (int'(coef_re[i]) - int'(pre_re[i]) != (gr >>> (MU - 2)) ||
              int'(coef_im[i]) - int'(pre_im[i]) != (gi >>> (MU - 2))) begin
            failures++;
            if (failures < 5) $display("FAIL update u=%0d tap %0d", u, i);
          end
        end
      end
      pre_re = coef_re; pre_im = coef_im;
      // symbol stream: symbol u on axis u%2; channel 0.8 s(u) + 0.4j s(u-1)
      sgn[u] = $urandom_range(0, 1) ? 1 : -1;
      yr = 0; yi = 0;
      if (u % 2 == 0) yr += 0.8 * sgn[u]; else yi += 0.8 * sgn[u];
      if (u > 0) begin
        // 0.4j times the previous symbol (other axis)
        if ((u - 1) % 2 == 0) yi += 0.4 * sgn[u - 1]; else yr -= 0.4 * sgn[u - 1];
      end
      xh[u] = '{re: samp_t'($rtoi(64.0 * yr)), im: samp_t'($rtoi(64.0 * yi))};
      x = xh[u];
      // error for the current output f(u), which belongs to symbol u - 5 - CUR
      if (u >= 5 + CUR) begin
        int k, act;
        k = u - 5 - CUR;
        act = (k % 2 == 0) ? int'(f.re) : int'(f.im);
        eh[u] = sgn[k] * 64 - act;
        axh[u] = (k % 2 == 1);
        err_valid = 1;
        if (u > 2800) sum_abs += (eh[u] < 0) ? -eh[u] : eh[u];
      end else begin
        eh[u] = 0; axh[u] = 0; err_valid = 0;
      end
      eps = 9'(eh[u]);
      err_axis = axh[u];
    end
    checks++;
    $display("mean |eps| over the last 199 symbols: %0d/199", sum_abs);
    if (sum_abs > 199 * 8) begin failures++; $display("FAIL no convergence"); end
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
