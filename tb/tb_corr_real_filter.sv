// tb_corr_real_filter: random samples into a 16-tap real correlation filter
// with a two-clock lead; every output is compared with a reference that forms
// the rounded, shifted tap products and the saturating sums (oldest tap
// first) from a history of the input, one clock after the newest sample.
`timescale 1ns/1ps
module tb_corr_real_filter;
  import hl1_pkg::*;
  localparam int N = 16, LEAD = 2, TD = 4;
  localparam logic [N-1:0] COEF = 16'b1011_0010_1110_0101;
  logic clk = 0, rst_n = 0;
  samp_t x = '0, y;
  corr_real_filter #(.NTAPS(N), .COEF(COEF), .SHIFT(5), .LEAD(LEAD)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  samp_t hist [0:LEAD + TD*N + 2];    // hist[k] = x k clocks ago (0 = current)

  function automatic samp_t s8(input int v);
    return (v > 127) ? 8'sd127 : (v < -128) ? -8'sd128 : samp_t'(v);
  endfunction

  function automatic samp_t ref_y();
    int s;
    s = 0;
    for (int i = N - 1; i >= 0; i--) begin
      int p;
      p = (COEF[i] ? int'(hist[LEAD + TD*i]) : -int'(hist[LEAD + TD*i]));
      p = (p + 16) >>> 5;
      s = (i == N - 1) ? int'(s8(p)) : int'(s8(int'(s8(p)) + s));
    end
    return samp_t'(s);
  endfunction

  initial begin
    foreach (hist[k]) hist[k] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 600; n++) begin
      samp_t e;
      // bias some stretches to full scale to reach saturation
      x = (n % 97 < 40) ? samp_t'($urandom_range(0, 255)) : (COEF[n % N] ? 8'sd127 : -8'sd128);
      for (int k = $size(hist) - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      e = ref_y();
      @(posedge clk);
      #1;
      if (n > LEAD + TD*N) begin
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d y=%0d exp %0d", n, y, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
