// tb_mag_approx: corner and random (V, W) pairs into the magnitude
// approximation; each registered result is compared with
// max(G, G - floor(G/8) + floor(L/2)) computed here, and the approximation is
// checked to stay within -1 .. +12 % of the true magnitude for large vectors.
`timescale 1ns/1ps
module tb_mag_approx;
  import hl1_pkg::*;
  logic clk = 0, rst_n = 0, en = 0;
  samp_t v = '0, w = '0;
  logic [8:0] mag;
  mag_approx dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int n = 0; n < 2000; n++) begin
      int av, aw, g, l, e;
      real t;
      if (n < 4) begin
        v = (n[0]) ? -8'sd128 : 8'sd127;
        w = (n[1]) ? -8'sd128 : 8'sd0;
      end else begin
        v = samp_t'($urandom);
        w = samp_t'($urandom);
      end
      en = 1;
      @(negedge clk);
      en = 0;
      av = (v < 0) ? -int'(v) : int'(v);
      aw = (w < 0) ? -int'(w) : int'(w);
      g = (av > aw) ? av : aw;
      l = (av > aw) ? aw : av;
      e = g - g / 8 + l / 2;
      if (e < g) e = g;
      checks++;
      if (int'(mag) != e) begin
        failures++;
        if (failures < 5) $display("FAIL v=%0d w=%0d mag=%0d exp %0d", v, w, mag, e);
      end
      t = $sqrt(real'(av * av + aw * aw));
      if (t > 40.0) begin
        checks++;
        if (real'(mag) < 0.95 * t || real'(mag) > 1.12 * t) begin
          failures++;
          $display("FAIL accuracy v=%0d w=%0d mag=%0d true %f", v, w, mag, t);
        end
      end
      // hold: without en the output must not change
      v = samp_t'($urandom);
      @(negedge clk);
      checks++;
      if (int'(mag) != e) failures++;
    end
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
