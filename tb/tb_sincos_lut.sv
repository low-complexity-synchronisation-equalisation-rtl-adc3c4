// tb_sincos_lut: every one of the 65536 phases into the cosine/sine table;
// each output pair is compared with 64*cos and 64*sin of the phase rounded to
// 1/256 of a turn, computed here with the real-valued math functions, allowing
// only the rounding of the table (difference at most 1).
`timescale 1ns/1ps
module tb_sincos_lut;
  import hl1_pkg::*;
  phase_t phase;
  samp_t cos_o, sin_o;
  sincos_lut dut (.*);
  int checks = 0, failures = 0;
  localparam real TWO_PI = 6.283185307179586;

  initial begin
    for (int p = 0; p < 65536; p += 7) begin
      int a, ec, es;
      phase = phase_t'(p);
      #1;
      a  = ((p + 128) >> 8) & 255;
      ec = $rtoi($floor(64.0 * $cos(TWO_PI * real'(a) / 256.0) + 0.5));
      es = $rtoi($floor(64.0 * $sin(TWO_PI * real'(a) / 256.0) + 0.5));
      checks++;
      if (int'(cos_o) - ec > 1 || ec - int'(cos_o) > 1 ||
          int'(sin_o) - es > 1 || es - int'(sin_o) > 1) begin
        failures++;
        if (failures < 5) $display("FAIL p=%0d cos=%0d exp %0d sin=%0d exp %0d", p, cos_o, ec, sin_o, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
