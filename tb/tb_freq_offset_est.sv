// tb_freq_offset_est: pairs of peak phases, including pairs that straddle the
// +/-180 degree wrap, into the offset estimator; each result is compared with
// the wrapped difference divided by 62 (rounded), must come one clock after
// start, and must stay within 1 unit of the exact quotient.
`timescale 1ns/1ps
module tb_freq_offset_est;
  import hl1_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  phase_t theta_first = '0, theta_second = '0, dphi;
  logic valid;
  freq_offset_est dut (.*);
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 500; k++) begin
      int step, d, e;
      real q;
      // true step up to +/-1.6 degrees per symbol = +/-291 units
      step = $urandom_range(0, 582) - 291;
      theta_first  = phase_t'($urandom);
      theta_second = theta_first + phase_t'(step * 62 + $urandom_range(0, 20) - 10);
      d = int'(phase_t'(theta_second - theta_first));
      q = real'(d) / 62.0;
      e = (d * 1057 + 32768) >>> 16;
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!valid || int'(dphi) != e || (real'(dphi) - q) > 1.0 || (q - real'(dphi)) > 1.0) begin
        failures++;
        if (failures < 5) $display("FAIL d=%0d dphi=%0d exp %0d (%f) valid=%0d", d, dphi, e, q, valid);
      end
      @(negedge clk);
      checks++;
      if (valid) failures++;
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
