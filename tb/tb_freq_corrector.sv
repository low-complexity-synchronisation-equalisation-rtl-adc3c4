// tb_freq_corrector: a rotating carrier r(n) = A*exp(j*(theta0 + w*n)) with
// random A, theta0 and w is derotated after a load with the true phase
// reference and step; every derotated sample must lie within 3 LSB of
// A*exp(j*0) per component (table and product rounding), the output must be
// flagged valid exactly from the first derotated sample (two symbols after
// the first sample taken), and clear must stop the derotation.
`timescale 1ns/1ps
module tb_freq_corrector;
  import hl1_pkg::*;
  logic clk = 0, rst_n = 0, ph = 0, load = 0, clear = 0;
  phase_t theta_ref = '0, dphi = '0;
  logic [15:0] ts_ref = '0, ts = '0;
  cplx_t r = '0, z;
  logic valid;
  freq_corrector dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst_n ? ~ph : 1'b0;
  localparam real TWO_PI = 6.283185307179586;
  int checks = 0, failures = 0;

  task automatic trial(input int amp, input real th0, input real w);
    int first_taken, nvalid;
    int n;
    real a;
    ts_ref = 16'($urandom_range(0, 1000));
    theta_ref = phase_t'($rtoi((th0 + w * real'(ts_ref)) / TWO_PI * 65536.0));
    dphi = phase_t'($rtoi(w / TWO_PI * 65536.0 + (w >= 0 ? 0.5 : -0.5)));
    first_taken = -1; nvalid = 0;
    for (int k = 0; k < 120; k++) begin
      @(posedge clk iff ph);
      #1;
      ts = ts + 1'b1;
      n = int'(ts);
      a = th0 + real'(dphi) / 65536.0 * TWO_PI * real'(n);
      r = '{re: samp_t'($rtoi(real'(amp) * $cos(a))), im: samp_t'($rtoi(real'(amp) * $sin(a)))};
      if (k == 10) begin
        @(negedge clk);
        load = 1;
        @(negedge clk);
        load = 0;
        first_taken = k;
      end
      if (valid) begin
        nvalid++;
        checks++;
        if (z.re - amp > 3 || amp - z.re > 3 || z.im > 3 || z.im < -3) begin
          failures++;
          if (failures < 5) $display("FAIL k=%0d z=%0d,%0d amp %0d", k, z.re, z.im, amp);
        end
      end
    end
    // sample first_taken is taken at the next symbol edge; its result, and
    // valid, follow two symbol edges later
    checks++;
    if (nvalid != 120 - (first_taken + 3)) begin
      failures++;
      $display("FAIL valid for %0d symbols, expected %0d", nvalid, 120 - (first_taken + 3));
    end
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    repeat (8) @(posedge clk);
    checks++;
    if (valid) begin failures++; $display("FAIL valid after clear"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    trial(64, 0.3, 0.0277);       // +104 kHz at 23.5 Mbaud
    trial(90, -2.0, -0.0150);
    trial(40, 2.9, 0.0050);
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
