// tb_cmul_dbl: random operands into the double-frequency complex multiplier;
// each result is compared with an independently computed, scaled and
// saturated complex product, exactly two symbol periods after its operands.
`timescale 1ns/1ps
module tb_cmul_dbl;
  import hl1_pkg::*;
  logic clk = 0, rst_n = 0, ph = 0;
  cplx_t v = '0, c = '0, y;
  cmul_dbl dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst_n ? ~ph : 1'b0;

  int checks = 0, failures = 0;
  cplx_t exp_q [$];

  function automatic samp_t ref_sat(input int x);
    int s = x >>> 6;
    return (s > 127) ? 8'sd127 : (s < -128) ? -8'sd128 : samp_t'(s);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk iff ph);         // operands sampled on this edge
      begin
        cplx_t e;
        e.re = ref_sat(int'(v.re) * int'(c.re) - int'(v.im) * int'(c.im));
        e.im = ref_sat(int'(v.re) * int'(c.im) + int'(v.im) * int'(c.re));
        exp_q.push_back(e);
      end
      #1;
      if (exp_q.size() > 2) begin
        cplx_t e;
        e = exp_q.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d y=%h exp %h", n, y, e);
        end
      end
      v = '{re: samp_t'($urandom), im: samp_t'($urandom)};
      c = '{re: samp_t'($urandom), im: samp_t'($urandom)};
      if (n % 7 == 0) c = '{re: -8'sd128, im: -8'sd128};
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
