// tb_complex_correlator: random complex samples, then clean GMSK-style m1
// repetitions, into the correlator. Each output is compared, two symbols after
// its last input sample, with C(n) = sum_k q(r(n-30+k) * conj(c_k)) computed
// directly from the definition (c_k = b_k on the real axis for even k, on the
// imaginary axis for odd k; q = rounded division by 32 per component). The
// clean sequence must give the full peak of 62 on the first and third
// repetition and no peak on the second, which has odd chip alignment.
`timescale 1ns/1ps
module tb_complex_correlator;
  import hl1_pkg::*;
  logic clk = 0, rst_n = 0, ph = 0;
  cplx_t r = '0, corr;
  complex_correlator dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst_n ? ~ph : 1'b0;

  int checks = 0, failures = 0;
  cplx_t hist [0:40];
  int bk [31];

  function automatic int q(input int v); return (v + 16) >>> 5; endfunction

  function automatic cplx_t ref_c();
    int vr, wi;
    vr = 0; wi = 0;
    for (int k = 0; k < 31; k++) begin
      cplx_t s;
      s = hist[30 - k];                 // r(n-30+k)
      if (k % 2 == 0) begin             // conj(b) = b
        vr += q(bk[k] * int'(s.re));
        wi += q(bk[k] * int'(s.im));
      end else begin                    // conj(j b) = -j b: (a+jb')(-j b) = b b' - j b a
        vr += q(bk[k] * int'(s.im));
        wi -= q(bk[k] * int'(s.re));
      end
    end
    return '{re: samp_t'(vr), im: samp_t'(wi)};
  endfunction

  initial begin
    cplx_t exp_q [$];
    int peaks_at [$];
    for (int k = 0; k < 31; k++) bk[k] = M1_DEFAULT[k] ? 1 : -1;
    foreach (hist[i]) hist[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk iff ph);             // r of symbol n-1 was sampled; new symbol starts
      #1;
      if (exp_q.size() > 1) begin
        cplx_t e;
        e = exp_q.pop_front();
        checks++;
        if (corr !== e) begin
          failures++;
          if (failures < 5) $display("FAIL n=%0d corr=%h exp %h", n, corr, e);
        end
        if (n >= 200 && (corr.re > 50 || corr.re < -50)) peaks_at.push_back(n);
      end
      if (n < 200) r = '{re: samp_t'($urandom), im: samp_t'($urandom)};
      else begin
        int p, b;
        p = n - 200;                      // preamble position
        b = bk[p % 31];
        r = (p % 2 == 0) ? '{re: samp_t'(64 * b), im: 8'sd0} : '{re: 8'sd0, im: samp_t'(64 * b)};
        if (p >= 93) r = '0;
      end
      for (int k = 40; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = r;
      exp_q.push_back(ref_c());
    end
    // peaks: last chip of repetition 1 at p = 30 and of repetition 3 at p = 92;
    // loop index n sees C(p) at n = 200 + p + 2
    checks++;
    if (peaks_at.size() != 2 || peaks_at[0] != 232 || peaks_at[1] != 294) begin
      failures++;
      $display("FAIL peaks at %p", peaks_at);
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
