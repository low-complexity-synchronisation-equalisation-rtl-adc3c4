// tb_peak_detector: magnitude sequences with known peaks. For each window the
// testbench predicts, from the sequence alone, the sample that opens the
// window (first above the threshold), the largest sample within the next 8
// (earliest of equal maxima) and the clock on which the report must appear;
// it checks the reported magnitude, time stamp and correlation value, that
// exactly one report appears per window, and that clear abandons a search.
`timescale 1ns/1ps
module tb_peak_detector;
  import hl1_pkg::*;
  localparam int W = 8;
  localparam logic [8:0] TH = 9'd48;
  logic clk = 0, rst_n = 0, en = 0, clear = 0;
  logic [8:0] mag = '0;
  cplx_t corr = '0;
  logic [15:0] ts = '0;
  logic peak_valid;
  cplx_t peak_corr;
  logic [8:0] peak_mag;
  logic [15:0] peak_ts;
  peak_detector #(.WINDOW(W), .THRESH(TH)) dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0, reports = 0;
  always @(posedge clk) if (peak_valid) reports++;

  logic [8:0] seq [200];

  task automatic check(input bit ok, input string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    int exp_ts [$], exp_mag [$], exp_end [$];
    // build: noise below threshold with peaks at chosen places
    for (int i = 0; i < 200; i++) seq[i] = 9'($urandom_range(0, 40));
    seq[20] = 50; seq[23] = 90; seq[25] = 70;            // window 20..27, max at 23
    seq[60] = 60; seq[61] = 75; seq[64] = 75;            // tie: earliest (61)
    seq[67] = 80;                                         // 8th sample of window 60..67
    seq[100] = 49;                                        // lone crossing
    seq[150] = 120;                                       // cleared mid-window
    // expected reports computed from the sequence
    begin
      int i = 0;
      while (i < 200) begin
        if (seq[i] > TH && !(i >= 150 && i < 158)) begin
          int best;
          best = i;
          for (int k = i; k < i + W && k < 200; k++) if (seq[k] > seq[best]) best = k;
          exp_ts.push_back(best); exp_mag.push_back(seq[best]); exp_end.push_back(i + W - 1);
          i += W;
        end else i++;
      end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      mag = seq[i]; ts = 16'(i); corr = '{re: samp_t'(i), im: samp_t'(-i)};
      en = 1;
      clear = (i == 153);
      @(negedge clk);
      en = 0; clear = 0;
      if (peak_valid) begin
        check(exp_ts.size() > 0, "unexpected report");
        if (exp_ts.size() > 0) begin
          int et, em;
          et = exp_ts.pop_front(); em = exp_mag.pop_front();
          check(i == exp_end.pop_front(), $sformatf("report after sample %0d", i));
          check(int'(peak_ts) == et && int'(peak_mag) == em,
                $sformatf("report ts=%0d mag=%0d, expected ts=%0d mag=%0d", peak_ts, peak_mag, et, em));
          check(peak_corr.re == samp_t'(et), "correlation value of the peak");
        end
      end
      @(negedge clk);
      check(!peak_valid, "report lasts one clock");
    end
    check(exp_ts.size() == 0, $sformatf("%0d reports missing", exp_ts.size()));
    check(reports == 3, $sformatf("reports %0d, expected 3", reports));
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
