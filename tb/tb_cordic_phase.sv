// tb_cordic_phase: vectors on all octant boundaries and at random into the
// phase calculator. Each result is checked (1) against atan2 to within half a
// rotation step plus a small margin for the fixed-point rotation, and (2)
// bit-exactly against a model of the fold / count / unfold procedure, and the
// number of clocks from start to done is checked against the model's
// rotation count (done rises n + 2 clocks after the edge that takes start).
// A second instance runs the finer option with a 5-bit shift (1.79 degree
// step, up to 26 rotations) on the same vectors; its accuracy is checked on
// vectors of length 80 or more, since the 4 guard bits limit it on short ones.
`timescale 1ns/1ps
module tb_cordic_phase;
  import hl1_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  samp_t x = '0, y = '0;
  logic busy, done;
  phase_t phase;
  cordic_phase dut (.*);
  logic busy2, done2;
  phase_t phase2;
  cordic_phase #(.SHIFT(5), .MAXIT(26), .STEP(326)) dut2 (.clk, .rst_n, .start,
    .x, .y, .busy(busy2), .done(done2), .phase(phase2));
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  localparam real TWO_PI = 6.283185307179586;

  // model: returns phase, and the rotation count in n
  function automatic phase_t model(input int xi, input int yi, output int n,
                                   input int sh = 4, input int maxit = 13, input int step = 651);
    int ax, ay, xr, yr, a, t;
    bit sw;
    ax = xi < 0 ? -xi : xi;
    ay = yi < 0 ? -yi : yi;
    sw = ay > ax;
    xr = (sw ? ay : ax) * 16;
    yr = (sw ? ax : ay) * 16;
    n = 0;
    while (yr > 0 && n < maxit) begin
      t  = xr + (yr >>> sh);
      yr = yr - (xr >>> sh);
      xr = t;
      n++;
    end
    a = (n == 0) ? 0 : n * step - step / 2;
    if (sw) a = 16384 - a;
    if (xi < 0) a = 32768 - a;
    if (yi < 0) a = -a;
    return phase_t'(a);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < 600; k++) begin
      int n, cyc, err, n2, cyc2, cyc1, err2;
      phase_t e, e2;
      real tr;
      if (k < 16) begin
        int ang;
        ang = k * 45;        // boundary vectors of magnitude ~100
        x = samp_t'($rtoi(100.0 * $cos(real'(ang) * TWO_PI / 360.0)));
        y = samp_t'($rtoi(100.0 * $sin(real'(ang) * TWO_PI / 360.0)));
      end else begin
        do begin
          x = samp_t'($urandom); y = samp_t'($urandom);
        end while (int'(x) * int'(x) + int'(y) * int'(y) < 400);
      end
      e = model(int'(x), int'(y), n);
      e2 = model(int'(x), int'(y), n2, 5, 26, 326);
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1; cyc2 = 0; cyc1 = 0;
      while (cyc2 == 0 && cyc < 40) begin
        @(negedge clk); cyc++;
        if (done) cyc1 = cyc;
        if (done2) begin
          cyc2 = cyc;
          checks++;
          if (phase2 !== e2 || cyc2 != n2 + 3) begin
            failures++;
            if (failures < 6) $display("FAIL fine x=%0d y=%0d phase=%0d exp %0d cycles %0d exp %0d", x, y, phase2, e2, cyc2, n2 + 3);
          end
        end
      end
      // the coarse instance holds its result; its done pulse was at n + 3
      checks++;
      if (phase !== e || cyc1 != n + 3) begin
        failures++;
        if (failures < 6) $display("FAIL x=%0d y=%0d phase=%0d exp %0d cycles %0d exp %0d", x, y, phase, e, cyc1, n + 3);
      end
      tr  = $atan2(real'(y), real'(x)) / TWO_PI * 65536.0;
      err = int'(phase) - $rtoi(tr);
      if (err > 32768) err -= 65536;
      if (err < -32768) err += 65536;
      // accuracy bound for vectors at least as long as a detected peak
      if (int'(x) * int'(x) + int'(y) * int'(y) >= 1600) checks++;
      if (int'(x) * int'(x) + int'(y) * int'(y) >= 1600 && (err > 420 || err < -420)) begin
        failures++;
        if (failures < 6) $display("FAIL accuracy x=%0d y=%0d phase=%0d true %f", x, y, phase, tr);
      end
      err2 = int'(phase2) - $rtoi(tr);
      if (err2 > 32768) err2 -= 65536;
      if (err2 < -32768) err2 += 65536;
      // the finer step needs a longer vector for the same fixed-point margin
      if (int'(x) * int'(x) + int'(y) * int'(y) >= 6400) begin
        checks++;
        if (err2 > 260 || err2 < -260) begin
          failures++;
          if (failures < 6) $display("FAIL fine accuracy x=%0d y=%0d phase=%0d true %f", x, y, phase2, tr);
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
