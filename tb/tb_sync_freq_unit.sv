// tb_sync_freq_unit: synchronisation and coarse frequency estimation.
// Each packet is a random header, three m1 repetitions, the rest of a
// 450-symbol preamble and data, rotated by a carrier offset (phase step dphi
// per symbol, start phase theta0) with small noise. Packet 2 carries an extra
// m1 copy inside the header, whose peak is 64 symbols before the true first
// peak and must be rejected by the pairing rule. Checks per packet: exactly
// one sync_valid, second peak time stamp at the last chip of m1 #3, phase
// step estimate within 12 units (0.07 degrees/symbol) and theta2 within 10
// degrees of the carrier phase at the centre of m1 #3 (the correlator's 5-bit
// product shift quantises small sample components, which biases the peak
// phase by a few degrees; the equaliser absorbs a fixed phase error). The
// input level is 1.0 (64), the level the correlator threshold is set for.
`timescale 1ns/1ps
module tb_sync_freq_unit;
  import hl1_pkg::*;
  localparam int HDR = 80, PRE = 450, NSYM = HDR + PRE + 60;
  localparam real PI = 3.14159265358979;
  logic clk = 0, rst_n = 0, ph = 0, restart = 0;
  cplx_t r = '0;
  logic [15:0] ts = '0;
  logic sync_valid, synced, peak_seen, pair_rejected;
  logic [15:0] peak2_ts;
  phase_t theta2, dphi;
  sync_freq_unit dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst_n ? ~ph : 1'b0;
  int checks = 0, failures = 0;
  int n_sync = 0, n_rej = 0, n_peaks = 0;
  always @(posedge clk) begin
    if (sync_valid) n_sync++;
    if (pair_rejected) n_rej++;
    if (peak_seen) n_peaks++;
  end
  bit sym_bit [NSYM];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic samp_t q8(input real v);
    int i;
    i = $rtoi(v * 64.0 + (v >= 0 ? 0.5 : -0.5));
    if (i > 127) i = 127;
    if (i < -128) i = -128;
    return samp_t'(i);
  endfunction

  function automatic int wrap(input int a);
    int b;
    b = a % 65536;
    if (b >= 32768) b -= 65536;
    if (b < -32768) b += 65536;
    return b;
  endfunction

  task automatic run_packet(input int seed, input int step, input int theta0, input bit spurious);
    logic [8:0] lfsr;
    int s0, s1, s2, exp_th;
    void'($urandom(seed));
    for (int k = 0; k < NSYM; k++) sym_bit[k] = 1'($urandom_range(0, 1));
    if (spurious)   // m1 64 symbols before the real one (same axis parity)
      for (int p = 0; p < 31; p++) sym_bit[HDR - 64 + p] = M1_DEFAULT[p];
    for (int p = 0; p < 93; p++) sym_bit[HDR + p] = M1_DEFAULT[p % 31];
    lfsr = 9'h1ab;
    for (int p = 93; p < PRE; p++) begin
      sym_bit[HDR + p] = lfsr[0];
      lfsr = {lfsr[4] ^ lfsr[0], lfsr[8:1]};
    end
    s0 = n_sync; s1 = n_rej; s2 = n_peaks;
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    for (int k = 0; k < NSYM; k++) begin
      real a, sr, si, phs, nr, ni;
      @(posedge clk iff ph);
      #1;
      a = sym_bit[k] ? 1.0 : -1.0;
      if (((k - HDR) % 2 + 2) % 2 == 0) begin sr = a; si = 0; end
      else begin sr = 0; si = a; end
      phs = 2.0 * PI * real'(theta0 + step * k) / 65536.0;
      nr = 0.02 * (real'($urandom_range(0, 100)) - 50.0) / 50.0;
      ni = 0.02 * (real'($urandom_range(0, 100)) - 50.0) / 50.0;
      r = '{re: q8(1.0 * (sr * $cos(phs) - si * $sin(phs)) + nr),
            im: q8(1.0 * (sr * $sin(phs) + si * $cos(phs)) + ni)};
      ts = 16'(k);
    end
    exp_th = wrap(theta0 + step * (HDR + 77));
    $display("packet step %0d: peak2_ts %0d, dphi %0d, theta2 %0d (expected %0d), peaks %0d, rejected %0d",
             step, peak2_ts, $signed(dphi), $signed(theta2), exp_th, n_peaks - s2, n_rej - s1);
    check(n_sync - s0 == 1, "one sync per packet");
    check(synced, "synced");
    check(int'(peak2_ts) == HDR + 92, $sformatf("peak2_ts %0d expected %0d", peak2_ts, HDR + 92));
    check(wrap(int'($signed(dphi)) - step) <= 12 && wrap(int'($signed(dphi)) - step) >= -12, "phase step");
    check(wrap(int'($signed(theta2)) - exp_th) <= 1820 && wrap(int'($signed(theta2)) - exp_th) >= -1820, "theta2");
    if (spurious) check(n_rej - s1 >= 1, "spurious peak rejected");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_packet(11, 167, 5000, 0);
    run_packet(12, -250, -20000, 1);
    run_packet(13, 0, 30000, 0);
    run_packet(14, 290, 12345, 0);
    run_packet(15, -290, 0, 1);
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
