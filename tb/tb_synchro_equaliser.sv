// tb_synchro_equaliser: end-to-end test of the synchro-equaliser.
//
// Four packets are sent through a simulated radio channel. Each packet is a
// header of random symbols (time for the antenna measurement), the 450-symbol
// preamble (m1 three times, then stand-in training symbols from an LFSR) and
// random data. Symbols are GMSK-like: position p carries +/-1 on the real axis
// for even p and on the imaginary axis for odd p. The channel is a 3-path
// complex multipath response, a carrier frequency offset, a constant carrier
// phase and a little noise, quantised to 8-bit Q1.6; antenna A and B get the
// same signal with different gains.
//   packet 1: diversity on, antenna B stronger, +60 kHz offset
//   packet 2: diversity off, -90 kHz offset, other carrier phase
//   packet 3: diversity on, antenna A stronger, +104 kHz (largest offset)
//   packet 4: diversity on, antenna B stronger, -104 kHz
// Checked: synchronisation on the third m1 at the expected sample, the
// frequency step against the true offset, the antenna choice, and the data
// decisions against the transmitted data after training (no errors allowed
// after the first 32 data symbols), and that the main path ends on the
// cursor tap of the feedforward filter. Counted mechanisms: antenna switch to B,
// correlation peaks, synchronisation, training->decision-directed switch.
`timescale 1ns/1ps
module tb_synchro_equaliser;
  import hl1_pkg::*;

  localparam int HDR = 64, PRE = 450, NDATA = 400;
  localparam int NSYM = HDR + PRE + NDATA + 40;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  logic sym_en, rx_start = 0, div_en = 1;
  cplx_t ant_a = '0, ant_b = '0;
  logic [15:0] train_pos;
  logic train_req, train_sym, dout_valid, dout, ant_sel, synced;
  logic peak_seen, pair_rejected;
  cplx_t eq_out;
  logic signed [8:0] eq_err;
  phase_t freq_step, peak_phase;
  logic [15:0] peak_ts;

  synchro_equaliser dut (.*);

  always #10.4 clk = ~clk;   // 48 MHz

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // Symbol sequence of the current packet (index = preamble position + HDR).
  bit sym_bit [NSYM];
  int pkt_base_ts;          // dut sample index of header symbol 0 (approx.)
  bit pre_bit [PRE + NDATA + 40];

  // training: the caller's copy of preamble (and, for checking, data)
  always_comb train_sym = (int'(train_pos) < PRE + NDATA + 40) ? pre_bit[train_pos] : 1'b0;

  // Channel
  real h_re [3] = '{0.75, 0.30, 0.00};
  real h_im [3] = '{0.00, 0.20, -0.15};
  real gain_a, gain_b, f_off_hz, phi0;
  int  sidx;  // index of symbol being transmitted

  function automatic real gnoise();
    real s = 0;
    for (int k = 0; k < 4; k++) s += real'($urandom_range(0, 65535)) / 65535.0 - 0.5;
    return s;      // sigma ~ 0.58
  endfunction

  function automatic samp_t q8(input real v);
    int i;
    i = $rtoi(v * 64.0 + (v >= 0 ? 0.5 : -0.5));
    if (i > 127) i = 127;
    if (i < -128) i = -128;
    return samp_t'(i);
  endfunction

  // transmitted complex symbol k of the current packet
  task automatic txsym(input int k, output real re, output real im);
    real a;
    if (k < 0 || k >= NSYM) begin re = 0; im = 0; return; end
    a = sym_bit[k] ? 1.0 : -1.0;
    if (((k - HDR) % 2 + 2) % 2 == 0) begin re = a; im = 0; end
    else begin re = 0; im = a; end
  endtask

  task automatic send_symbol(input int k);
    real yr = 0, yi = 0, sr, si, ph, cr, ci, nr, ni;
    for (int l = 0; l < 3; l++) begin
      txsym(k - l, sr, si);
      yr += h_re[l] * sr - h_im[l] * si;
      yi += h_re[l] * si + h_im[l] * sr;
    end
    ph = phi0 + 2.0 * PI * f_off_hz * real'(k) / 23.5294e6;
    cr = yr * $cos(ph) - yi * $sin(ph);
    ci = yr * $sin(ph) + yi * $cos(ph);
    nr = 0.04 * gnoise(); ni = 0.04 * gnoise();
    ant_a <= '{re: q8(gain_a * cr + nr), im: q8(gain_a * ci + ni)};
    nr = 0.04 * gnoise(); ni = 0.04 * gnoise();
    ant_b <= '{re: q8(gain_b * cr + nr), im: q8(gain_b * ci + ni)};
  endtask

  // Build packet symbols.
  task automatic make_packet(input int seed);
    logic [8:0] lfsr;
    void'($urandom(seed));
    for (int k = 0; k < NSYM; k++) sym_bit[k] = 1'($urandom_range(0, 1));
    for (int p = 0; p < 93; p++) sym_bit[HDR + p] = M1_DEFAULT[p % 31];
    lfsr = 9'h1ab;
    for (int p = 93; p < PRE; p++) begin
      sym_bit[HDR + p] = lfsr[0];
      lfsr = {lfsr[4] ^ lfsr[0], lfsr[8:1]};
    end
    for (int p = 0; p < PRE + NDATA + 40 && HDR + p < NSYM; p++) pre_bit[p] = sym_bit[HDR + p];
  endtask

  // mechanism counters
  int maxmag = 0;
  always @(posedge clk) if (dut.u_sync.mag > maxmag) maxmag = dut.u_sync.mag;
  int n_peaks = 0, n_sync = 0, n_switch_b = 0, n_dd = 0, n_rej = 0;
  logic train_req_d = 0;
  always @(posedge clk) begin
    if (peak_seen) n_peaks++;
    if (pair_rejected) n_rej++;
    if (dut.u_sync.sync_valid) n_sync++;
    if (sym_en) begin
      train_req_d <= train_req;
      if (train_req_d && !train_req && dut.run) n_dd++;
    end
  end

  // data checking
  int data_err = 0, data_cnt = 0, data_seen = 0;
  bit checking = 0;
  always @(posedge clk) if (checking && dout_valid) begin
    data_seen++;
    if (int'(train_pos) >= PRE && int'(train_pos) < PRE + NDATA) begin
      if (int'(train_pos) >= PRE + 32) begin
        data_cnt++;
        if (dout != pre_bit[train_pos]) data_err++;
      end
    end
  end

  task automatic run_packet(input int seed, input bit div, input real ga, input real gb,
                            input real foff, input real p0, input bit expect_b);
    int k;
    longint ts_hdr;
    real true_step, est_step;
    make_packet(seed);
    gain_a = ga; gain_b = gb; f_off_hz = foff; phi0 = p0; div_en = div;
    data_err = 0; data_cnt = 0; data_seen = 0; maxmag = 0;
    // packet start
    @(posedge clk iff sym_en);
    rx_start <= 1;
    @(posedge clk);
    rx_start <= 0;
    ts_hdr = -1;
    checking = 1;
    for (k = 0; k < NSYM; k++) begin
      @(posedge clk iff sym_en);
      send_symbol(k);
      if (k == 0) ts_hdr = longint'(dut.ts) + 2;  // sample index the top gives symbol 0
    end
    repeat (40) @(posedge clk iff sym_en);
    checking = 0;
    $display("largest correlation magnitude %0d", maxmag);
    check(synced, "synchronised");
    // m1 #3 ends at preamble position 92; the strongest path (h0) has no delay
    check(longint'(peak_ts) == ts_hdr + HDR + 92,
          $sformatf("peak at sample %0d, expected %0d", peak_ts, ts_hdr + HDR + 92));
    true_step = foff / 23.5294e6 * 65536.0;
    est_step  = real'(freq_step);
    $display("packet %0d: freq step est %0d true %0.1f, antenna %0d, data %0d errors in %0d (seen %0d)",
             seed, freq_step, true_step, ant_sel, data_err, data_cnt, data_seen);
    check(est_step > true_step - 30.0 && est_step < true_step + 30.0, "frequency step");
    check(ant_sel == expect_b, "antenna choice");
    if (expect_b) n_switch_b++;
    check(data_cnt > 300, "enough data decisions");
    check(data_err == 0, "data decisions error-free after training");
    // with the training positions aligned, the main path stays on the cursor
    // tap of the feedforward filter
    begin
      int best, bm, m;
      best = 0; bm = -1;
      for (int i = 0; i < 6; i++) begin
        m = int'(dut.u_eq.ff_re[i] >>> 6) ** 2 + int'(dut.u_eq.ff_im[i] >>> 6) ** 2;
        if (m > bm) begin bm = m; best = i; end
      end
      $display("largest feedforward tap %0d", best);
      check(best == 3, "main path on the cursor tap");
    end
  endtask

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    repeat (4) @(posedge clk);
    run_packet(1, 1'b1, 0.35, 1.0, 60.0e3, 0.7, 1'b1);
    run_packet(2, 1'b0, 1.0, 0.3, -90.0e3, -2.1, 1'b0);
    run_packet(3, 1'b1, 1.0, 0.5, 104.0e3, 1.2, 1'b0);
    run_packet(4, 1'b1, 0.4, 1.0, -104.0e3, 0.3, 1'b1);
    $display("mechanisms: peaks %0d, syncs %0d, re-armed pairings %0d, switch-to-B %0d, train->DD %0d",
             n_peaks, n_sync, n_rej, n_switch_b, n_dd);
    check(n_peaks >= 4, "correlation peaks seen");
    check(n_sync == 4, "one synchronisation per packet");
    check(n_switch_b >= 1, "antenna switch happened");
    check(n_dd == 4, "training to decision-directed switch in each packet");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NSYM * 2 + 8000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
