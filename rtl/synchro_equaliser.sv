// synchro_equaliser: baseband synchroniser and equaliser of a Hiperlan/1
// (23.5 Mb/s GMSK) receiver, with switched antenna diversity.
//
// Data path: two antenna streams -> antenna_switch (stronger antenna) ->
// sync_freq_unit (m1 correlation, peak timing, peak phases, coarse frequency
// offset) and, in parallel, freq_corrector (derotation by the estimated
// offset, started once the estimate exists) -> dlms_dfe (DFE(6,5), delayed
// LMS with real error) -> detected symbols.
//
// Timing reference. The second m1 peak marks the input sample carrying
// preamble symbol END_M1_3 = 92 (the last chip of the third m1). From it the
// top derives, for every equaliser decision, the preamble position of the
// symbol being decided: the decision in symbol t refers to the input sample
// t - 8 - CURSOR (three symbols through the derotating multiplier, five
// through the feedforward filter). That position sets
// the GMSK axis (even: I, odd: Q) and, while it is inside the preamble
// (position < PREAMBLE_LEN), the equaliser trains on train_sym, which the
// caller must supply for position train_pos from its copy of the preamble;
// after the preamble it runs decision-directed and delivers data on dout.
// Everything runs on one clock at twice the symbol rate; sym_en marks the
// clock edges on which symbol-rate registers load, and new antenna samples
// must be presented at that rate (changing right after an edge with sym_en).
//
// The partition into synchronisation, phase calculation, derotating
// multiplier and DLMS DFE, the double-frequency clocking, the 450-symbol
// preamble and the use of the first and third m1 repetitions follow the
// document. The training interface, the timing bookkeeping, the antenna
// measurement window and all sizes the document does not give are this
// design's own.
module synchro_equaliser
  import hl1_pkg::*;
#(
  parameter logic [30:0] M1           = M1_DEFAULT,
  parameter logic [8:0]  THRESH       = 9'd32,
  parameter int          WINDOW       = 8,
  parameter int          PREAMBLE_LEN = 450,
  parameter int          CURSOR       = 3,
  parameter int          MU_FF        = 6,
  parameter int          MU_FB        = 6,
  parameter int          DIV_WIN      = 16
) (
  input  logic        clk,          // 48 MHz, twice the symbol rate
  input  logic        rst_n,
  output logic        sym_en,       // symbol-rate load enable
  input  logic        rx_start,     // one clock: new packet
  input  logic        div_en,       // enable switched antenna diversity
  input  cplx_t       ant_a,
  input  cplx_t       ant_b,
  // training symbols
  output logic [15:0] train_pos,    // preamble position being decided
  output logic        train_req,    // training symbol needed for train_pos
  input  logic        train_sym,    // 1: +1, 0: -1 on the symbol's axis
  // results
  output logic        dout_valid,
  output logic        dout,
  output cplx_t       eq_out,
  output logic signed [8:0] eq_err,
  output logic        ant_sel,
  output logic        synced,
  output phase_t      freq_step,    // estimated phase step per symbol
  output phase_t      peak_phase,
  output logic [15:0] peak_ts,
  output logic        peak_seen,
  output logic        pair_rejected
);
  localparam int END_M1_3 = 92;
  localparam int LAT_EQ   = 3 + 5 + CURSOR;

  logic        ph;
  cplx_t       r1, z;
  logic [15:0] ts;
  logic        sync_valid, z_valid, ant_decided;
  logic [3:0]  eq_cnt;
  logic        run, dec;

  clk_phase_gen u_clk (.clk, .rst_n, .ph, .sym_en);

  antenna_switch #(.WIN(DIV_WIN)) u_div (.clk, .rst_n, .ph, .start(rx_start),
    .div_en, .ant_a, .ant_b, .r(r1), .sel(ant_sel), .decided(ant_decided));

  // Sample index of r1.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  ts <= '0;
    else if (ph) ts <= ts + 1'b1;

  sync_freq_unit #(.M1(M1), .THRESH(THRESH), .WINDOW(WINDOW)) u_sync (
    .clk, .rst_n, .ph, .restart(rx_start), .r(r1), .ts,
    .sync_valid, .synced, .peak2_ts(peak_ts), .theta2(peak_phase),
    .dphi(freq_step), .peak_seen, .pair_rejected);

  // The peak phase is the mean carrier phase over the 31 chips, i.e. the
  // phase at the middle chip, 15 samples before the peak.
  freq_corrector u_fc (.clk, .rst_n, .ph, .load(sync_valid), .clear(rx_start),
    .theta_ref(peak_phase), .ts_ref(peak_ts - 16'd15), .dphi(freq_step),
    .r(r1), .ts, .z, .valid(z_valid));

  // Decisions start once the cursor sample has come through the pipeline.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) eq_cnt <= '0;
    else if (rx_start || !z_valid) eq_cnt <= '0;
    else if (ph && !run) eq_cnt <= eq_cnt + 1'b1;

  assign run       = z_valid && (eq_cnt >= 4'(5 + CURSOR));
  assign train_pos = ts + 16'(END_M1_3 - LAT_EQ) - peak_ts;
  assign train_req = run && (train_pos < 16'(PREAMBLE_LEN));

  dlms_dfe #(.CURSOR(CURSOR), .MU_FF(MU_FF), .MU_FB(MU_FB)) u_eq (
    .clk, .rst_n, .ph, .init(sync_valid | rx_start), .run, .adapt(run),
    .axis(train_pos[0]), .train(train_req), .train_sym, .x(z),
    .y(eq_out), .dec, .eps(eq_err));

  assign dout_valid = run && !train_req && ph;
  assign dout       = dec;
endmodule
