// sync_freq_unit: time synchronisation and coarse frequency offset detection.
//
// The received samples are correlated with m1 (complex_correlator), the
// magnitude of each correlation is approximated (mag_approx) and compared with
// a threshold, and the largest value within an 8-symbol window is taken as a
// peak (peak_detector). The phase of each peak vector is measured by
// fixed-step rotation (cordic_phase). Of the three m1 repetitions at the start
// of the high-rate preamble only the first and the third give a peak, 62
// symbols apart; the controller pairs a first peak with a second one found
// PEAK_SPACING +/- TOL symbols later and then estimates the per-symbol phase
// step from the two phases (freq_offset_est). A later peak at any other
// distance becomes the new first peak, so a spurious peak before the
// preamble is simply replaced by the first m1 peak. The result is the time stamp of the
// second peak (the input sample on which the third m1 ends), its phase and
// the phase step per symbol. The chain of blocks and the use of two m1
// peaks follow the document; the pairing tolerance, the re-arming rule and the
// time-stamp bookkeeping are this design's choices.
//
// Interface/timing: r is the symbol-rate input and ts its sample index (both
// change on the ph = 1 edge). restart (one clock) abandons any search and
// arms the unit for a new packet. sync_valid is high for one clock when the
// estimate is ready (about 10 symbols after the second peak) and the outputs
// hold until the next restart.
module sync_freq_unit
  import hl1_pkg::*;
#(
  parameter logic [30:0] M1 = M1_DEFAULT,
  parameter logic [8:0]  THRESH = 9'd32,
  parameter int          WINDOW = 8,
  parameter int          PEAK_SPACING = 62,
  parameter int          TOL = 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ph,
  input  logic        restart,
  input  cplx_t       r,
  input  logic [15:0] ts,
  output logic        sync_valid,
  output logic        synced,
  output logic [15:0] peak2_ts,
  output phase_t      theta2,
  output phase_t      dphi,
  output logic        peak_seen,      // one clock per detected peak
  output logic        pair_rejected   // one clock when a peak re-arms pairing
);
  // Correlator (2 symbols) + magnitude register (1 symbol).
  localparam int LAT = 3;

  cplx_t        corr, corr_d;
  logic [8:0]   mag;
  logic         pk_valid;
  cplx_t        pk_corr;
  logic [8:0]   pk_mag;
  logic [15:0]  pk_ts;
  logic         cd_start, cd_busy, cd_done;
  cplx_t        cd_in;
  phase_t       cd_phase;
  logic         fe_start, fe_valid;
  phase_t       theta1;
  logic [15:0]  ts1, pk_dist;

  typedef enum logic [2:0] {
    WAIT_FIRST, PHASE_FIRST, WAIT_SECOND, PHASE_SECOND, ESTIMATE, LOCKED
  } state_t;
  state_t state;

  complex_correlator #(.M1(M1)) u_corr (.clk, .rst_n, .ph, .r, .corr);

  mag_approx u_mag (.clk, .rst_n, .en(ph), .v(corr.re), .w(corr.im), .mag);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  corr_d <= '0;
    else if (ph) corr_d <= corr;

  peak_detector #(.WINDOW(WINDOW), .THRESH(THRESH)) u_peak (
    .clk, .rst_n, .en(ph), .clear(restart), .mag, .corr(corr_d),
    .ts(ts - 16'(LAT)), .peak_valid(pk_valid), .peak_corr(pk_corr),
    .peak_mag(pk_mag), .peak_ts(pk_ts));

  cordic_phase u_cordic (.clk, .rst_n, .start(cd_start), .x(cd_in.re),
    .y(cd_in.im), .busy(cd_busy), .done(cd_done), .phase(cd_phase));

  freq_offset_est #(.PEAK_SPACING(PEAK_SPACING)) u_fe (.clk, .rst_n,
    .start(fe_start), .theta_first(theta1), .theta_second(theta2),
    .valid(fe_valid), .dphi);

  assign pk_dist      = pk_ts - ts1;
  assign peak_seen = pk_valid;
  assign synced    = (state == LOCKED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= WAIT_FIRST; cd_start <= 1'b0; cd_in <= '0; fe_start <= 1'b0;
      theta1 <= '0; theta2 <= '0; ts1 <= '0; peak2_ts <= '0;
      sync_valid <= 1'b0; pair_rejected <= 1'b0;
    end else begin
      cd_start <= 1'b0;
      fe_start <= 1'b0;
      sync_valid <= 1'b0;
      pair_rejected <= 1'b0;
      if (restart) begin
        state <= WAIT_FIRST;
      end else begin
        unique case (state)
          WAIT_FIRST: if (pk_valid) begin
            ts1 <= pk_ts; cd_in <= pk_corr; cd_start <= 1'b1;
            state <= PHASE_FIRST;
          end
          PHASE_FIRST: if (cd_done) begin
            theta1 <= cd_phase;
            state  <= WAIT_SECOND;
          end
          WAIT_SECOND: if (pk_valid) begin
            if (pk_dist >= 16'(PEAK_SPACING - TOL) && pk_dist <= 16'(PEAK_SPACING + TOL)) begin
              peak2_ts <= pk_ts; cd_in <= pk_corr; cd_start <= 1'b1;
              state <= PHASE_SECOND;
            end else begin
              ts1 <= pk_ts; cd_in <= pk_corr; cd_start <= 1'b1;
              pair_rejected <= 1'b1;
              state <= PHASE_FIRST;
            end
          end
          PHASE_SECOND: if (cd_done) begin
            theta2   <= cd_phase;
            fe_start <= 1'b1;
            state    <= ESTIMATE;
          end
          ESTIMATE: if (fe_valid) begin
            sync_valid <= 1'b1;
            state <= LOCKED;
          end
          LOCKED: ;
          default: state <= WAIT_FIRST;
        endcase
      end
    end
  end
endmodule
