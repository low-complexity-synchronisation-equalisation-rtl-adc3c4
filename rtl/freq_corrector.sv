// freq_corrector: removes the estimated carrier frequency offset from the
// received samples before they reach the equaliser.
//
// A phase accumulator holds phi(n), the carrier phase expected on sample n,
// and advances by the estimated step dphi once per symbol. sincos_lut turns
// phi into cos/sin and the double-frequency complex multiplier forms
//   z(n) = r(n) * exp(-j*phi(n)).
// On load the accumulator is set to phi(ts) = theta_ref + dphi * (ts - ts_ref)
// for the sample ts present at that moment, so the derotation starts aligned
// with the phase that the synchroniser measured at sample ts_ref; from then on
// only the addition is used. The multiplier on the input path follows the
// document; aligning the start phase to the measured peak phase (so that the
// equaliser starts with the channel's main path on the real axis) is this
// design's choice.
//
// clear stops the derotation and zeroes the multiplier input until the next
// load.
//
// Timing: r and ts change on the ph = 1 edge. z(n) is present three symbols
// after r(n) (the multiplier's operand register plus its 2-symbol latency);
// valid marks z as derotated.
module freq_corrector
  import hl1_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ph,
  input  logic        load,       // one clock: start derotating
  input  logic        clear,      // one clock: stop (new packet)
  input  phase_t      theta_ref,
  input  logic [15:0] ts_ref,
  input  phase_t      dphi,
  input  cplx_t       r,
  input  logic [15:0] ts,
  output cplx_t       z,
  output logic        valid
);
  phase_t phi, phi_calc;
  samp_t  cos_v, sin_v;
  cplx_t  rot;
  logic   run;
  logic [2:0] vpipe;
  logic signed [31:0] ofs;

  always_comb begin
    ofs      = 32'(dphi) * 32'(signed'(ts - ts_ref));
    phi_calc = theta_ref + ofs[15:0];
  end

  sincos_lut u_lut (.phase(phi), .cos_o(cos_v), .sin_o(sin_v));
  assign rot = '{re: cos_v, im: -sin_v};

  cmul_dbl u_mul (.clk, .rst_n, .ph, .v(run ? r : '0), .c(rot), .y(z));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phi <= '0; run <= 1'b0; vpipe <= '0;
    end else begin
      if (clear) begin
        run <= 1'b0;
      end else if (load) begin
        phi <= ph ? phi_calc + dphi : phi_calc;
        run <= 1'b1;
      end else if (ph) begin
        phi <= phi + dphi;
      end
      if (ph) vpipe <= {vpipe[1:0], run};
    end
  end
  assign valid = vpipe[2];
endmodule
