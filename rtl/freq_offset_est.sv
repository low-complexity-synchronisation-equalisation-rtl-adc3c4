// freq_offset_est: coarse carrier frequency offset from two peak phases.
//
// The phases of two correlation peaks of the same sequence, PEAK_SPACING
// symbols apart, differ by the phase the carrier offset adds over that time.
// The difference is taken modulo one turn (binary angles wrap by themselves)
// and divided by the spacing; the division by a constant is a multiplication
// by round(2^16 / PEAK_SPACING) followed by a rounded 16-bit shift. The
// result is the phase step per symbol. For Hiperlan/1 the largest offset
// (104 kHz, 1.59 degrees per symbol) turns the carrier by under 99 degrees in
// 62 symbols, so the difference is never ambiguous. The use of two peaks 62
// symbols apart follows the document; the reciprocal multiplication and the
// rounding are this design's choices.
//
// Timing: start samples theta_first and theta_second; dphi is valid, with
// valid high for one clock, on the next clock.
module freq_offset_est
  import hl1_pkg::*;
#(
  parameter int PEAK_SPACING = 62
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  phase_t theta_first,
  input  phase_t theta_second,
  output logic   valid,
  output phase_t dphi          // phase advance per symbol (65536 per turn)
);
  localparam int RECIP = (65536 + PEAK_SPACING / 2) / PEAK_SPACING;

  phase_t diff;
  logic signed [31:0] prod;

  always_comb begin
    diff = theta_second - theta_first;        // modulo one turn
    prod = 32'(diff) * RECIP + 32'sd32768;    // rounded >> 16
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      valid <= 1'b0; dphi <= '0;
    end else begin
      valid <= start;
      if (start) dphi <= prod[31:16];
    end
endmodule
