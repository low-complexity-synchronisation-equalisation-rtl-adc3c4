// peak_detector: finds the correlation peak that marks symbol timing.
//
// Every symbol the approximate correlation magnitude is compared with a fixed
// threshold, which must sit above the worst sidelobe of the sequence. The
// first sample above it opens a search window of WINDOW symbols (the crossing
// sample included); within the window the largest magnitude, its complex
// correlation value and its time stamp are kept. When the window closes the
// peak is reported for one clock. Threshold comparison and the 8-symbol
// window follow the document (the window covers the excess delay of home
// channels); the threshold value, the tie rule (the earliest of equal maxima
// wins) and the one-clock report are this design's choices.
//
// Timing: mag, corr and ts are sampled on clock edges with en = 1. peak_valid
// is high for the one clock after the edge that took the last sample of the
// window, with peak_corr, peak_mag and peak_ts held until the next report.
module peak_detector
  import hl1_pkg::*;
#(
  parameter int         WINDOW = 8,
  parameter logic [8:0] THRESH = 9'd32,
  parameter int         TSW = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  input  logic           clear,        // abandon a search in progress
  input  logic [8:0]     mag,
  input  cplx_t          corr,
  input  logic [TSW-1:0] ts,
  output logic           peak_valid,
  output cplx_t          peak_corr,
  output logic [8:0]     peak_mag,
  output logic [TSW-1:0] peak_ts
);
  logic                       searching;
  logic [$clog2(WINDOW+1)-1:0] cnt;   // samples taken in the window

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      searching <= 1'b0; cnt <= '0; peak_valid <= 1'b0;
      peak_corr <= '0; peak_mag <= '0; peak_ts <= '0;
    end else begin
      peak_valid <= 1'b0;
      if (clear) begin
        searching <= 1'b0;
        cnt <= '0;
      end else if (en) begin
        if (!searching) begin
          if (mag > THRESH) begin
            searching <= (WINDOW > 1);
            peak_valid <= (WINDOW == 1);
            cnt       <= 1;
            peak_mag  <= mag;
            peak_corr <= corr;
            peak_ts   <= ts;
          end
        end else begin
          if (mag > peak_mag) begin
            peak_mag  <= mag;
            peak_corr <= corr;
            peak_ts   <= ts;
          end
          cnt <= cnt + 1'b1;
          if (cnt == ($clog2(WINDOW+1))'(WINDOW-1)) begin
            searching  <= 1'b0;
            peak_valid <= 1'b1;
          end
        end
      end
    end
  end
endmodule
