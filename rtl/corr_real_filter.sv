// corr_real_filter: real correlation filter of the synchroniser, run at twice
// the symbol rate on an interleaved stream of real and imaginary samples.
//
// The filter is a transposed FIR. Each tap multiplies the incoming sample by
// its real coefficient (+1 or -1, one chip of the m-sequence), shifts the
// product right by SHIFT bits and adds it to the partial sum that arrives
// through a delay of TAP_DELAY clocks from the tap before it. Because the
// input alternates I, Q, I, Q at 48 MHz, a delay of four clocks is two symbol
// periods, so the taps sit on every other chip of the sequence and the same
// filter correlates the I and the Q stream in alternate clock cycles. All
// adders saturate to 8 bits. An optional LEAD delay (in clocks) in front of
// the taps shifts the whole filter in time; the complex correlator uses a
// lead of two clocks (one symbol) for the odd-chip filter.
//
// Follows the document: real multipliers and adders at double frequency,
// 5-bit shift, 8-bit adder outputs, 4T delays between taps. This design's
// choices: coefficients as one bit per tap (1 = +1, 0 = -1), saturation on
// every adder, and a registered output.
//
// Interface/timing: x is sampled every clock; y(t+1) = sum_i c_i *
// (x(t - LEAD - TAP_DELAY*i) >>> SHIFT), with tap 0 the newest sample, where
// sums are formed oldest tap first with 8-bit saturation after each add.
module corr_real_filter
  import hl1_pkg::*;
#(
  parameter int NTAPS = 16,
  parameter logic [NTAPS-1:0] COEF = '1,   // bit i: coefficient of tap i
  parameter int SHIFT = 5,
  parameter int TAP_DELAY = 4,
  parameter int LEAD = 0
) (
  input  logic  clk,
  input  logic  rst_n,
  input  samp_t x,
  output samp_t y
);
  samp_t xl;                                 // sample after the lead delay
  samp_t prod [NTAPS];                       // shifted tap products
  samp_t sum  [NTAPS];                       // adder outputs
  samp_t dly  [NTAPS-1][TAP_DELAY];          // 4T delays between adders

  if (LEAD > 0) begin : g_lead
    samp_t lead_q [LEAD];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) lead_q <= '{default: '0};
      else begin
        lead_q[0] <= x;
        for (int k = 1; k < LEAD; k++) lead_q[k] <= lead_q[k-1];
      end
    assign xl = lead_q[LEAD-1];
  end else begin : g_nolead
    assign xl = x;
  end

  always_comb begin
    for (int i = 0; i < NTAPS; i++) begin
      logic signed [9:0] coef;
      logic signed [17:0] p;
      coef = COEF[i] ? 10'sd1 : -10'sd1;
      p = 18'(xl * coef);
      prod[i] = sat8((32'(p) + (32'sd1 <<< (SHIFT - 1))) >>> SHIFT);
    end
    sum[NTAPS-1] = prod[NTAPS-1];
    for (int i = NTAPS-2; i >= 0; i--)
      sum[i] = sat8(32'(prod[i]) + 32'(dly[i][TAP_DELAY-1]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly <= '{default: '0};
      y   <= '0;
    end else begin
      for (int i = 0; i < NTAPS-1; i++) begin
        dly[i][0] <= sum[i+1];
        for (int k = 1; k < TAP_DELAY; k++) dly[i][k] <= dly[i][k-1];
      end
      y <= sum[0];
    end
  end
endmodule
