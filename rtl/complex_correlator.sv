// complex_correlator: fully complex 31-chip correlator for the GMSK
// synchronisation sequence, built from two real filters.
//
// A GMSK (MSK-like) preamble chip k lies on the real axis for even k and on
// the imaginary axis for odd k, so the reference c_k = b_k * j^k is real on
// even chips and imaginary on odd chips. The correlation
//   C(n) = sum_k r(n-30+k) * conj(c_k)
// therefore splits into a 16-tap real filter over the even chips and a 15-tap
// real filter over the odd chips, each of which must see both I and Q. The
// received sample, held for one symbol, is fed through a crossbar that swaps
// at 48 MHz: in the first half-symbol the even filter gets I and the odd
// filter Q, in the second half the even filter gets Q and the odd filter I.
// The filter outputs then combine into
//   V = Re C = even(I) + odd(Q)   (available in the second half-symbol)
//   W = Im C = even(Q) - odd(I)   (available in the first half of the next)
// Two real filters replace the four of a direct complex correlator. The two
// filters, the crossbar at double frequency, 16/15 taps and the combination
// of four filter outputs follow the document; the chip-to-axis convention,
// the sign mapping of m1 bits (1 = +1) and the 8-bit saturation of V and W are
// this design's choices. A preamble sequence repeated with odd offset (m1 at
// chip 31) flips the axis pattern and gives no peak, so the repetitions at 0
// and 62 chips give peaks 62 symbols apart.
//
// Timing: r is a symbol-rate sample (changes at the ph = 1 edge). corr holds
// C(n) for the input sample n of symbol period n during symbol period n+2
// (LATENCY = 2 symbols); it changes at the ph = 1 edge.
module complex_correlator
  import hl1_pkg::*;
#(
  parameter logic [30:0] M1 = M1_DEFAULT,   // chip k in bit k
  parameter int SHIFT = 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ph,
  input  cplx_t r,
  output cplx_t corr
);

  // Tap i of each filter sees the sample i*2 symbols old.
  function automatic logic [15:0] even_coef();
    logic [15:0] c;
    for (int i = 0; i < 16; i++) c[i] = M1[30-2*i];
    return c;
  endfunction
  function automatic logic [14:0] odd_coef();
    logic [14:0] c;
    for (int i = 0; i < 15; i++) c[i] = M1[29-2*i];
    return c;
  endfunction

  samp_t x_even, x_odd, y_even, y_odd;
  samp_t v_q, w_q;

  // Crossbar toggled at 48 MHz.
  assign x_even = ph ? r.im : r.re;
  assign x_odd  = ph ? r.re : r.im;

  corr_real_filter #(.NTAPS(16), .COEF(even_coef()), .SHIFT(SHIFT), .LEAD(0))
    u_even (.clk, .rst_n, .x(x_even), .y(y_even));
  corr_real_filter #(.NTAPS(15), .COEF(odd_coef()), .SHIFT(SHIFT), .LEAD(2))
    u_odd  (.clk, .rst_n, .x(x_odd), .y(y_odd));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0; w_q <= '0; corr <= '0;
    end else if (ph) begin
      v_q  <= sat8(32'(y_even) + 32'(y_odd));
      corr <= '{re: v_q, im: w_q};
    end else begin
      w_q  <= sat8(32'(y_even) - 32'(y_odd));
    end
  end
endmodule
