// cmul_dbl: double-frequency complex multiplier, y = v * c.
//
// A complex product needs four real products. This multiplier has only two
// real 8x8 multipliers and one shared adder/subtractor, and runs them at twice
// the symbol rate so that each produces two products per symbol:
//   first half-symbol : Re_V*Re_C and Im_V*Im_C  -> subtract -> real part
//   second half-symbol: Re_V*Im_C and Im_V*Re_C  -> add      -> imaginary part
// The operands are held in 8-bit input registers loaded at symbol rate, the
// products in 16-bit registers at 48 MHz, and the results in 8-bit output
// registers loaded at symbol rate. The structure, the 8-bit operand/result
// widths and the 2-symbol latency follow the document; the scaling of the
// 16-bit result back to 8 bits (arithmetic shift by SHIFT, then saturation)
// is this design's choice for Q1.6 samples.
//
// Timing: v and c are sampled at the clock edge where ph = 1 (end of symbol
// n); y holds the product from the end of symbol n+2, i.e. two symbol periods
// later, and stays for one symbol.
module cmul_dbl
  import hl1_pkg::*;
#(
  parameter int SHIFT = 6   // product scaling, Q1.6 * Q1.6 -> Q1.6
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ph,      // half-symbol phase from clk_phase_gen
  input  cplx_t v,       // data
  input  cplx_t c,       // coefficient
  output cplx_t y
);
  cplx_t v_q, c_q;                        // Reg_8 operand registers
  logic signed [15:0] p_a, p_b;           // Reg_16 product registers
  samp_t re_q, im_q;                      // results of the add/sub
  samp_t mux_a, mux_b;                    // coefficient multiplexers
  logic signed [16:0] addsub;

  // First half-symbol (ph = 0): multiply by Re_C / Im_C; second: swapped.
  always_comb begin
    mux_a  = ph ? c_q.im : c_q.re;
    mux_b  = ph ? c_q.re : c_q.im;
    // ph = 1: p_a/p_b hold Re_V*Re_C, Im_V*Im_C -> subtract.
    // ph = 0: p_a/p_b hold Re_V*Im_C, Im_V*Re_C -> add.
    addsub = ph ? (17'(p_a) - 17'(p_b)) : (17'(p_a) + 17'(p_b));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0; c_q <= '0; p_a <= '0; p_b <= '0;
      re_q <= '0; im_q <= '0; y <= '0;
    end else begin
      p_a <= v_q.re * mux_a;
      p_b <= v_q.im * mux_b;
      if (ph) re_q <= sat8(32'(addsub >>> SHIFT));
      else    im_q <= sat8(32'(addsub >>> SHIFT));
      if (ph) begin
        v_q <= v;
        c_q <= c;
        y   <= '{re: re_q, im: im_q};
      end
    end
  end
endmodule
