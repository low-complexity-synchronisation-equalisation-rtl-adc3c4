// mag_approx: four-region approximation of the magnitude of a complex value,
//   mag = max(G, 7/8*G + 1/2*L),  G = max(|V|,|W|), L = min(|V|,|W|),
// used instead of sqrt(V^2+W^2) for peak detection of the correlator output.
// Two absolute-value units and a sorter give G and L; 7/8*G is formed as
// G - G/8 and 1/2*L as L/2 with shifts (both truncated), so no multiplier is
// needed; a final comparator picks the larger of G and the weighted sum. The
// formula and structure follow the document; the 9-bit unsigned result width
// (no overflow for 8-bit inputs) and the output register are this design's
// choices.
//
// Timing: the result of (v, w) is registered on the clock edge where en = 1
// and holds until the next such edge.
module mag_approx
  import hl1_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  samp_t      v,
  input  samp_t      w,
  output logic [8:0] mag
);
  logic [7:0] av, aw, g, l;
  logic [8:0] est;

  always_comb begin
    av  = v[7] ? 8'(-v) : 8'(v);          // |-128| = 128 fits in 8 bits
    aw  = w[7] ? 8'(-w) : 8'(w);
    g   = (av >= aw) ? av : aw;
    l   = (av >= aw) ? aw : av;
    est = 9'(g) - 9'(g >> 3) + 9'(l >> 1);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  mag <= '0;
    else if (en) mag <= (est > 9'(g)) ? est : 9'(g);
endmodule
