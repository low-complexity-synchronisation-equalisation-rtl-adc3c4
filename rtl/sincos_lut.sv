// sincos_lut: cosine and sine of a binary angle for the derotator.
//
// The 16-bit phase (65536 per turn) is rounded to 256 steps of 1.4 degrees.
// A quarter-wave table of 65 entries, T[i] = round(64 * cos(i * pi/128)),
// i = 0..64, holds the values in Q1.6; the quadrant (top two bits) selects
// the entry, T[i] or T[64-i], and its sign for cos and sin. The table is
// computed when the design is elaborated by a constant function that sums the
// Taylor series of cos in 64-bit integer arithmetic, so no data file is
// needed. The document names such a table in its design hierarchy; its size,
// the quarter-wave folding and the Q1.6 format are this design's choices.
//
// Timing: combinational.
module sincos_lut
  import hl1_pkg::*;
(
  input  phase_t phase,
  output samp_t  cos_o,
  output samp_t  sin_o
);
  localparam longint PI_Q40 = 64'd3454217652358;     // pi * 2^40

  // round(64 * cos(i*pi/128)) for i = 0..64, 8 bits per entry, entry i at [8i +: 8].
  function automatic logic [65*8-1:0] make_table();
    logic [65*8-1:0] t;
    longint x, x2, term, sum, v;
    for (int i = 0; i <= 64; i++) begin
      x  = (PI_Q40 / 128) * i;                       // angle, Q40
      x2 = ((x >>> 10) * (x >>> 10)) >>> 20;         // angle^2, Q40
      sum  = 64'sd1 <<< 40;
      term = 64'sd1 <<< 40;
      for (int n = 1; n <= 8; n++) begin
        term = -(((term >>> 10) * (x2 >>> 10)) >>> 20) / ((2*n-1) * (2*n));
        sum  = sum + term;
      end
      v = (sum * 64 + (64'sd1 <<< 39)) >>> 40;       // round to Q1.6
      t[8*i +: 8] = v[7:0];
    end
    return t;
  endfunction

  localparam logic [65*8-1:0] TAB = make_table();

  logic [15:0] pr;
  logic [7:0] addr;
  logic [5:0] i;
  samp_t      a, b;   // T[i], T[64-i]

  always_comb begin
    pr   = phase + 16'd128;
    addr = pr[15:8];
    i    = addr[5:0];
    a    = TAB[8*i +: 8];
    b    = TAB[8*(64-int'(i)) +: 8];
    unique case (addr[7:6])
      2'd0: begin cos_o =  a; sin_o =  b; end
      2'd1: begin cos_o = -b; sin_o =  a; end
      2'd2: begin cos_o = -a; sin_o = -b; end
      default: begin cos_o = b; sin_o = -a; end
    endcase
  end
endmodule
