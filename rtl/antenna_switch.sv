// antenna_switch: power-based switched antenna diversity.
//
// With two antennas down-converted separately, the receiver measures the
// signal level on each at the start of a packet and then uses only the
// stronger one for the rest of it. After start, the sum of |I| + |Q| over
// WIN symbols is accumulated for each antenna (an L1 power measure that needs
// no multiplier); when the window ends the antenna with the larger sum is
// selected (antenna A on a tie) and held until the next start. Until then,
// and whenever div_en is low, antenna A is used. The switched-diversity idea
// is the document's; the measure, the window and the tie rule are this
// design's choices, and the window must end before the synchronisation
// sequence begins.
//
// Timing: inputs change on the ph = 1 edge; r is the selected sample,
// registered (one symbol latency). sel changes at the end of the window.
module antenna_switch
  import hl1_pkg::*;
#(
  parameter int WIN = 16
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  ph,
  input  logic  start,       // one clock: new packet, measure again
  input  logic  div_en,      // 0: always antenna A
  input  cplx_t ant_a,
  input  cplx_t ant_b,
  output cplx_t r,
  output logic  sel,         // 1: antenna B in use
  output logic  decided      // one clock when the choice is made
);
  localparam int AW = 9 + $clog2(WIN + 1);

  logic [AW-1:0] acc_a, acc_b;
  logic [$clog2(WIN+1)-1:0] cnt;
  logic measuring, sel_q;

  function automatic logic [8:0] l1(input cplx_t v);
    logic [7:0] ar, ai;
    ar = v.re[7] ? 8'(-v.re) : 8'(v.re);
    ai = v.im[7] ? 8'(-v.im) : 8'(v.im);
    return 9'(ar) + 9'(ai);
  endfunction

  assign sel = sel_q & div_en;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc_a <= '0; acc_b <= '0; cnt <= '0; measuring <= 1'b0;
      sel_q <= 1'b0; decided <= 1'b0; r <= '0;
    end else begin
      decided <= 1'b0;
      if (ph) r <= sel ? ant_b : ant_a;
      if (start) begin
        acc_a <= '0; acc_b <= '0; cnt <= '0; measuring <= 1'b1; sel_q <= 1'b0;
      end else if (ph) begin
        if (measuring) begin
          acc_a <= acc_a + AW'(l1(ant_a));
          acc_b <= acc_b + AW'(l1(ant_b));
          cnt   <= cnt + 1'b1;
          if (cnt == ($clog2(WIN+1))'(WIN - 1)) begin
            measuring <= 1'b0;
            sel_q     <= (acc_b + AW'(l1(ant_b))) > (acc_a + AW'(l1(ant_a)));
            decided   <= 1'b1;
          end
        end
      end
    end
  end
endmodule
