// clk_phase_gen: symbol-phase generator for the double-frequency datapath.
//
// The whole receiver runs on one 48 MHz clock, twice the 24 MHz symbol rate.
// Instead of a second, derived 24 MHz clock this block produces the phase of
// the current 48 MHz cycle within the symbol: ph = 0 for the first half of a
// symbol period, ph = 1 for the second. sym_en (= ph) is the symbol-rate clock
// enable: every CLK1x register loads on the clock edge that ends a cycle with
// sym_en = 1, i.e. once every two clocks. Using an enable instead of a
// divided clock keeps a single clock domain; the division ratio of two follows
// the document (24 MHz symbols, 48 MHz multipliers and adders).
//
// Timing: ph is 0 in the first cycle after reset is released and toggles
// every clock.
module clk_phase_gen (
  input  logic clk,
  input  logic rst_n,
  output logic ph,      // 0: first half-symbol, 1: second half-symbol
  output logic sym_en   // symbol-rate enable, high in the second half-symbol
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ph <= 1'b0;
    else        ph <= ~ph;

  assign sym_en = ph;
endmodule
