// tb_antenna_switch: packets in which one antenna is clearly stronger, ties,
// and diversity disabled. The testbench sums |I| + |Q| of both antennas over
// the 16 measurement symbols itself, predicts the choice, and checks sel, the
// decided pulse (once per packet, after the 16th symbol) and that the output
// sample is the selected antenna's sample one symbol later.
`timescale 1ns/1ps
module tb_antenna_switch;
  import hl1_pkg::*;
  localparam int WIN = 16;
  logic clk = 0, rst_n = 0, ph = 0, start = 0, div_en = 1;
  cplx_t ant_a = '0, ant_b = '0, r;
  logic sel, decided;
  antenna_switch #(.WIN(WIN)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ph <= rst_n ? ~ph : 1'b0;
  int checks = 0, failures = 0, n_dec = 0;
  always @(posedge clk) if (decided) n_dec++;

  function automatic int l1(input cplx_t v);
    return (v.re < 0 ? -int'(v.re) : int'(v.re)) + (v.im < 0 ? -int'(v.im) : int'(v.im));
  endfunction

  task automatic packet(input int ga, input int gb, input bit div, input int mode);
    int sa, sb, nd0;
    bit exp_sel;
    cplx_t prev_a, prev_b;
    bit prev_sel;
    sa = 0; sb = 0;
    div_en = div;
    nd0 = n_dec;
    @(negedge clk iff ph);           // mid-symbol
    start = 1;
    @(negedge clk);
    start = 0;
    for (int s = 0; s < 40; s++) begin
      // inputs change right after the symbol edge
      @(posedge clk iff ph);
      // the design takes the samples present at this edge into its window
      if (s < WIN) begin sa += l1(ant_a); sb += l1(ant_b); end
      #1;
      if (s > 0) begin
        checks++;
        if (r !== (prev_sel ? prev_b : prev_a)) begin
          failures++;
          if (failures < 5) $display("FAIL symbol %0d output is not the selected antenna", s);
        end
      end
      if (mode == 0) begin
        ant_a = '{re: samp_t'($urandom_range(0, 2*ga) - ga), im: samp_t'($urandom_range(0, 2*ga) - ga)};
        ant_b = '{re: samp_t'($urandom_range(0, 2*gb) - gb), im: samp_t'($urandom_range(0, 2*gb) - gb)};
      end else begin
        ant_a = '{re: 8'sd30, im: -8'sd20};      // tie
        ant_b = '{re: -8'sd25, im: 8'sd25};
      end
      exp_sel = div && (sb > sa) && (s >= WIN);
      prev_a = ant_a; prev_b = ant_b;
      @(negedge clk);
      prev_sel = sel;
      if (s == WIN) begin
        checks++;
        if (sel !== (div && sb > sa)) begin
          failures++;
          $display("FAIL choice sel=%0d sums a=%0d b=%0d", sel, sa, sb);
        end
      end
    end
    checks++;
    if (n_dec - nd0 != 1) begin failures++; $display("FAIL decided pulses %0d", n_dec - nd0); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    packet(20, 90, 1, 0);   // B stronger -> B
    packet(90, 20, 1, 0);   // A stronger -> A
    packet(20, 90, 0, 0);   // diversity off -> A
    packet(0, 0, 1, 1);     // tie -> A
    packet(10, 100, 1, 0);  // B again
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
