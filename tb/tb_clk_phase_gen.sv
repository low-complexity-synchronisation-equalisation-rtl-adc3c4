// tb_clk_phase_gen: checks that the half-symbol phase starts at 0 after reset,
// alternates on every clock, and that sym_en is high on exactly every second
// clock (24 MHz symbols from the 48 MHz clock), also across a second reset.
`timescale 1ns/1ps
module tb_clk_phase_gen;
  logic clk = 0, rst_n = 0, ph, sym_en;
  clk_phase_gen dut (.*);
  always #10.4 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    for (int r = 0; r < 2; r++) begin
      int ens;
      rst_n = 0;
      repeat (3) @(negedge clk);
      checks++; if (ph !== 1'b0) failures++;
      rst_n = 1;
      ens = 0;
      for (int c = 0; c < 100; c++) begin
        @(negedge clk);
        checks++;
        if (ph !== 1'(c % 2 == 0) || sym_en !== ph) begin
          failures++;
          if (failures < 5) $display("FAIL cycle %0d ph=%0d", c, ph);
        end
        ens += int'(sym_en);
      end
      checks++;
      if (ens != 50) begin failures++; $display("FAIL %0d enables in 100 clocks", ens); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
