// Testbench of sppm_coder: a 40 MHz symbol clock with ideal phase clocks made
// here; for each symbol period the LUT1 output is sampled in the middle of
// each of the eight T/8 slots and must be high in slot s = symbol only (never
// for symbol 0). A symbol loaded with en at edge k is the one used in period
// k; with en low the previous symbol is kept.
`timescale 1ps / 1ps
module tb_sppm_coder;
  import sppm_pkg::*;
  int checks = 0, failures = 0;
  localparam int T = 25000;

  logic    clock_m = 0, rst_n = 1, en = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  phase_t  phi = '0;
  symbol_t symbol = '0, sym_q;
  logic    lut_out;
  int      seen [8];

  sppm_coder dut (.clock_m(clock_m), .rst_n(rst_n), .phi(phi), .symbol(symbol), .en(en),
                  .sym_q(sym_q), .lut_out(lut_out));

  always #(T/2) clock_m = ~clock_m;
  for (genvar k = 1; k <= NPH; k++) begin : g_ph
    always @(clock_m) phi[k] <= #(k * T / 8) clock_m;
  end

  initial begin
    #(T * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    symbol_t cur;
    cur = '0;
    #(T + T/4) rst_n = 1;
    for (int n = 0; n < 80; n++) begin
      // Set up before the rising edge.
      @(negedge clock_m);
      en     = (n % 5 != 3);
      symbol = (n < 8) ? NB'(n) : NB'($urandom);
      if (en) cur = symbol;
      @(posedge clock_m);
      for (int s = 0; s < 8; s++) begin
        #(s == 0 ? T/16 : T/8);
        checks++;
        if (lut_out != (cur != 0 && int'(cur) == s)) begin
          failures++;
          if (failures < 8) $display("period %0d symbol %0d slot %0d lut=%b", n, cur, s, lut_out);
        end
        if (lut_out) seen[s]++;
      end
    end
    // Every non-zero slot must have been produced.
    for (int s = 1; s < 8; s++) begin
      checks++;
      if (seen[s] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
