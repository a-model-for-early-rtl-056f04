// S-PPM symbol coding logic: SYMBOL BUFFER and LUT1.
//
// The symbol buffer loads 'symbol' on a rising edge of clock_m while 'en' is
// high and holds it for the symbol period. LUT1 compares the phase clocks
// phi_1..phi_NPH (clock_m delayed by k*T/2^NB) with the phase word of the
// slot that carries the buffered symbol, and is high for that slot only:
// a T/2^NB wide pulse starting s*T/2^NB after the rising edge of clock_m for
// symbol s, and no pulse for symbol 0. Because neighbouring slots differ in a
// single phase, the comparison does not glitch between slots. The pulse
// shortening flip-flops and the OR with the sync pulses are in sppm_tx.
//
// Symbol-to-slot mapping: symbol value s uses slot s (e.g. 010 -> 2T/8), as
// the implemented LUT1 is described; the reset is this design's addition.
`timescale 1ps / 1ps
module sppm_coder
  import sppm_pkg::*;
(
  input  logic    clock_m,
  input  logic    rst_n,
  input  phase_t  phi,
  input  symbol_t symbol,
  input  logic    en,
  output symbol_t sym_q,
  output logic    lut_out
);

  always_ff @(posedge clock_m or negedge rst_n)
    if (!rst_n)  sym_q <= '0;
    else if (en) sym_q <= symbol;

  always_comb lut_out = (sym_q != '0) && (phi == slot_code(int'(sym_q)));

endmodule
