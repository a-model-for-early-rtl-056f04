// Definitions shared by the S-PPM (synchronized pulse position modulation)
// transmitter and receiver.
//
// A symbol of NB bits is sent as a sync pulse at the start of the symbol
// period T plus, unless the symbol is zero, a data pulse in slot s = symbol
// value, i.e. at s*T/2^NB after the start. The transmitter marks the slots
// with NPH = 2^(NB-1) copies of the symbol clock delayed by k*T/2^NB
// (k = 1..NPH); in slot s the phase word (phi_1 .. phi_NPH) has
// phi_k = 1 exactly when k <= s < k + NPH. Adjacent slots differ in one phase
// only, and each slot has its own word: for NB = 3, slot 2 reads 1100 and
// slot 5 reads 0111 (phi_1 written first).
`timescale 1ps / 1ps
package sppm_pkg;

  localparam int NB  = 3;
  localparam int NPH = 1 << (NB - 1);

  typedef logic [NB-1:0]  symbol_t;
  typedef logic [1:NPH]   phase_t;     // phase_t[k] is phi_k

  // Phase word seen during slot s.
  function automatic phase_t slot_code(input int s);
    phase_t c;
    for (int k = 1; k <= NPH; k++) c[k] = (s >= k) && (s < k + NPH);
    return c;
  endfunction

  // Slot whose phase word is c; returns -1 for a word no slot produces.
  function automatic int code_slot(input phase_t c);
    int r = -1;
    for (int s = 0; s < (1 << NB); s++) if (slot_code(s) == c) r = s;
    return r;
  endfunction

endpackage
