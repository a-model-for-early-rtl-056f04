// S-PPM transmitter: the DIGITAL DATA CODING block.
//
// For each symbol period T of clock_m it sends a SYNC PULSE at the rising
// edge of clock_m and, for a non-zero symbol s, a DATA PULSE s*T/2^NB later:
//   pll_tx      phase clocks phi_1..phi_NPH from clock_m
//   sppm_coder  symbol buffer (loaded by en) and LUT1 (slot decoder)
//   FF1         pulse_ff clocked by clock_m   -> sync pulses
//   FF2         pulse_ff clocked by LUT1      -> data pulses
//   OR          tx_pulse = sync | data: the transmitted coded pulsed signal
// A symbol loaded at edge k is sent during period k. The PLL and the pulse
// flip-flops are timing models; the rest is logic. The structure is the one
// of the coding block of the optical link.
`timescale 1ps / 1ps
module sppm_tx
  import sppm_pkg::*;
#(
  parameter int T_PS    = 25000,
  parameter int TRST_PS = 500
) (
  input  logic    clock_m,
  input  logic    rst_n,
  input  symbol_t symbol,
  input  logic    en,
  output phase_t  phi,
  output logic    sync_pulse,
  output logic    data_pulse,
  output logic    tx_pulse
);

  symbol_t sym_q;
  logic    lut_out;

  pll_tx #(.T_PS(T_PS)) u_pll (.clock_m(clock_m), .phi(phi));

  sppm_coder u_coder (.clock_m(clock_m), .rst_n(rst_n), .phi(phi), .symbol(symbol), .en(en),
                      .sym_q(sym_q), .lut_out(lut_out));

  pulse_ff #(.TRST_PS(TRST_PS)) u_ff1 (.trig(clock_m), .rst_n(rst_n), .q(sync_pulse));
  pulse_ff #(.TRST_PS(TRST_PS)) u_ff2 (.trig(lut_out), .rst_n(rst_n), .q(data_pulse));

  assign tx_pulse = sync_pulse | data_pulse;

endmodule
