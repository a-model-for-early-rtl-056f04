// Behavioural model of the transmitter PLL (PLL TX). Not synthesizable.
//
// Produces NPH copies of clock_m, copy k delayed by k*T/2^NB (45, 90, 135 and
// 180 degrees for 3-bit symbols). T_PS is the symbol period in picoseconds
// (25 ns: a 40 MHz symbol clock). The real part is a phase-locked loop; only
// its output phases are modelled, as ideal transport delays.
`timescale 1ps / 1ps
module pll_tx
  import sppm_pkg::*;
#(
  parameter int T_PS = 25000
) (
  input  logic   clock_m,
  output phase_t phi
);

  initial phi = '0;

  for (genvar k = 1; k <= NPH; k++) begin : g_ph
    always @(clock_m) phi[k] <= #(k * T_PS / (1 << NB)) clock_m;
  end

endmodule
