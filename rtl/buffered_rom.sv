// Buffered coefficient ROM.
//
// A read-only table whose address is captured in a register; the word at the
// registered address appears at 'data' after the clock edge, so a lookup has a
// latency of one clock. This is the coefficient store used by the polyphase
// filters (prototype coefficients) and the FFT stages (twiddle factors). The
// contents come from the INIT parameter array, computed by the instantiating
// block at elaboration. The registered address follows the buffered-ROM
// structure of the DTP; the widths are chosen by the user.
`timescale 1ps / 1ps
module buffered_rom #(
  parameter int DEPTH = 8,
  parameter int DW    = 15,
  parameter logic [DW-1:0] INIT [DEPTH] = '{default: '0},
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  logic [AW-1:0] addr_q;

  always_ff @(posedge clk) addr_q <= addr;

  always_comb data = (int'(addr_q) < DEPTH) ? INIT[addr_q] : '0;

endmodule
