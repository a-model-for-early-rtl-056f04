// Dual Port RAM Buffer (DPRB).
//
// Reorders a stream of blocks of J complex words. Two banks of J words are
// used in turn: a block is written in arrival order into one bank (one word
// per in_valid) while the previous block is read out of the other bank, one
// word per clock, in the order given by MODE:
//   ORDER_BITREV      read address = bit-reverse(r): turns the bit-reversed
//                     output of a radix-2 DIF FFT back into natural order;
//   ORDER_HALF_ROTATE read address = (r + J/2) mod J on odd blocks, r on even
//                     ones: the (-1)^(m b) phase term of a channelizer whose
//                     decimation is J/2.
// Reading starts the clock after the last word of a block is written; the
// first word is at the output one clock later, flagged by out_first. A new
// block must not complete while the previous one is still being read
// (overrun). The two-bank structure is this design's reading of the DPRB of
// the DTP channelizers; the orders are the ones the channelizers need.
`timescale 1ps / 1ps
module dprb
  import dtp_pkg::*;
#(
  parameter int          W    = 20,
  parameter int          J    = 8,
  parameter dprb_order_e MODE = ORDER_BITREV,
  localparam int JB = $clog2(J)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                out_valid,
  output logic                out_first,
  output logic                overrun
);

  logic signed [W-1:0] mem_re [2][J];
  logic signed [W-1:0] mem_im [2][J];
  logic [JB-1:0]       waddr, rcnt, raddr;
  logic                wbank, rbank, reading, rpar;

  always_comb begin
    if (MODE == ORDER_BITREV) raddr = JB'(bitrev(int'(rcnt), JB));
    else                      raddr = rpar ? rcnt + JB'(J / 2) : rcnt;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      mem_re[wbank][waddr] <= in_re;
      mem_im[wbank][waddr] <= in_im;
    end
    out_re <= mem_re[rbank][raddr];
    out_im <= mem_im[rbank][raddr];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      waddr     <= '0;
      wbank     <= 1'b0;
      rbank     <= 1'b0;
      rcnt      <= '0;
      reading   <= 1'b0;
      rpar      <= 1'b1;
      out_valid <= 1'b0;
      out_first <= 1'b0;
      overrun   <= 1'b0;
    end else begin
      out_valid <= reading;
      out_first <= reading && rcnt == '0;
      if (reading) begin
        rcnt <= rcnt + 1'b1;
        if (int'(rcnt) == J - 1) reading <= 1'b0;
      end
      if (in_valid) begin
        waddr <= waddr + 1'b1;
        if (int'(waddr) == J - 1) begin
          if (reading && int'(rcnt) != J - 1) overrun <= 1'b1;
          wbank   <= ~wbank;
          rbank   <= wbank;
          rcnt    <= '0;
          reading <= 1'b1;
          rpar    <= ~rpar;
        end
      end
    end

endmodule
