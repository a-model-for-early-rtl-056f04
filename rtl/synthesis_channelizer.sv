// Synthesis channelizer (process P3 of the DTP chain).
//
// Recombines J channels into one complex analytic signal (interpolation
// J/2). It takes blocks of J channel words in natural channel order (one per
// in_valid, channel 0 first, first block right after reset) and returns J/2
// output samples per block, one every two clocks. Chain: J-point IFFT ->
// DPRB restoring natural order -> synthesis polyphase network
// (vcpf_synthesis). The composition follows the DTP synthesis channelizer.
// The polyphase network is given a gain of 2^(log2(J)-1) = J/2, the gain an
// interpolation by J/2 needs, so that analysis followed by synthesis has unit
// gain (a design choice; the scaling is not specified).
`timescale 1ps / 1ps
module synthesis_channelizer #(
  parameter int NF   = 20,
  parameter int NW   = 17,
  parameter int NSO  = 13,
  parameter int NH   = 15,
  parameter int NM   = 3,
  parameter int TAPS = 23,
  parameter int J    = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [NF-1:0]  in_re,
  input  logic signed [NF-1:0]  in_im,
  output logic signed [NSO-1:0] out_re,
  output logic signed [NSO-1:0] out_im,
  output logic                  out_valid,
  output logic                  sat,
  output logic                  overrun
);

  import dtp_pkg::*;

  logic signed [NF-1:0] f_re, f_im, r_re, r_im;
  logic                 f_valid, f_first, f_sat, r_valid, r_first, v_sat;

  fft #(.W(NF), .NW(NW), .J(J), .INVERSE(1'b1)) u_ifft (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_re(f_re), .out_im(f_im), .out_valid(f_valid), .out_first(f_first), .sat(f_sat));

  dprb #(.W(NF), .J(J), .MODE(ORDER_BITREV)) u_dprb (
    .clk(clk), .rst_n(rst_n), .in_valid(f_valid), .in_re(f_re), .in_im(f_im),
    .out_re(r_re), .out_im(r_im), .out_valid(r_valid), .out_first(r_first), .overrun(overrun));

  vcpf_synthesis #(.NSI(NF), .NSO(NSO), .NH(NH), .NM(NM), .TAPS(TAPS), .J(J), .GSH($clog2(J) - 1)) u_vcpf (
    .clk(clk), .rst_n(rst_n), .in_valid(r_valid), .in_re(r_re), .in_im(r_im),
    .out_re(out_re), .out_im(out_im), .out_valid(out_valid), .sat(v_sat));

  assign sat = f_sat || v_sat;

  logic unused;
  assign unused = f_first ^ r_first;

endmodule
