// Digital Transparent Processor (DTP): one beam's processing chain.
//
// ADC samples (real IF, Fs = 4 f0, one per clock) -> IF to Analytic (P1) ->
// analysis channelizer (P2) -> J channel streams towards the on-board switch.
// Channel streams coming back from the switch -> synthesis channelizer (P3)
// -> Analytic to IF (P4) -> DAC samples, one per clock. The switch, the ADC
// and the DAC are outside this module; their signals are ports. Channel
// words leave as one word per clock in bursts of J (channel 0 first); the
// returning words must use the same format, with the first block right after
// reset. 'sat' reports any saturation, 'overrun' a rate violation.
//
// Chain composition follows the DTP; the word widths joining the blocks
// (13-bit ADC, 13-bit analytic signal, 20-bit FFT words, 13-bit DAC) are this
// design's choice among the block configurations of the DTP study.
`timescale 1ps / 1ps
module dtp_top #(
  parameter int NS   = 13,   // ADC / DAC word
  parameter int NA   = 13,   // analytic signal word
  parameter int NH   = 15,   // coefficient word
  parameter int NM   = 3,    // extra product bits
  parameter int NHB  = 100,  // half-band branch taps
  parameter int TAPS = 23,   // polyphase taps per branch
  parameter int J    = 8,    // channels
  parameter int NF   = 20,   // FFT word
  parameter int NW   = 17,   // twiddle word
  localparam int JB = $clog2(J)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 adc_valid,
  input  logic signed [NS-1:0] adc_data,
  output logic                 sw_out_valid,
  output logic                 sw_out_first,
  output logic [JB-1:0]        sw_out_ch,
  output logic signed [NF-1:0] sw_out_re,
  output logic signed [NF-1:0] sw_out_im,
  input  logic                 sw_in_valid,
  input  logic signed [NF-1:0] sw_in_re,
  input  logic signed [NF-1:0] sw_in_im,
  output logic                 dac_valid,
  output logic signed [NS-1:0] dac_data,
  output logic                 sat,
  output logic                 overrun
);

  logic signed [NA-1:0] a_re, a_im, s_re, s_im;
  logic                 a_valid, s_valid;
  logic [3:0]           sats;
  logic [1:0]           ovrs;

  if2a #(.NSI(NS), .NSO(NA), .NH(NH), .NM(NM), .N(NHB)) u_if2a (
    .clk(clk), .rst_n(rst_n), .in_valid(adc_valid), .din(adc_data),
    .out_re(a_re), .out_im(a_im), .out_valid(a_valid), .sat(sats[0]));

  analysis_channelizer #(.NSI(NA), .NSO(NA), .NH(NH), .NM(NM), .TAPS(TAPS), .J(J), .NF(NF), .NW(NW)) u_ach (
    .clk(clk), .rst_n(rst_n), .in_valid(a_valid), .in_re(a_re), .in_im(a_im),
    .out_re(sw_out_re), .out_im(sw_out_im), .out_ch(sw_out_ch), .out_valid(sw_out_valid),
    .out_first(sw_out_first), .sat(sats[1]), .overrun(ovrs[0]));

  synthesis_channelizer #(.NF(NF), .NW(NW), .NSO(NA), .NH(NH), .NM(NM), .TAPS(TAPS), .J(J)) u_sch (
    .clk(clk), .rst_n(rst_n), .in_valid(sw_in_valid), .in_re(sw_in_re), .in_im(sw_in_im),
    .out_re(s_re), .out_im(s_im), .out_valid(s_valid), .sat(sats[2]), .overrun(ovrs[1]));

  a2if #(.NSI(NA), .NSO(NS), .NH(NH), .NM(NM), .N(NHB)) u_a2if (
    .clk(clk), .rst_n(rst_n), .in_valid(s_valid), .in_re(s_re), .in_im(s_im),
    .dout(dac_data), .out_valid(dac_valid), .sat(sats[3]));

  assign sat     = |sats;
  assign overrun = |ovrs;

endmodule
