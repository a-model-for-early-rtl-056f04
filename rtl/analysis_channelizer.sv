// Analysis channelizer (process P2 of the DTP chain).
//
// Splits the complex analytic signal into J channels (decimation J/2, so each
// channel is oversampled by 2). Chain: polyphase network (vcpf_analysis) ->
// DPRB that applies the half-block rotation of odd blocks -> J-point FFT ->
// DPRB that restores natural order. For every J/2 input samples the block
// emits one word for each channel, channel 0 first (out_first), one per clock.
// Channel m of block b is (up to the fixed-point scaling 1/J of the FFT)
//   X_m[b] = sum_p u_p W_J^(m p),  u_p = v_((p + J/2 * (b mod 2)) mod J).
// The NSO-bit polyphase output is placed in the top bits of the NF-bit FFT
// word. The block composition follows the DTP analysis channelizer; the word
// alignment between the blocks is this design's choice.
`timescale 1ps / 1ps
module analysis_channelizer #(
  parameter int NSI  = 13,
  parameter int NSO  = 13,
  parameter int NH   = 15,
  parameter int NM   = 3,
  parameter int TAPS = 23,
  parameter int J    = 8,
  parameter int NF   = 20,
  parameter int NW   = 17,
  localparam int JB = $clog2(J)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [NSI-1:0] in_re,
  input  logic signed [NSI-1:0] in_im,
  output logic signed [NF-1:0] out_re,
  output logic signed [NF-1:0] out_im,
  output logic [JB-1:0]        out_ch,
  output logic                 out_valid,
  output logic                 out_first,
  output logic                 sat,
  output logic                 overrun
);

  import dtp_pkg::*;

  logic signed [NSO-1:0] v_re, v_im;
  logic                  v_valid, v_first, v_ovr, v_sat;
  logic signed [NF-1:0]  a_re, a_im, r_re, r_im, f_re, f_im;
  logic                  r_valid, r_first, r_ovr, f_valid, f_first, f_sat, o_ovr;

  vcpf_analysis #(.NSI(NSI), .NSO(NSO), .NH(NH), .NM(NM), .TAPS(TAPS), .J(J)) u_vcpf (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_re(v_re), .out_im(v_im), .out_valid(v_valid), .out_first(v_first),
    .overrun(v_ovr), .sat(v_sat));

  assign a_re = {v_re, {(NF-NSO){1'b0}}};
  assign a_im = {v_im, {(NF-NSO){1'b0}}};

  dprb #(.W(NF), .J(J), .MODE(ORDER_HALF_ROTATE)) u_dprb_in (
    .clk(clk), .rst_n(rst_n), .in_valid(v_valid), .in_re(a_re), .in_im(a_im),
    .out_re(r_re), .out_im(r_im), .out_valid(r_valid), .out_first(r_first), .overrun(r_ovr));

  fft #(.W(NF), .NW(NW), .J(J), .INVERSE(1'b0)) u_fft (
    .clk(clk), .rst_n(rst_n), .in_valid(r_valid), .in_re(r_re), .in_im(r_im),
    .out_re(f_re), .out_im(f_im), .out_valid(f_valid), .out_first(f_first), .sat(f_sat));

  dprb #(.W(NF), .J(J), .MODE(ORDER_BITREV)) u_dprb_out (
    .clk(clk), .rst_n(rst_n), .in_valid(f_valid), .in_re(f_re), .in_im(f_im),
    .out_re(out_re), .out_im(out_im), .out_valid(out_valid), .out_first(out_first), .overrun(o_ovr));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)         out_ch <= '0;
    else if (out_valid) out_ch <= out_ch + 1'b1;

  assign sat     = v_sat || f_sat;
  assign overrun = v_ovr || r_ovr || o_ovr;

  // The FFT block boundaries must line up with the DPRB blocks.
  a_fft_block: assert property (@(posedge clk) disable iff (!rst_n) f_first |-> f_valid)
    else $error("analysis_channelizer: first without valid");
  logic unused;
  assign unused = v_first ^ r_first;

endmodule
