// Streaming J-point FFT (or IFFT) of log2(J) radix-2 DIF stages.
//
// Takes one complex word per in_valid, blocks of J words in natural order,
// and returns the J-point transform in bit-reversed order, one word per input
// word; out_first marks bin 0 of each block. The cascade delays the sequence
// by J-1 words, so the first J-1 outputs after reset are dropped and the last
// block leaves once J-1 further words have entered. Each stage scales by 1/2,
// so the result is the DFT divided by J. INVERSE = 1 gives the inverse
// transform (conjugate twiddles), otherwise identical, as in the DTP where
// the IFFT differs from the FFT only in the sign of the twiddle factors.
`timescale 1ps / 1ps
module fft #(
  parameter int W       = 20,
  parameter int NW      = 17,
  parameter int J       = 8,
  parameter bit INVERSE = 1'b0,
  localparam int K = $clog2(J)
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
  output logic                sat
);

  logic signed [W-1:0] s_re [K+1];
  logic signed [W-1:0] s_im [K+1];
  logic                s_v  [K+1];
  logic [K-1:0]        s_sat;

  assign s_re[0] = in_re;
  assign s_im[0] = in_im;
  assign s_v[0]  = in_valid;

  for (genvar s = 0; s < K; s++) begin : g_st
    fft_stage #(.W(W), .NW(NW), .J(J), .STAGE(s), .INVERSE(INVERSE)) u_stage (
      .clk(clk), .rst_n(rst_n), .in_valid(s_v[s]), .in_re(s_re[s]), .in_im(s_im[s]),
      .out_re(s_re[s+1]), .out_im(s_im[s+1]), .out_valid(s_v[s+1]), .sat(s_sat[s]));
  end

  // Drop the J-1 words of the cascade's initial lag, then count bins.
  logic [K:0]   skip;
  logic [K-1:0] bin;
  logic         live;

  assign live = s_v[K] && (int'(skip) == J - 1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      skip <= '0;
      bin  <= '0;
    end else if (s_v[K]) begin
      if (int'(skip) < J - 1) skip <= skip + 1'b1;
      else                    bin  <= bin + 1'b1;
    end

  assign out_re    = s_re[K];
  assign out_im    = s_im[K];
  assign out_valid = live;
  assign out_first = live && bin == '0;
  assign sat       = |s_sat;

endmodule
