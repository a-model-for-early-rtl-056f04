// IF to Analytic (process P1 of the DTP chain).
//
// Takes the real IF signal sampled at Fs = 4 f0 (one sample per clock while
// in_valid is high) and produces its analytic (complex baseband) version at
// 2 f0: one complex sample every two input samples. The IF band centred on
// Fs/4 is moved to 0 by multiplying with (-j)^n, which for the even and odd
// input phases reduces to a sign alternation; a half-band low-pass filter then
// removes the image and the rate is halved. In polyphase form the half-band
// filter needs one arithmetic branch only:
//   re[m] = (-1)^(m-K) x[2(m-K)],          K = N/2 - 1   (FIFO branch)
//   im[m] = sum_i c_i * s_o[m-i],  s_o[m] = -(-1)^m x[2m+1]  (hb_branch)
// then both are rounded to NSO bits. The FIFO branch is N/2 samples deep and
// delayed by the branch latency so both parts leave together (out_valid).
//
// The single-branch structure, the FIFO on the other branch and the widths
// (13-bit input, 15-bit coefficients, 3 extra product bits, 100 taps) follow
// the DTP design; the half-band coefficients (Hann-windowed, N taps) and the
// in_valid/out_valid timing are this design's own.
`timescale 1ps / 1ps
module if2a
  import dtp_pkg::*;
#(
  parameter int NSI = 13,
  parameter int NSO = 11,
  parameter int NH  = 15,
  parameter int NM  = 3,
  parameter int N   = 100,
  parameter int UBL = 2,
  localparam int LAT = 2 + tree_latency(N, UBL)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [NSI-1:0] din,
  output logic signed [NSO-1:0] out_re,
  output logic signed [NSO-1:0] out_im,
  output logic                  out_valid,
  output logic                  sat        // saturation in either branch
);

  function automatic logic signed [NSI-1:0] neg_sat(input logic signed [NSI-1:0] v);
    return (v == {1'b1, {(NSI-1){1'b0}}}) ? {1'b0, {(NSI-1){1'b1}}} : -v;
  endfunction

  logic                  phase;   // 0: even input sample, 1: odd
  logic                  mpar;    // parity of m
  logic signed [NSI-1:0] fifo [N/2];
  logic signed [NSI-1:0] s_o;
  logic                  odd_valid;
  logic signed [NSI-1:0] rd [LAT+1];
  logic signed [NSO-1:0] re_r;
  logic                  sat_b, ovf_re;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      phase <= 1'b0;
      mpar  <= 1'b0;
      fifo  <= '{default: '0};
    end else if (in_valid) begin
      phase <= ~phase;
      if (!phase) begin
        fifo[0] <= mpar ? neg_sat(din) : din;
        for (int k = 1; k < N/2; k++) fifo[k] <= fifo[k-1];
      end else begin
        mpar <= ~mpar;
      end
    end

  assign odd_valid = in_valid && phase;
  assign s_o       = mpar ? din : neg_sat(din);

  hb_branch #(.NSI(NSI), .NSO(NSO), .NH(NH), .NM(NM), .N(N), .UBL(UBL)) u_branch (
    .clk(clk), .rst_n(rst_n), .in_valid(odd_valid), .din(s_o),
    .dout(out_im), .out_valid(out_valid), .sat(sat_b));

  // Delay matching of the FIFO branch.
  always_ff @(posedge clk) begin
    rd[0] <= fifo[N/2-1];
    for (int k = 1; k <= LAT; k++) rd[k] <= rd[k-1];
  end

  srb #(.NI(NSI), .NH(0), .NL(NSI - NSO)) u_srb_re (.din(rd[LAT]), .dout(re_r), .ovf(ovf_re));
  assign out_re = re_r;
  assign sat    = sat_b || (out_valid && ovf_re);

endmodule
