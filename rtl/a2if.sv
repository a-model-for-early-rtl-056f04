// Analytic to IF (process P4 of the DTP chain).
//
// Dual of the IF-to-Analytic block. Takes the complex output of the synthesis
// channelizer (one sample u[m] every two clocks, in_valid) and rebuilds the
// real IF signal at Fs = 4 f0, one sample per clock. Interpolation by 2 with
// the half-band filter restores the oversampling; the result is moved up by
// Fs/4 (multiplication by j^n) and its real part is kept. In polyphase form:
//   x[2m]   =  (-1)^m Re u[m-K],                 K = N/2      (FIFO branch)
//   x[2m+1] = -(-1)^m sum_i c_i Im u[m-i]                     (hb_branch)
// x[2m] is output in the clock where the branch result becomes valid and
// x[2m+1] in the next one (dout, out_valid), each rounded to NSO bits.
//
// The single processing branch with a FIFO on the other part follows the DTP
// design; coefficients, the saturation on sign changes and the output timing
// are this design's own.
`timescale 1ps / 1ps
module a2if
  import dtp_pkg::*;
#(
  parameter int NSI = 13,
  parameter int NSO = 13,
  parameter int NH  = 15,
  parameter int NM  = 3,
  parameter int N   = 100,
  parameter int UBL = 2,
  localparam int LAT = 2 + tree_latency(N, UBL)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [NSI-1:0] in_re,
  input  logic signed [NSI-1:0] in_im,
  output logic signed [NSO-1:0] dout,
  output logic                  out_valid,
  output logic                  sat
);

  function automatic logic signed [NSO-1:0] neg_sat(input logic signed [NSO-1:0] v);
    return (v == {1'b1, {(NSO-1){1'b0}}}) ? {1'b0, {(NSO-1){1'b1}}} : -v;
  endfunction

  logic                  mpar;
  logic signed [NSI-1:0] fifo [N/2+1];
  logic signed [NSI-1:0] rd   [LAT];
  logic                  pd   [LAT];
  logic signed [NSO-1:0] im_f, re_r, odd_hold;
  logic                  im_v, sat_b, ovf_re, odd_pend;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      mpar <= 1'b0;
      fifo <= '{default: '0};
    end else if (in_valid) begin
      mpar    <= ~mpar;
      fifo[0] <= in_re;
      for (int k = 1; k <= N/2; k++) fifo[k] <= fifo[k-1];
    end

  hb_branch #(.NSI(NSI), .NSO(NSO), .NH(NH), .NM(NM), .N(N), .UBL(UBL)) u_branch (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(in_im),
    .dout(im_f), .out_valid(im_v), .sat(sat_b));

  // FIFO branch and the parity of m, delayed to meet the branch result.
  always_ff @(posedge clk) begin
    rd[0] <= fifo[N/2];
    pd[0] <= ~mpar;   // parity of the sample just written
    for (int k = 1; k < LAT; k++) begin
      rd[k] <= rd[k-1];
      pd[k] <= pd[k-1];
    end
  end

  srb #(.NI(NSI), .NH(0), .NL(NSI - NSO)) u_srb_re (.din(rd[LAT-1]), .dout(re_r), .ovf(ovf_re));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dout      <= '0;
      out_valid <= 1'b0;
      odd_pend  <= 1'b0;
      odd_hold  <= '0;
    end else begin
      out_valid <= 1'b0;
      odd_pend  <= 1'b0;
      if (im_v) begin
        dout      <= pd[LAT-1] ? neg_sat(re_r) : re_r;
        odd_hold  <= pd[LAT-1] ? im_f : neg_sat(im_f);
        odd_pend  <= 1'b1;
        out_valid <= 1'b1;
      end else if (odd_pend) begin
        dout      <= odd_hold;
        out_valid <= 1'b1;
      end
    end

  assign sat = sat_b || (im_v && ovf_re);

endmodule
