// Pipelined binary tree adder.
//
// Adds N signed words of W bits. Level l (1..L, L = ceil(log2 N)) adds pairs of
// the previous level's words; an unpaired word passes through. A register
// level is placed after every UBL adder levels, so the latency is
// floor(L/UBL) clocks (zero when UBL > L); the tree runs every clock.
// The result has W+L bits and cannot overflow.
//
// The tree shape and the register placement every n_UBL levels follow the
// accumulation block of the DTP filters; UBL = 2 is this design's default.
`timescale 1ps / 1ps
module adder_tree
  import dtp_pkg::*;
#(
  parameter int N   = 100,
  parameter int W   = 16,
  parameter int UBL = 2,
  localparam int L  = tree_levels(N),
  localparam int WO = W + L
) (
  input  logic                 clk,
  input  logic signed [W-1:0]  din [N],
  output logic signed [WO-1:0] dout
);

  logic signed [WO-1:0] lvl0 [N];
  always_comb for (int j = 0; j < N; j++) lvl0[j] = WO'(din[j]);

  for (genvar l = 1; l <= L; l++) begin : g_lvl
    localparam int CIN  = tree_count(N, l - 1);
    localparam int COUT = tree_count(N, l);
    logic signed [WO-1:0] sum [COUT];
    logic signed [WO-1:0] val [COUT];
    logic signed [WO-1:0] prev [CIN];

    if (l == 1) begin : g_src0
      always_comb for (int j = 0; j < CIN; j++) prev[j] = lvl0[j];
    end else begin : g_srcn
      always_comb for (int j = 0; j < CIN; j++) prev[j] = g_lvl[l-1].val[j];
    end

    always_comb
      for (int j = 0; j < COUT; j++)
        sum[j] = (2 * j + 1 < CIN) ? prev[2*j] + prev[2*j+1] : prev[2*j];

    if (l % UBL == 0) begin : g_reg
      always_ff @(posedge clk) val <= sum;
    end else begin : g_comb
      always_comb val = sum;
    end
  end

  if (L == 0) begin : g_single
    always_comb dout = lvl0[0];
  end else begin : g_out
    always_comb dout = g_lvl[L].val[0];
  end

endmodule
