// Processing branch of the half-band polyphase filter.
//
// The single arithmetic branch of the IF-to-Analytic and Analytic-to-IF
// blocks: a status register of N samples, a level of N multipliers by
// constant coefficients, one SRB per product that keeps NSI+NM bits, a buffer
// register, a pipelined binary adder tree and a final SRB down to NSO bits.
//   dout = SRB( sum_i SRB(sr[i] * COEF[i]) ),  sr[0] = newest sample.
// A sample is taken when in_valid is high; its result appears LAT = 2 + tree
// latency clocks after that edge, flagged by out_valid. The arithmetic chain
// and the SRB parameters follow the DTP hardware-complexity table of the
// IF-to-Analytic block (products lose 1 MSB and NH-NM-1 LSBs); the coefficient
// values come from a windowed half-band formula computed below. The output SRB has the table's word sizes
// but saturates the NACC tree growth bits instead of rounding them off, so
// that the branch keeps the scale of its input (a design choice: dropping
// them as LSBs would divide the filtered branch by 2^NACC against the FIFO
// branch).
`timescale 1ps / 1ps
module hb_branch
  import dtp_pkg::*;
#(
  parameter int NSI = 13,
  parameter int NSO = 11,
  parameter int NH  = 15,
  parameter int NM  = 3,
  parameter int N   = 100,
  parameter int UBL = 2,
  localparam int NACC = tree_levels(N),
  localparam int LAT  = 2 + tree_latency(N, UBL)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [NSI-1:0] din,
  output logic signed [NSO-1:0] dout,
  output logic                  out_valid,
  output logic                  sat        // an SRB of this branch saturated (registered)
);

  typedef logic signed [NH-1:0] coef_t [N];

  // Odd taps of a half-band low-pass, scaled by 2 so the passband gain of
  // the branch matches the unit-gain FIFO branch: c = 2 sin(pi d/2)/(pi d) w(d).
  function automatic coef_t hb_coefs();
    coef_t c;
    real pi, d, v, w;
    pi = 3.14159265358979;
    for (int i = 0; i < N; i++) begin
      d = real'(2 * i - N + 1);
      w = 0.5 * (1.0 + $cos(pi * d / real'(N + 1)));
      v = 2.0 * $sin(pi * d / 2.0) / (pi * d) * w;
      c[i] = NH'($rtoi(v * real'(1 << (NH - 1)) + (v >= 0.0 ? 0.5 : -0.5)));
    end
    return c;
  endfunction

  localparam coef_t COEF = hb_coefs();

  localparam int NP = NSI + NH;         // full product
  localparam int NQ = NSI + NM;         // product after the first SRB
  localparam int NT = NQ + NACC;        // adder tree output

  logic signed [NSI-1:0] sr     [N];
  logic signed [NP-1:0]  prod   [N];
  logic signed [NQ-1:0]  prod_r [N];
  logic signed [NQ-1:0]  prod_q [N];
  logic signed [NT-1:0]  acc;
  logic signed [NSO-1:0] acc_r;
  logic [LAT:0]          vpipe;
  logic [N-1:0]          ovf_p;
  logic                  ovf_o;

  // Status register.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sr <= '{default: '0};
    else if (in_valid) begin
      sr[0] <= din;
      for (int i = 1; i < N; i++) sr[i] <= sr[i-1];
    end

  // Multiplication level and its SRBs.
  for (genvar i = 0; i < N; i++) begin : g_mul
    always_comb prod[i] = sr[i] * COEF[i];
    srb #(.NI(NP), .NH(1), .NL(NH - NM - 1)) u_srb (.din(prod[i]), .dout(prod_r[i]), .ovf(ovf_p[i]));
  end

  // Buffer between the multiplication level and the accumulation.
  always_ff @(posedge clk) prod_q <= prod_r;

  adder_tree #(.N(N), .W(NQ), .UBL(UBL)) u_tree (.clk(clk), .din(prod_q), .dout(acc));

  srb #(.NI(NT), .NH(NACC), .NL(NQ - NSO)) u_srb_out (.din(acc), .dout(acc_r), .ovf(ovf_o));

  always_ff @(posedge clk) dout <= acc_r;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) sat <= 1'b0;
    else        sat <= (|ovf_p) || (vpipe[LAT-1] && ovf_o);   // the tree holds no valid sum otherwise

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT-1:0], in_valid};

  assign out_valid = vpipe[LAT];

endmodule
