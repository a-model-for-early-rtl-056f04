// Variable Coefficient Polyphase Filter, synthesis side.
//
// Polyphase network of the 2x oversampled synthesis channelizer with J
// channels and interpolation D = J/2. It receives blocks of J words u_b[q]
// (the IFFT output in natural order, one word per in_valid) and, after each
// complete block b, produces D output samples
//   y[bD + i] = sum_{r=0}^{2*TAPS-1} g[i + rD] * u_(b-r)[(i + rD + D*par(b-r)) mod J],
// i = 0 .. D-1, one every two clocks. par(b) is 1 for odd blocks (the first
// block after reset is even): the circular shift by J/2 on odd blocks undoes
// the modulation of the channels that the decimation by J/2 of a 2x
// oversampled bank leaves, as the half rotation does on the analysis side. The status register keeps the last
// 2*TAPS blocks, i.e. 2J words per tap of the prototype g (TAPS*J
// coefficients); multiplier r takes its coefficient from a buffered ROM of D
// words addressed by i. Products keep NSI+NM bits, the adder tree sums the
// 2*TAPS products and an SRB rounds to NSO bits, keeping the input scale
// times 2^GSH: the tree growth bits (and GSH more) are saturated, not
// dropped. Blocks may arrive back to back (J words in J clocks).
//
// The 2J-words-per-tap status register, the coefficient ROMs and the default
// widths follow the DTP design; the indexing formula, the prototype and the
// timing are this design's own.
`timescale 1ps / 1ps
module vcpf_synthesis
  import dtp_pkg::*;
#(
  parameter int NSI  = 20,
  parameter int NSO  = 13,
  parameter int NH   = 15,
  parameter int NM   = 3,
  parameter int TAPS = 23,
  parameter int J    = 8,
  parameter int UBL  = 2,
  parameter int GSH  = 0,   // output gain 2^GSH
  localparam int R   = 2 * TAPS,
  localparam int LAT = 2 + tree_latency(R, UBL)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [NSI-1:0] in_re,
  input  logic signed [NSI-1:0] in_im,
  output logic signed [NSO-1:0] out_re,
  output logic signed [NSO-1:0] out_im,
  output logic                  out_valid,
  output logic                  sat
);

  localparam int D    = J / 2;
  localparam int JB   = $clog2(J);
  localparam int DB   = (D > 1) ? $clog2(D) : 1;
  localparam int NP   = NSI + NH;
  localparam int NQ   = NSI + NM;
  localparam int NACC = tree_levels(R);
  localparam int NT   = NQ + NACC;

  typedef logic [NH-1:0] rom_t [D];

  function automatic logic [NH-1:0] proto(input int n);
    real pi, x, s, w, v;
    pi = 3.14159265358979;
    x  = (real'(n) - real'(TAPS * J - 1) / 2.0) / real'(J);
    s  = (x == 0.0) ? 1.0 : $sin(pi * x) / (pi * x);
    w  = 0.5 - 0.5 * $cos(2.0 * pi * (real'(n) + 0.5) / real'(TAPS * J));
    v  = 0.99 * s * w;
    return NH'($rtoi(v * real'(1 << (NH - 1)) + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic rom_t mul_rom(input int r);
    rom_t t;
    for (int i = 0; i < D; i++) t[i] = proto(i + r * D);
    return t;
  endfunction

  logic signed [NSI-1:0] cur_re  [J];
  logic signed [NSI-1:0] cur_im  [J];
  logic signed [NSI-1:0] hist_re [R][J];
  logic signed [NSI-1:0] hist_im [R][J];
  logic [R-1:0]          hpar;   // parity of the block held in hist[r]
  logic                  bpar;   // parity of the block being written
  logic [JB-1:0]         wcnt;
  logic [DB-1:0]         i_cnt;
  logic                  busy, slot;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cur_re  <= '{default: '0};
      cur_im  <= '{default: '0};
      hist_re <= '{default: '0};
      hist_im <= '{default: '0};
      hpar    <= '0;
      bpar    <= 1'b0;
      wcnt    <= '0;
      i_cnt   <= '0;
      busy    <= 1'b0;
      slot    <= 1'b0;
    end else begin
      if (busy) begin
        slot <= ~slot;
        if (slot) begin
          i_cnt <= i_cnt + 1'b1;
          if (int'(i_cnt) == D - 1) busy <= 1'b0;
        end
      end
      if (in_valid) begin
        cur_re[wcnt] <= in_re;
        cur_im[wcnt] <= in_im;
        wcnt <= wcnt + 1'b1;
        if (int'(wcnt) == J - 1) begin
          for (int q = 0; q < J; q++) begin
            hist_re[0][q] <= (q == J - 1) ? in_re : cur_re[q];
            hist_im[0][q] <= (q == J - 1) ? in_im : cur_im[q];
          end
          for (int r = 1; r < R; r++) begin
            hist_re[r] <= hist_re[r-1];
            hist_im[r] <= hist_im[r-1];
          end
          hpar  <= {hpar[R-2:0], bpar};
          bpar  <= ~bpar;
          busy  <= 1'b1;
          slot  <= 1'b0;
          i_cnt <= '0;
        end
      end
    end

  logic issue;
  assign issue = busy && !slot;

  logic signed [NSI-1:0] sel_re [R];
  logic signed [NSI-1:0] sel_im [R];
  logic [NH-1:0]         coef   [R];
  logic signed [NP-1:0]  pr_re  [R];
  logic signed [NP-1:0]  pr_im  [R];
  logic signed [NQ-1:0]  rq_re  [R];
  logic signed [NQ-1:0]  rq_im  [R];
  logic signed [NQ-1:0]  pq_re  [R];
  logic signed [NQ-1:0]  pq_im  [R];
  logic [2*R-1:0]        ovf_p;

  always_ff @(posedge clk)
    for (int r = 0; r < R; r++) begin
      sel_re[r] <= hist_re[r][(int'(i_cnt) + r * D + (hpar[r] ? D : 0)) % J];
      sel_im[r] <= hist_im[r][(int'(i_cnt) + r * D + (hpar[r] ? D : 0)) % J];
    end

  for (genvar r = 0; r < R; r++) begin : g_mul
    localparam rom_t INIT = mul_rom(r);
    buffered_rom #(.DEPTH(D), .DW(NH), .INIT(INIT)) u_rom (.clk(clk), .addr(i_cnt), .data(coef[r]));
    always_comb begin
      pr_re[r] = sel_re[r] * $signed(coef[r]);
      pr_im[r] = sel_im[r] * $signed(coef[r]);
    end
    srb #(.NI(NP), .NH(1), .NL(NH - NM - 1)) u_sr (.din(pr_re[r]), .dout(rq_re[r]), .ovf(ovf_p[2*r]));
    srb #(.NI(NP), .NH(1), .NL(NH - NM - 1)) u_si (.din(pr_im[r]), .dout(rq_im[r]), .ovf(ovf_p[2*r+1]));
  end

  always_ff @(posedge clk) begin
    pq_re <= rq_re;
    pq_im <= rq_im;
  end

  logic signed [NT-1:0]  acc_re, acc_im;
  logic signed [NSO-1:0] o_re, o_im;
  logic                  ovf_re, ovf_im;

  adder_tree #(.N(R), .W(NQ), .UBL(UBL)) u_tree_re (.clk(clk), .din(pq_re), .dout(acc_re));
  adder_tree #(.N(R), .W(NQ), .UBL(UBL)) u_tree_im (.clk(clk), .din(pq_im), .dout(acc_im));
  srb #(.NI(NT), .NH(NACC + GSH), .NL(NQ - NSO - GSH)) u_so_re (.din(acc_re), .dout(o_re), .ovf(ovf_re));
  srb #(.NI(NT), .NH(NACC + GSH), .NL(NQ - NSO - GSH)) u_so_im (.din(acc_im), .dout(o_im), .ovf(ovf_im));

  logic [LAT:0] vpipe;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      vpipe  <= '0;
      sat    <= 1'b0;
      out_re <= '0;
      out_im <= '0;
    end else begin
      vpipe  <= {vpipe[LAT-1:0], issue};
      // flags only count on stages that hold a valid word
      sat    <= (vpipe[0] && |ovf_p) || (vpipe[LAT-1] && (ovf_re || ovf_im));
      out_re <= o_re;
      out_im <= o_im;
    end

  assign out_valid = vpipe[LAT];

endmodule
