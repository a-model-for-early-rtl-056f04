// One stage of the streaming radix-2 decimation-in-frequency FFT.
//
// Single-path delay feedback stage s of a J-point transform: a FIFO memory of
// L = J/2^(s+1) complex words, a butterfly and a complex twiddle multiplier.
// With c counting input samples modulo 2L:
//   c <  L : the input enters the FIFO; the output is the FIFO word (a
//            difference stored L samples earlier) times W_2L^c;
//   c >= L : butterfly of the FIFO word a and the input b: a+b goes out,
//            a-b goes into the FIFO.
// Sums and differences are rounded by one bit (divide by 2) so the word stays
// W bits; twiddles are Q1.(NW-1) words from a buffered ROM, and the product is
// rounded back to W bits with saturation. Twiddle 1 (index 0) bypasses the
// multiplier. INVERSE = 1 conjugates the twiddles (IFFT). The stage emits one
// word per input word, two clocks later (out_valid follows in_valid); its
// output sequence lags the input by L words.
//
// The FIFO/butterfly/multiplier composition of a stage follows the DTP FFT;
// the delay-feedback organisation, scaling and pipeline are this design's own.
`timescale 1ps / 1ps
module fft_stage #(
  parameter int W       = 20,
  parameter int NW      = 17,
  parameter int J       = 8,
  parameter int STAGE   = 0,
  parameter bit INVERSE = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] in_re,
  input  logic signed [W-1:0] in_im,
  output logic signed [W-1:0] out_re,
  output logic signed [W-1:0] out_im,
  output logic                out_valid,
  output logic                sat
);

  localparam int L  = J >> (STAGE + 1);
  localparam int LB = (L > 1) ? $clog2(L) : 1;
  localparam int NPM = W + NW + 1;

  typedef logic [2*NW-1:0] tw_t [L];

  function automatic tw_t twiddles();
    tw_t t;
    real pi, a, cr, ci, sc;
    pi = 3.14159265358979;
    sc = real'((1 << (NW - 1)) - 1);
    for (int c = 0; c < L; c++) begin
      a  = pi * real'(c) / real'(L);
      cr = $cos(a) * sc;
      ci = (INVERSE ? 1.0 : -1.0) * $sin(a) * sc;
      t[c] = {NW'($rtoi(cr + (cr >= 0.0 ? 0.5 : -0.5))), NW'($rtoi(ci + (ci >= 0.0 ? 0.5 : -0.5)))};
    end
    return t;
  endfunction

  localparam tw_t TW = twiddles();

  logic signed [W-1:0] fifo_re [L];
  logic signed [W-1:0] fifo_im [L];
  logic [LB-1:0]       ptr;
  logic [LB:0]         cnt;
  logic                ph2;
  logic [LB-1:0]       idx;

  assign ph2 = cnt[LB] || (L == 1 && cnt[0]);
  assign idx = (L == 1) ? '0 : cnt[LB-1:0];

  // Butterfly.
  logic signed [W:0]   s_re, s_im, d_re, d_im;
  logic signed [W-1:0] sr_re, sr_im, dr_re, dr_im;
  logic signed [W-1:0] a_re, a_im;
  logic [3:0]          ovf_b;

  assign a_re = fifo_re[ptr];
  assign a_im = fifo_im[ptr];

  always_comb begin
    s_re = a_re + in_re;
    s_im = a_im + in_im;
    d_re = a_re - in_re;
    d_im = a_im - in_im;
  end

  srb #(.NI(W+1), .NH(0), .NL(1)) u_s_re (.din(s_re), .dout(sr_re), .ovf(ovf_b[0]));
  srb #(.NI(W+1), .NH(0), .NL(1)) u_s_im (.din(s_im), .dout(sr_im), .ovf(ovf_b[1]));
  srb #(.NI(W+1), .NH(0), .NL(1)) u_d_re (.din(d_re), .dout(dr_re), .ovf(ovf_b[2]));
  srb #(.NI(W+1), .NH(0), .NL(1)) u_d_im (.din(d_im), .dout(dr_im), .ovf(ovf_b[3]));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      fifo_re <= '{default: '0};
      fifo_im <= '{default: '0};
      ptr     <= '0;
      cnt     <= '0;
    end else if (in_valid) begin
      fifo_re[ptr] <= ph2 ? dr_re : in_re;
      fifo_im[ptr] <= ph2 ? dr_im : in_im;
      ptr <= (int'(ptr) == L - 1) ? '0 : ptr + 1'b1;
      cnt <= (int'(cnt) == 2 * L - 1) ? '0 : cnt + 1'b1;
    end

  // Stage A register: value to output and whether it needs the twiddle.
  logic signed [W-1:0] o_re, o_im;
  logic                mul_q, v_q;
  logic [2*NW-1:0]     tw;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      o_re  <= '0;
      o_im  <= '0;
      mul_q <= 1'b0;
      v_q   <= 1'b0;
    end else begin
      o_re  <= ph2 ? sr_re : a_re;
      o_im  <= ph2 ? sr_im : a_im;
      mul_q <= !ph2 && idx != '0;
      v_q   <= in_valid;
    end

  buffered_rom #(.DEPTH(L), .DW(2*NW), .INIT(TW)) u_rom (.clk(clk), .addr(idx), .data(tw));

  // Stage B: complex multiplication by the twiddle.
  logic signed [NW-1:0]  w_re, w_im;
  logic signed [NPM-1:0] m_re, m_im;
  logic signed [W-1:0]   mr_re, mr_im;
  logic [1:0]            ovf_m;

  assign w_re = tw[2*NW-1:NW];
  assign w_im = tw[NW-1:0];

  always_comb begin
    m_re = NPM'(o_re * w_re) - NPM'(o_im * w_im);
    m_im = NPM'(o_re * w_im) + NPM'(o_im * w_re);
  end

  srb #(.NI(NPM), .NH(2), .NL(NW - 1)) u_m_re (.din(m_re), .dout(mr_re), .ovf(ovf_m[0]));
  srb #(.NI(NPM), .NH(2), .NL(NW - 1)) u_m_im (.din(m_im), .dout(mr_im), .ovf(ovf_m[1]));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      out_re    <= '0;
      out_im    <= '0;
      out_valid <= 1'b0;
      sat       <= 1'b0;
    end else begin
      out_re    <= mul_q ? mr_re : o_re;
      out_im    <= mul_q ? mr_im : o_im;
      out_valid <= v_q;
      sat       <= (in_valid && ph2 && |ovf_b) || (v_q && mul_q && |ovf_m);
    end

endmodule
