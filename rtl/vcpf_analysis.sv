// Variable Coefficient Polyphase Filter, analysis side.
//
// Polyphase network of the 2x oversampled analysis channelizer with J
// channels and decimation D = J/2. The prototype low-pass h has TAPS*J
// coefficients; after every D input samples (block b, newest sample x[bD])
// the filter produces the J polyphase outputs
//   v_p = sum_{k=0}^{TAPS-1} h[p + kJ] * x[bD - p - kJ],   p = 0 .. J-1,
// one per clock, so the filter works with a coefficient that changes every
// clock ("variable coefficient"). They are issued in the order p = 0, J-1,
// J-2, .. 1 (p = -t mod J for output t), so that the forward FFT that follows
// puts a tone at +2*pi*c/J into channel c. Each tap k reads its coefficient from its
// own buffered ROM of J words addressed by p, and its sample from the status
// register, a shift register of TAPS*J + D complex words; the extra D words
// let the next block's samples arrive while a block is being computed.
// Inputs must be at most one every two clocks (the rate the DTP chain gives);
// the J outputs of a block then come out back to back. Latency from the
// block's last input to v_0 is 3 + tree latency clocks.
//
// The structure (status register per tap, coefficient ROMs, multiplier level,
// adder tree) and the default widths follow the DTP design; the prototype
// coefficients (Hann-windowed sinc, cut-off pi/J) and the timing are this
// design's own. Products keep NSI+NM bits and the sum is rounded to NSO bits
// with the same SRB layout as the half-band branch (tree growth bits
// saturated, so the input scale is kept).
`timescale 1ps / 1ps
module vcpf_analysis
  import dtp_pkg::*;
#(
  parameter int NSI  = 13,
  parameter int NSO  = 13,
  parameter int NH   = 15,
  parameter int NM   = 3,
  parameter int TAPS = 23,
  parameter int J    = 8,
  parameter int UBL  = 2,
  localparam int LAT = 2 + tree_latency(TAPS, UBL),
  localparam int JB  = $clog2(J)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [NSI-1:0] in_re,
  input  logic signed [NSI-1:0] in_im,
  output logic signed [NSO-1:0] out_re,
  output logic signed [NSO-1:0] out_im,
  output logic                  out_valid,
  output logic                  out_first,   // marks v_0 of a block
  output logic                  overrun,     // a block started before the previous one was done
  output logic                  sat
);

  localparam int D    = J / 2;
  localparam int LEN  = TAPS * J + D;
  localparam int NP   = NSI + NH;
  localparam int NQ   = NSI + NM;
  localparam int NACC = tree_levels(TAPS);
  localparam int NT   = NQ + NACC;

  typedef logic [NH-1:0] rom_t [J];

  // Prototype coefficient n of TAPS*J.
  function automatic logic [NH-1:0] proto(input int n);
    real pi, x, s, w, v;
    pi = 3.14159265358979;
    x  = (real'(n) - real'(TAPS * J - 1) / 2.0) / real'(J);
    s  = (x == 0.0) ? 1.0 : $sin(pi * x) / (pi * x);
    w  = 0.5 - 0.5 * $cos(2.0 * pi * (real'(n) + 0.5) / real'(TAPS * J));
    v  = 0.99 * s * w;
    return NH'($rtoi(v * real'(1 << (NH - 1)) + (v >= 0.0 ? 0.5 : -0.5)));
  endfunction

  function automatic rom_t tap_rom(input int k);
    rom_t r;
    for (int p = 0; p < J; p++) r[p] = proto(p + k * J);
    return r;
  endfunction

  logic signed [NSI-1:0] dl_re [LEN];
  logic signed [NSI-1:0] dl_im [LEN];
  logic [$clog2(D+1)-1:0] cnt_in, off;
  logic [JB-1:0]          p, pe;
  logic                   busy, boundary;

  assign pe = -p;   // branch issued at output slot p

  assign boundary = in_valid && (int'(cnt_in) == D - 1);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      dl_re   <= '{default: '0};
      dl_im   <= '{default: '0};
      cnt_in  <= '0;
      off     <= '0;
      p       <= '0;
      busy    <= 1'b0;
      overrun <= 1'b0;
    end else begin
      if (in_valid) begin
        dl_re[0] <= in_re;
        dl_im[0] <= in_im;
        for (int i = 1; i < LEN; i++) begin
          dl_re[i] <= dl_re[i-1];
          dl_im[i] <= dl_im[i-1];
        end
        cnt_in <= boundary ? '0 : cnt_in + 1'b1;
        off    <= boundary ? '0 : off + 1'b1;
      end
      if (busy) begin
        p <= p + 1'b1;
        if (int'(p) == J - 1) busy <= 1'b0;
      end
      if (boundary) begin
        if (busy && int'(p) != J - 1) overrun <= 1'b1;
        busy <= 1'b1;
        p    <= '0;
      end
    end

  // Issue: sample selection and ROM addressing.
  logic signed [NSI-1:0] sel_re [TAPS];
  logic signed [NSI-1:0] sel_im [TAPS];
  logic [NH-1:0]         coef   [TAPS];
  logic signed [NP-1:0]  pr_re  [TAPS];
  logic signed [NP-1:0]  pr_im  [TAPS];
  logic signed [NQ-1:0]  rq_re  [TAPS];
  logic signed [NQ-1:0]  rq_im  [TAPS];
  logic signed [NQ-1:0]  pq_re  [TAPS];
  logic signed [NQ-1:0]  pq_im  [TAPS];
  logic [2*TAPS-1:0]     ovf_p;

  always_ff @(posedge clk)
    for (int k = 0; k < TAPS; k++) begin
      sel_re[k] <= dl_re[int'(pe) + k * J + int'(off)];
      sel_im[k] <= dl_im[int'(pe) + k * J + int'(off)];
    end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    localparam rom_t INIT = tap_rom(k);
    buffered_rom #(.DEPTH(J), .DW(NH), .INIT(INIT)) u_rom (.clk(clk), .addr(pe), .data(coef[k]));
    always_comb begin
      pr_re[k] = sel_re[k] * $signed(coef[k]);
      pr_im[k] = sel_im[k] * $signed(coef[k]);
    end
    srb #(.NI(NP), .NH(1), .NL(NH - NM - 1)) u_sr (.din(pr_re[k]), .dout(rq_re[k]), .ovf(ovf_p[2*k]));
    srb #(.NI(NP), .NH(1), .NL(NH - NM - 1)) u_si (.din(pr_im[k]), .dout(rq_im[k]), .ovf(ovf_p[2*k+1]));
  end

  always_ff @(posedge clk) begin
    pq_re <= rq_re;
    pq_im <= rq_im;
  end

  logic signed [NT-1:0]  acc_re, acc_im;
  logic signed [NSO-1:0] o_re, o_im;
  logic                  ovf_re, ovf_im;

  adder_tree #(.N(TAPS), .W(NQ), .UBL(UBL)) u_tree_re (.clk(clk), .din(pq_re), .dout(acc_re));
  adder_tree #(.N(TAPS), .W(NQ), .UBL(UBL)) u_tree_im (.clk(clk), .din(pq_im), .dout(acc_im));
  srb #(.NI(NT), .NH(NACC), .NL(NQ - NSO)) u_so_re (.din(acc_re), .dout(o_re), .ovf(ovf_re));
  srb #(.NI(NT), .NH(NACC), .NL(NQ - NSO)) u_so_im (.din(acc_im), .dout(o_im), .ovf(ovf_im));

  logic [LAT:0] vpipe, fpipe;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      vpipe  <= '0;
      fpipe  <= '0;
      sat    <= 1'b0;
      out_re <= '0;
      out_im <= '0;
    end else begin
      vpipe  <= {vpipe[LAT-1:0], busy};
      fpipe  <= {fpipe[LAT-1:0], busy && p == '0};
      // flags only count on stages that hold a valid word
      sat    <= (vpipe[0] && |ovf_p) || (vpipe[LAT-1] && (ovf_re || ovf_im));
      out_re <= o_re;
      out_im <= o_im;
    end

  assign out_valid = vpipe[LAT];
  assign out_first = fpipe[LAT];

  property p_no_overrun;
    @(posedge clk) disable iff (!rst_n) !(boundary && busy && int'(p) != J - 1);
  endproperty
  a_no_overrun: assert property (p_no_overrun) else $error("vcpf_analysis: inputs faster than one every two clocks");

endmodule
