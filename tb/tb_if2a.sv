// Testbench of if2a (and of hb_branch inside it) at the default size: a
// random IF stream, one sample per clock, is compared output by output with a
// direct model: sign alternation of the two input phases, the N-tap branch
// with the SRB roundings, the N/2-deep FIFO branch. Also checks that outputs
// come exactly every 2 clocks and the latency from the odd sample to the
// output.
`timescale 1ps / 1ps
module tb_if2a;
  `include "dtp_tb_util.svh"
  localparam int NSI = 13, NSO = 11, NH = 15, NM = 3, N = 100, UBL = 2;
  localparam int K = N / 2 - 1, NACC = 7, LAT = 2 + 7 / 2;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1, in_valid = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  logic signed [NSI-1:0] din = '0;
  logic signed [NSO-1:0] out_re, out_im;
  logic out_valid, sat;

  if2a dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .din(din),
            .out_re(out_re), .out_im(out_im), .out_valid(out_valid), .sat(sat));

  always #5 clk = ~clk;

  longint x [$];
  longint coef [N];
  int     nout = 0, last_out = -1, cyc = 0, last_odd = -1;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint s_e(int m);
    if (m < 0) return 0;
    return (m % 2) ? m_neg(x[2*m], NSI) : x[2*m];
  endfunction
  function automatic longint s_o(int m);
    if (m < 0) return 0;
    return (m % 2) ? x[2*m+1] : m_neg(x[2*m+1], NSI);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (in_valid && x.size() == 2 && last_odd < 0) last_odd = cyc;
    if (out_valid) begin
      automatic longint e_re = m_srb(s_e(nout - K), NSI - NSO, NSO);
      automatic longint acc = 0;
      for (int i = 0; i < N; i++) acc += m_srb(s_o(nout - i) * coef[i], NH - NM - 1, NSI + NM);
      checks++;
      if (longint'(out_re) != e_re || longint'(out_im) != m_srb(acc, NSI + NM - NSO, NSO)) begin
        failures++;
        if (failures < 6) $display("m=%0d got %0d,%0d want %0d,%0d", nout, out_re, out_im, e_re, m_srb(acc, NSI + NM - NSO, NSO));
      end
      if (last_out >= 0) begin
        checks++;
        if (cyc - last_out != 2) failures++;
      end
      if (nout == 0) begin
        checks++;
        if (cyc - last_odd != LAT + 1) begin failures++; $display("latency %0d", cyc - last_odd); end
      end
      last_out = cyc;
      nout++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) coef[i] = m_hb(i, N, NH);
    #22 rst_n = 1;
    for (int n = 0; n < 1200; n++) begin
      @(negedge clk);
      in_valid = 1;
      din = (n % 97 == 5) ? -13'sd4096 : NSI'($urandom);
      x.push_back(longint'(din));
    end
    @(negedge clk);
    in_valid = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (nout != 600) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
