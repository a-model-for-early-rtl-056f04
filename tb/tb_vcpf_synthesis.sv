// Testbench of vcpf_synthesis at the default size (46 multipliers, J = 8):
// blocks of J random complex words, back to back and with gaps, are fed and
// each output sample
//   y[bD + i] = sum_r g[i + rD] * u_(b-r)[(i + rD + D*((b-r) mod 2)) mod J]
// is compared bit-exactly with a model using the same SRB roundings. Also
// checks the output spacing of two clocks within a block.
`timescale 1ps / 1ps
module tb_vcpf_synthesis;
  `include "dtp_tb_util.svh"
  localparam int NSI = 20, NSO = 13, NH = 15, NM = 3, TAPS = 23, J = 8, D = J / 2;
  localparam int R = 2 * TAPS, NACC = 6, NBLK = 150;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1, in_valid = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  logic signed [NSI-1:0] in_re = '0, in_im = '0;
  logic signed [NSO-1:0] out_re, out_im;
  logic out_valid, sat;

  vcpf_synthesis dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
                      .out_re(out_re), .out_im(out_im), .out_valid(out_valid), .sat(sat));

  always #5 clk = ~clk;

  longint ur [$], ui [$];
  longint g [TAPS * J];
  int nout = 0, last = -1, cyc = 0, nsat = 0;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint model(int b, int i, bit im);
    longint acc = 0;
    int q;
    for (int r = 0; r < R; r++) begin
      q = (i + r * D + (((b - r) % 2 != 0) ? D : 0)) % J;
      if (b - r >= 0) acc += m_srb((im ? ui[(b - r) * J + q] : ur[(b - r) * J + q]) * g[i + r * D],
                                   NH - NM - 1, NSI + NM);
    end
    return m_srb(acc, NSI + NM - NSO, NSO);
  endfunction

  always @(posedge clk) begin
    cyc++;
    if (sat) nsat++;
    if (out_valid) begin
      automatic int b = nout / D, i = nout % D;
      checks++;
      if (longint'(out_re) != model(b, i, 0) || longint'(out_im) != model(b, i, 1)) begin
        failures++;
        if (failures < 6) $display("b %0d i %0d got %0d,%0d want %0d,%0d", b, i, out_re, out_im, model(b, i, 0), model(b, i, 1));
      end
      if (i != 0) begin
        checks++;
        if (cyc - last != 2) failures++;
      end
      last = cyc;
      nout++;
    end
  end

  initial begin
    for (int n = 0; n < TAPS * J; n++) g[n] = m_proto(n, TAPS, J, NH);
    #22 rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int q = 0; q < J; q++) begin
        @(negedge clk);
        in_valid = 1;
        in_re = (b > 100) ? NSI'($urandom) : NSI'($signed($urandom % 120000) - 60000);
        in_im = (b > 100) ? NSI'($urandom) : NSI'($signed($urandom % 120000) - 60000);
        ur.push_back(longint'(in_re));
        ui.push_back(longint'(in_im));
        if (b % 2) begin @(negedge clk); in_valid = 0; end
      end
    @(negedge clk);
    in_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (nout != NBLK * D) begin failures++; $display("outputs %0d", nout); end
    $display("saturated clocks %0d", nsat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
