// Testbench of fft (and of fft_stage) at the default size J = 8, forward and
// inverse: blocks of J random complex words, in natural order at one word per
// clock, are compared bin by bin with a floating-point DFT divided by J (each
// radix-2 stage halves). Outputs come in bit-reversed order, so output k of a
// block is bin bitrev(k). The error allowed is 10 LSB per component: the stage roundings plus the
// gain of the twiddles, scaled by 2^(NW-1)-1 so that 1.0 fits, which is
// about 2 LSB per stage at these amplitudes.
`timescale 1ps / 1ps
module tb_fft;
  import dtp_pkg::*;
  localparam int W = 20, NW = 17, J = 8, JB = 3, NBLK = 30, TOL = 10;
  int checks = 0, failures = 0, maxerr = 0;

  logic clk = 0, rst_n = 1, in_valid = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic signed [W-1:0] fr, fi, ir, ii;
  logic fv, ff, fs, iv, if_, is;

  fft #(.W(W), .NW(NW), .J(J), .INVERSE(1'b0)) u_f (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_re(fr), .out_im(fi), .out_valid(fv), .out_first(ff), .sat(fs));
  fft #(.W(W), .NW(NW), .J(J), .INVERSE(1'b1)) u_i (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_re(ir), .out_im(ii), .out_valid(iv), .out_first(if_), .sat(is));

  always #5 clk = ~clk;

  real xr [$], xi [$];
  int nf = 0, ni = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(int n, bit inv, logic signed [W-1:0] gr, logic signed [W-1:0] gi, logic first);
    int blk = n / J, k = n % J, bin = int'(bitrev(k, JB));
    real sr = 0.0, si = 0.0, a, er, ei;
    real pi = 3.14159265358979;
    for (int t = 0; t < J; t++) begin
      a = (inv ? 2.0 : -2.0) * pi * real'(bin * t) / real'(J);
      sr += xr[blk * J + t] * $cos(a) - xi[blk * J + t] * $sin(a);
      si += xr[blk * J + t] * $sin(a) + xi[blk * J + t] * $cos(a);
    end
    er = real'(gr) - sr / J;
    ei = real'(gi) - si / J;
    if (er < 0) er = -er;
    if (ei < 0) ei = -ei;
    if (int'(er) > maxerr) maxerr = int'(er);
    if (int'(ei) > maxerr) maxerr = int'(ei);
    checks++;
    if (er > TOL || ei > TOL || first !== (k == 0)) begin
      failures++;
      if (failures < 6) $display("%s blk %0d bin %0d got %0d,%0d want %f,%f", inv ? "ifft" : "fft",
                                 blk, bin, gr, gi, sr / J, si / J);
    end
  endtask

  always @(posedge clk) begin
    if (fv) begin if (nf < NBLK * J) check(nf, 0, fr, fi, ff); nf++; end
    if (iv) begin if (ni < NBLK * J) check(ni, 1, ir, ii, if_); ni++; end
    if (rst_n && (fs || is)) begin checks++; failures++; end
  end

  initial begin
    #22 rst_n = 1;
    for (int b = 0; b < NBLK + 2; b++)
      for (int k = 0; k < J; k++) begin
        @(negedge clk);
        in_valid = 1;
        if (b >= NBLK) begin in_re = '0; in_im = '0; end
        else if (b == 0) begin in_re = 20'sd400000; in_im = '0; end   // constant: all energy in bin 0
        else if (b == 1) begin in_re = (k % 2) ? -20'sd400000 : 20'sd400000; in_im = '0; end  // bin J/2
        else begin in_re = 20'(($urandom % 800000) - 400000); in_im = 20'(($urandom % 800000) - 400000); end
        xr.push_back(real'(in_re));
        xi.push_back(real'(in_im));
        if (b % 3 == 2) begin @(negedge clk); in_valid = 0; end   // some blocks with gaps
      end
    @(negedge clk);
    in_valid = 0;
    repeat (4 * J) @(negedge clk);
    checks += 2;
    if (nf < NBLK * J) failures++;
    if (ni < NBLK * J) failures++;
    $display("bins out %0d/%0d, max error %0d LSB", nf, ni, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
