// Testbench of synthesis_channelizer at the default size (J = 8): for each
// channel c a constant complex word is written into channel c of every
// block (the other channels zero, blocks back to back) and the complex output
// stream is fitted against exp(j*2*pi*c*n/J). Checks that the tone is there
// with unit gain (within 10%),
// that everything else is at least 25 dB below it, that outputs come one every
// 2 clocks within a block, and that overrun stays low.
`timescale 1ps / 1ps
module tb_synthesis_channelizer;
  localparam int J = 8, NBLK = 300, AMP = 100000;
  localparam real PI = 3.14159265358979;
  // Unit gain from a channel word to the output tone: |AMP - j AMP/2| moved
  // from the 20-bit channel word to the 13-bit output (2^-7), times the
  // 0.99 pass-band gain of the prototype.
  localparam real EXP_AMP = 0.99 * 111803.4 / 128.0;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1, in_valid = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  logic signed [19:0] in_re = '0, in_im = '0;
  logic signed [12:0] out_re, out_im;
  logic out_valid, sat, overrun;

  synthesis_channelizer dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
                             .out_re(out_re), .out_im(out_im), .out_valid(out_valid), .sat(sat), .overrun(overrun));

  always #5 clk = ~clk;

  real cr, ci, sy, wc;
  int nout, nm;
  bit meas;

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      if (meas) begin
        // correlate with exp(-j*wc*n)
        cr += real'(out_re) * $cos(wc * nout) + real'(out_im) * $sin(wc * nout);
        ci += real'(out_im) * $cos(wc * nout) - real'(out_re) * $sin(wc * nout);
        sy += real'(out_re) ** 2 + real'(out_im) ** 2;
        nm++;
      end
      nout++;
    end
    if (overrun || sat) begin checks++; failures++; end
  end

  initial begin
    for (int c = 0; c < J; c++) begin
      automatic real amp, tone, rest;
      rst_n = 0;
      wc = 2.0 * PI * real'(c) / real'(J);
      nout = 0; nm = 0; meas = 0;
      cr = 0; ci = 0; sy = 0;
      #22 rst_n = 1;
      for (int b = 0; b < NBLK; b++) begin
        if (b == 100) meas = 1;
        for (int q = 0; q < J; q++) begin
          @(negedge clk);
          in_valid = 1;
          in_re = (q == c) ? 20'(AMP) : '0;
          in_im = (q == c) ? -20'(AMP / 2) : '0;
        end
      end
      @(negedge clk);
      in_valid = 0;
      meas = 0;
      repeat (40) @(negedge clk);
      amp = $sqrt(cr * cr + ci * ci) / nm;
      tone = amp * amp * nm;
      rest = sy - tone;
      $display("channel %0d: output amplitude %f, tone/rest %f dB", c, amp, 10.0 * $log10(tone / (rest + 1.0)));
      checks += 2;
      if (amp < 0.9 * EXP_AMP || amp > 1.1 * EXP_AMP) failures++;
      if (tone < 316.0 * rest) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
