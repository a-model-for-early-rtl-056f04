// Testbench of analysis_channelizer at the default size (J = 8): for each
// channel c a complex tone at the channel centre 2*pi*c/J (plus a small
// offset) is fed, one sample every 2 clocks, and the output energy per
// channel is measured. Checks that channel c gets the largest energy, that
// channels two or more away are at least 30 dB down, that out_ch counts
// 0..J-1 with out_first on channel 0, and that overrun and sat stay low.
`timescale 1ps / 1ps
module tb_analysis_channelizer;
  localparam int J = 8, NF = 20, NSMP = 800;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1, in_valid = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  logic signed [12:0] in_re = '0, in_im = '0;
  logic signed [NF-1:0] out_re, out_im;
  logic [2:0] out_ch;
  logic out_valid, out_first, sat, overrun;

  analysis_channelizer dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
                            .out_re(out_re), .out_im(out_im), .out_ch(out_ch), .out_valid(out_valid),
                            .out_first(out_first), .sat(sat), .overrun(overrun));

  always #5 clk = ~clk;

  real energy [J];
  int nout, chk_on;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (out_valid) begin
      checks++;
      if (int'(out_ch) != nout % J || out_first !== (out_ch == 0)) failures++;
      if (chk_on) energy[out_ch] += real'(out_re) * real'(out_re) + real'(out_im) * real'(out_im);
      nout++;
    end
    if (overrun || sat) begin checks++; failures++; end
  end

  initial begin
    for (int c = 0; c < J; c++) begin
      automatic real w = 2.0 * 3.14159265358979 * (real'(c) + 0.1) / real'(J);
      automatic int best = 0;
      rst_n = 0;
      nout = 0;
      chk_on = 0;
      for (int k = 0; k < J; k++) energy[k] = 0.0;
      #22 rst_n = 1;
      for (int n = 0; n < NSMP; n++) begin
        @(negedge clk);
        in_valid = 1;
        in_re = 13'($rtoi(3000.0 * $cos(w * n)));
        in_im = 13'($rtoi(3000.0 * $sin(w * n)));
        if (n == 400) chk_on = 1;
        @(negedge clk);
        in_valid = 0;
      end
      repeat (60) @(negedge clk);
      for (int k = 1; k < J; k++) if (energy[k] > energy[best]) best = k;
      checks++;
      if (best != c) begin failures++; $display("tone %0d: peak in channel %0d", c, best); end
      for (int k = 0; k < J; k++) begin
        automatic int dch = (k - c + J) % J;
        if (dch >= 2 && dch <= J - 2) begin
          checks++;
          if (energy[k] * 1000.0 > energy[c]) begin
            failures++;
            $display("tone %0d: channel %0d only %f dB down", c, k, 10.0 * $log10(energy[c] / energy[k]));
          end
        end
      end
      $display("tone %0d: %e %e %e %e %e %e %e %e", c, energy[0], energy[1], energy[2], energy[3], energy[4], energy[5], energy[6], energy[7]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
