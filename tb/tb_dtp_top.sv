// Testbench of dtp_top at its default size: a real IF tone at one ADC sample
// per clock goes through the analysis chain, the switch ports are looped
// back (optionally blanking one channel) and the DAC stream is analysed.
// Run 1 (pass-through): the tone must appear in the expected channel, and
// the DAC output must be the same tone, fitted by least squares at the input
// frequency with a residual at least 20 dB below it and a gain within 0.5..2.
// Run 2 (channel blanked): the tone at the DAC must drop by at least 20 dB.
// overrun must stay low, and the DAC must give one sample per clock.
`timescale 1ps / 1ps
module tb_dtp_top;
  localparam int J = 8, NSMP = 6000, CH = 2;
  localparam real PI = 3.14159265358979;
  // Analytic frequency 2*pi*(CH+0.1)/J after the fs/4 mix and decimation by 2.
  localparam real W_IN = (2.0 * PI * (real'(CH) + 0.1) / real'(J) + PI) / 2.0;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1, adc_valid = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  logic signed [12:0] adc_data = '0;
  logic sw_out_valid, sw_out_first, sat, overrun, dac_valid, blank;
  logic [2:0] sw_out_ch;
  logic signed [19:0] sw_out_re, sw_out_im;
  logic signed [12:0] dac_data;

  dtp_top dut (.clk(clk), .rst_n(rst_n), .adc_valid(adc_valid), .adc_data(adc_data),
               .sw_out_valid(sw_out_valid), .sw_out_first(sw_out_first), .sw_out_ch(sw_out_ch),
               .sw_out_re(sw_out_re), .sw_out_im(sw_out_im),
               .sw_in_valid(sw_out_valid),
               .sw_in_re(blank && sw_out_ch == CH ? 20'sd0 : sw_out_re),
               .sw_in_im(blank && sw_out_ch == CH ? 20'sd0 : sw_out_im),
               .dac_valid(dac_valid), .dac_data(dac_data), .sat(sat), .overrun(overrun));

  always #5 clk = ~clk;

  real energy [J];
  real sc, ss, sy;
  int  ndac, nsw, gap_bad;
  bit  meas;

  initial begin
    #40000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (sw_out_valid && meas) energy[sw_out_ch] += real'(sw_out_re) ** 2 + real'(sw_out_im) ** 2;
    if (dac_valid) begin
      if (meas) begin
        sc += real'(dac_data) * $cos(W_IN * ndac);
        ss += real'(dac_data) * $sin(W_IN * ndac);
        sy += real'(dac_data) ** 2;
      end
      ndac++;
    end else if (ndac > 0 && meas) gap_bad++;
    if (overrun) begin checks++; failures++; end
  end

  task automatic run(bit blank_ch, output real amp, output real resid_db);
    int nm;
    rst_n = 0;
    blank = blank_ch;
    meas = 0;
    ndac = 0; gap_bad = 0;
    sc = 0; ss = 0; sy = 0;
    for (int k = 0; k < J; k++) energy[k] = 0.0;
    #22 rst_n = 1;
    for (int n = 0; n < NSMP; n++) begin
      @(negedge clk);
      adc_valid = 1;
      adc_data = 13'($rtoi(2000.0 * $cos(W_IN * n)));
      if (n == 2000) meas = 1;
    end
    meas = 0;
    @(negedge clk);
    adc_valid = 0;
    nm = NSMP - 2000;
    // Least-squares fit of a*cos + b*sin over the measurement window.
    amp = 2.0 * $sqrt(sc * sc + ss * ss) / nm;
    resid_db = 10.0 * $log10((sy + 1e-9) / (sy - 2.0 * (sc * sc + ss * ss) / nm + 1e-9));
  endtask

  initial begin
    real a1, r1, a2, r2;
    int best;
    run(0, a1, r1);
    best = 0;
    for (int k = 1; k < J; k++) if (energy[k] > energy[best]) best = k;
    $display("dac samples %0d energy %e sw energy %e", ndac, sy, energy[CH]);
    $display("pass-through: tone in channel %0d, DAC amplitude %f, tone/residual %f dB", best, a1, r1);
    checks += 4;
    if (best != CH) failures++;
    if (a1 < 1000.0 || a1 > 4000.0) failures++;
    if (r1 < 20.0) failures++;
    if (gap_bad != 0) begin failures++; $display("DAC gaps %0d", gap_bad); end
    run(1, a2, r2);
    $display("channel %0d blanked: DAC amplitude %f", CH, a2);
    checks++;
    if (a2 * 10.0 > a1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
