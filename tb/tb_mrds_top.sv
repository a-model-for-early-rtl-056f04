// End-to-end testbench of mrds_top at its default parameters. The four
// designs in the top run at the same time:
//  * DTP chain: a real IF tone at one ADC sample per clock; the switch ports
//    are looped back. Phase 1 puts the tone in channel 2, phase 2 in channel
//    3 (an odd channel, which needs the half rotation on odd blocks on both
//    sides); in each the tone must be seen in that channel at the switch and
//    come back at the DAC with gain 0.5..2 and 20 dB above the residual.
//    Phase 3 blanks channel 3 in the switch (the tone must drop by 20 dB)
//    and phase 4 drives a full-scale square wave, which must make the SRBs
//    saturate. overrun must never rise.
//  * S-PPM link: random symbols on the 40 MHz master clock; the transmitted
//    pulse train, delayed 1 ns, drives the decoder, clocked by the master
//    clock and phases. Every symbol must come back two periods later with no
//    code error, and each of the 8 slot values must occur.
//  * NAND full adder: all 8 inputs, and the worst-case transition
//    (1,1,1) -> (1,0,0) with its weighted toggle count of 11.
//  * SFG FIR: y = a0 x(n-1) + a1 x(n-2) on the DTP clock, with coefficient
//    changes.
// Each mechanism is counted; one that never happened counts as a failure.
`timescale 1ps / 1ps
module tb_mrds_top;
  import sppm_pkg::*;
  localparam int J = 8, TC = 200, T = 25000, SETTLE = 1500, MEAS = 3000;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;

  // ---------------------------------------------------------------- DUT
  logic clk = 0, rst_n = 1, adc_valid = 0, clock_m = 0, tx_en = 0, rx_pulse = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  logic signed [12:0] adc_data = '0, dac_data;
  logic sw_out_valid, sw_out_first, dac_valid, dtp_sat, dtp_overrun;
  logic [2:0] sw_out_ch;
  logic signed [19:0] sw_out_re, sw_out_im;
  symbol_t tx_symbol = '0, rx_symbol;
  phase_t tx_phi;
  logic tx_pulse, rx_code_err;
  logic fa_a = 0, fa_b = 0, fa_ci = 0, fa_out, fa_co;
  logic [13:1] fa_nodes;
  logic signed [7:0] fir_x = '0, fir_a0 = '0, fir_a1 = '0;
  logic signed [15:0] fir_y;
  logic [2:0] blank_ch = 3'd0;
  logic blank = 0;

  mrds_top dut (
    .clk(clk), .rst_n(rst_n), .adc_valid(adc_valid), .adc_data(adc_data),
    .sw_out_valid(sw_out_valid), .sw_out_first(sw_out_first), .sw_out_ch(sw_out_ch),
    .sw_out_re(sw_out_re), .sw_out_im(sw_out_im),
    .sw_in_valid(sw_out_valid),
    .sw_in_re(blank && sw_out_ch == blank_ch ? 20'sd0 : sw_out_re),
    .sw_in_im(blank && sw_out_ch == blank_ch ? 20'sd0 : sw_out_im),
    .dac_valid(dac_valid), .dac_data(dac_data), .dtp_sat(dtp_sat), .dtp_overrun(dtp_overrun),
    .clock_m(clock_m), .tx_symbol(tx_symbol), .tx_en(tx_en), .tx_phi(tx_phi), .tx_pulse(tx_pulse),
    .rx_pulse(rx_pulse), .rx_clk(clock_m), .rx_phi(tx_phi), .rx_symbol(rx_symbol),
    .rx_code_err(rx_code_err),
    .fa_a(fa_a), .fa_b(fa_b), .fa_ci(fa_ci), .fa_out(fa_out), .fa_co(fa_co), .fa_nodes(fa_nodes),
    .fir_x(fir_x), .fir_a0(fir_a0), .fir_a1(fir_a1), .fir_y(fir_y));

  always #(TC/2) clk = ~clk;
  always #(T/2) clock_m = ~clock_m;
  // 1 ns of optical path: each transmitted pulse arrives 1 ns later. The
  // received pulse is rebuilt 500 ps wide, the width the transmitter gives.
  always @(posedge tx_pulse)
    fork
      begin
        #1000 rx_pulse = 1'b1;
        #500  rx_pulse = 1'b0;
      end
    join_none

  initial begin
    #(T * 4000);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Mechanism counters.
  int n_tone_ch [J];
  int n_pass = 0, n_blank = 0, n_sat = 0, n_overrun = 0;
  int n_slot [8];
  int n_sym_ok = 0, n_code_err = 0, n_pulses = 0;
  int n_fa = 0, n_fa_worst = 0, n_fir = 0, n_fir_coef = 0;
  bit dtp_done = 0, sppm_done = 0;

  // ---------------------------------------------------------------- DTP
  real energy [J];
  real sc, ss, sy, scc, sss, scs, w_in;
  int  ndac = 0, nm;
  bit  meas = 0;

  always @(posedge clk) if (rst_n) begin
    if (sw_out_valid && meas) energy[sw_out_ch] += real'(sw_out_re) ** 2 + real'(sw_out_im) ** 2;
    if (dac_valid) begin
      if (meas) begin
        sc  += real'(dac_data) * $cos(w_in * ndac);
        ss  += real'(dac_data) * $sin(w_in * ndac);
        scc += $cos(w_in * ndac) ** 2;
        sss += $sin(w_in * ndac) ** 2;
        scs += $cos(w_in * ndac) * $sin(w_in * ndac);
        sy += real'(dac_data) ** 2;
        nm++;
      end
      ndac++;
    end
    if (dtp_sat) n_sat++;
    if (dtp_overrun) n_overrun++;
  end

  // Feeds n ADC samples of cos(w_in * n) (or a square wave) and measures
  // the last MEAS of them; returns the fitted DAC amplitude and the
  // tone-to-residual ratio in dB.
  task automatic tone(int ch, bit square, output real amp, output real snr, output int best);
    w_in = (2.0 * PI * (real'(ch) + 0.1) / real'(J) + PI) / 2.0;
    for (int k = 0; k < J; k++) energy[k] = 0.0;
    sc = 0; ss = 0; sy = 0; scc = 0; sss = 0; scs = 0; nm = 0;
    for (int n = 0; n < SETTLE + MEAS; n++) begin
      @(negedge clk);
      adc_valid = 1;
      if (square) adc_data = ((ndac / 16) % 2 != 0) ? 13'sd4095 : -13'sd4096;
      else        adc_data = 13'($rtoi(2000.0 * $cos(w_in * ndac)));
      meas = (n >= SETTLE);
    end
    meas = 0;
    begin
      // Least-squares fit y = a cos + b sin; residual = sy - (a sc + b ss).
      automatic real det = scc * sss - scs * scs;
      automatic real a = (sc * sss - ss * scs) / det;
      automatic real b = (ss * scc - sc * scs) / det;
      automatic real res = sy - (a * sc + b * ss);
      amp = $sqrt(a * a + b * b);
      snr = 10.0 * $log10(sy / (res > 1.0 ? res : 1.0));
    end
    best = 0;
    for (int k = 1; k < J; k++) if (energy[k] > energy[best]) best = k;
  endtask

  initial begin
    real amp, snr, amp_pass;
    int best;
    @(posedge rst_n);
    foreach (n_tone_ch[k]) n_tone_ch[k] = 0;
    for (int ch = 2; ch <= 3; ch++) begin
      tone(ch, 0, amp, snr, best);
      $display("DTP tone in channel %0d: found in channel %0d, DAC amplitude %f, %f dB", ch, best, amp, snr);
      checks += 3;
      if (best == ch) n_tone_ch[ch]++; else failures++;
      if (amp < 1000.0 || amp > 4000.0) failures++; else n_pass++;
      if (snr < 20.0) failures++;
      amp_pass = amp;
    end
    blank_ch = 3'd3;
    blank = 1;
    tone(3, 0, amp, snr, best);
    $display("DTP channel 3 blanked: DAC amplitude %f", amp);
    checks++;
    if (amp * 10.0 > amp_pass) failures++; else n_blank++;
    blank = 0;
    tone(3, 1, amp, snr, best);
    $display("DTP full-scale square wave: %0d saturating clocks", n_sat);
    @(negedge clk);
    adc_valid = 0;
    dtp_done = 1;
  end

  // ---------------------------------------------------------------- S-PPM
  initial begin
    symbol_t sent [$];
    @(posedge rst_n);
    for (int n = 0; n < 300; n++) begin
      @(negedge clock_m);
      tx_en = 1;
      tx_symbol = (n < 8) ? NB'(7 - n) : NB'($urandom);
      sent.push_back(tx_symbol);
      @(posedge clock_m);
      #1;
      if (n >= 2) begin
        checks++;
        if (rx_symbol !== sent[n - 2] || rx_code_err !== 1'b0) begin
          failures++;
          if (failures < 8) $display("S-PPM period %0d: got %0d want %0d err %b", n, rx_symbol, sent[n - 2], rx_code_err);
        end else begin
          n_sym_ok++;
          n_slot[sent[n - 2]]++;
        end
        if (rx_code_err) n_code_err++;
      end
    end
    $display("S-PPM: %0d symbols, %0d pulses (%f per symbol)", n_sym_ok, n_pulses, real'(n_pulses) / 300.0);
    sppm_done = 1;
  end
  always @(posedge tx_pulse) n_pulses++;

  // ---------------------------------------------------------------- full adder
  function automatic int weight(logic [13:1] x, logic [13:1] y);
    int w = 0;
    for (int g = 1; g <= 13; g++) if (x[g] != y[g]) w += (g == 5) ? 3 : 1;
    return w;
  endfunction

  initial begin
    logic [13:1] n111;
    @(posedge rst_n);
    for (int v = 0; v < 8; v++) begin
      {fa_a, fa_b, fa_ci} = 3'(v);
      #10;
      checks++;
      if ({fa_co, fa_out} !== 2'(fa_a + fa_b + fa_ci)) failures++; else n_fa++;
    end
    {fa_a, fa_b, fa_ci} = 3'b111;
    #10 n111 = fa_nodes;
    {fa_a, fa_b, fa_ci} = 3'b100;
    #10;
    checks++;
    if (weight(n111, fa_nodes) != 11) begin failures++; $display("full adder W = %0d", weight(n111, fa_nodes)); end
    else n_fa_worst++;
  end

  // ---------------------------------------------------------------- FIR
  logic signed [7:0] xh1 = '0, xh2 = '0;
  // Products kept on N+A-1 = 15 bits, as in the block.
  function automatic logic signed [15:0] fir_model(logic signed [7:0] c0, c1, x1, x2);
    logic signed [14:0] p0 = 15'(c0 * x1), p1 = 15'(c1 * x2);
    return 16'(p0) + 16'(p1);
  endfunction
  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (fir_y !== fir_model(fir_a0, fir_a1, xh1, xh2)) begin
      failures++;
      if (failures < 8) $display("FIR y %0d want %0d", fir_y, fir_model(fir_a0, fir_a1, xh1, xh2));
    end else n_fir++;
  end
  always @(posedge clk) if (rst_n) begin xh2 <= xh1; xh1 <= fir_x; end
  always @(negedge clk) if (rst_n) begin
    fir_x <= 8'($urandom);
    if ($urandom % 64 == 0) begin
      fir_a0 <= 8'($urandom);
      fir_a1 <= 8'($urandom);
      n_fir_coef++;
    end
  end

  // ---------------------------------------------------------------- report
  task automatic need(string what, int count);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) failures++;
  endtask

  initial begin
    #(T + 300) rst_n = 1;
    wait (dtp_done && sppm_done);
    $display("mechanisms:");
    need("DTP tone in even channel 2", n_tone_ch[2]);
    need("DTP tone in odd channel 3", n_tone_ch[3]);
    need("DTP analysis+synthesis pass-through", n_pass);
    need("DTP switch channel blanking", n_blank);
    need("DTP SRB saturation (clocks)", n_sat);
    need("DTP buffers without overrun", (n_overrun == 0) ? 1 : 0);
    for (int s = 0; s < 8; s++) need($sformatf("S-PPM slot %0d symbols", s), n_slot[s]);
    need("S-PPM pulses sent", n_pulses);
    need("S-PPM frames without code error", (n_code_err == 0) ? n_sym_ok : 0);
    need("full adder input vectors", n_fa);
    need("full adder worst transition W=11", n_fa_worst);
    need("FIR outputs", n_fir);
    need("FIR coefficient changes", n_fir_coef);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
