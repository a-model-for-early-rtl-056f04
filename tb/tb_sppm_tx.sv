// Testbench of sppm_tx (with the PLL TX and pulse flip-flop models): random
// 3-bit symbols at 40 MHz. In every period the transmitted signal must have a
// rising edge at the clock edge (sync pulse) and, for symbol s > 0, one at
// s*T/8 (data pulse), each about 500 ps wide, and no other edge. The phase
// clocks must rise k*T/8 after the clock. The average number of pulses per
// symbol is reported (1 + 7/8 for uniformly distributed symbols).
`timescale 1ps / 1ps
module tb_sppm_tx;
  import sppm_pkg::*;
  int checks = 0, failures = 0;
  localparam int T = 25000, TR = 500;

  logic    clock_m = 0, rst_n = 1, en = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  symbol_t symbol = '0;
  phase_t  phi;
  logic    sync_pulse, data_pulse, tx_pulse;
  time     t_edge;
  time     rises [$];
  time     falls [$];
  time     phi_rise [1:NPH];
  int      pulses = 0, symbols = 0;

  sppm_tx dut (.clock_m(clock_m), .rst_n(rst_n), .symbol(symbol), .en(en), .phi(phi),
               .sync_pulse(sync_pulse), .data_pulse(data_pulse), .tx_pulse(tx_pulse));

  always #(T/2) clock_m = ~clock_m;
  always @(posedge clock_m) t_edge = $time;
  always @(posedge tx_pulse) rises.push_back($time);
  always @(negedge tx_pulse) falls.push_back($time);
  for (genvar k = 1; k <= NPH; k++) begin : g_ph
    always @(posedge phi[k]) phi_rise[k] = $time;
  end

  initial begin
    #(T * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    symbol_t cur;
    #(T/4) rst_n = 1;
    for (int n = 0; n < 400; n++) begin
      @(negedge clock_m);
      en = 1;
      symbol = (n < 8) ? NB'(n) : NB'($urandom);
      cur = symbol;
      @(posedge clock_m);
      rises.delete();
      falls.delete();
      #(T - 100);
      // Pulses of this period.
      checks++;
      if (rises.size() != ((cur == 0) ? 1 : 2) || rises[0] != t_edge) begin
        failures++;
        if (failures < 8) $display("period %0d sym %0d: %0d rises, first at +%0t", n, cur, rises.size(), rises.size() ? rises[0] - t_edge : 0);
      end else if (cur != 0) begin
        checks++;
        if (rises[1] - t_edge != time'(int'(cur) * T / 8)) begin
          failures++;
          if (failures < 8) $display("period %0d sym %0d: data pulse at +%0t", n, cur, rises[1] - t_edge);
        end
      end
      checks++;
      if (falls.size() != rises.size() || (falls.size() > 0 && falls[0] - rises[0] != TR)) begin
        failures++;
        if (failures < 8) $display("period %0d: pulse width wrong", n);
      end
      if (n > 2) begin
        for (int k = 1; k <= NPH; k++) begin
          checks++;
          if ((phi_rise[k] - t_edge) % T != time'(k * T / 8)) begin
            failures++;
            if (failures < 8) $display("phi%0d rises at +%0t", k, (phi_rise[k] - t_edge) % T);
          end
        end
      end
      if (n >= 8) begin
        pulses += rises.size();
        symbols++;
      end
    end
    $display("average pulses per symbol: %0.3f", real'(pulses) / real'(symbols));
    checks++;
    if (real'(pulses) / real'(symbols) < 1.75 || real'(pulses) / real'(symbols) > 2.0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
