// Testbench of sppm_decoder: the received pulse train is made here from a
// random symbol sequence (sync pulse at each clock edge, data pulse at
// s*T/8, both delayed by 1 ns and 500 ps wide) together with an ideal
// recovered clock and phases. The recovered symbol must equal the symbol sent
// two periods earlier, with no code error.
`timescale 1ps / 1ps
module tb_sppm_decoder;
  import sppm_pkg::*;
  int checks = 0, failures = 0;
  localparam int T = 25000, DLY = 1000, TR = 500;

  logic    rclk = 0, rst_n = 1, rx = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  phase_t  rphi = '0, data_buf;
  symbol_t symbol;
  logic    code_err;
  symbol_t sent [$];

  sppm_decoder dut (.rx_pulse(rx), .rclk(rclk), .rst_n(rst_n), .rphi(rphi),
                    .data_buf(data_buf), .symbol(symbol), .code_err(code_err));

  always #(T/2) rclk = ~rclk;
  for (genvar k = 1; k <= NPH; k++) begin : g_ph
    always @(rclk) rphi[k] <= #(k * T / 8) rclk;
  end

  task automatic pulse_at(input int dt);
    fork
      begin
        #(dt);
        rx = 1;
        #(TR);
        rx = 0;
      end
    join_none
  endtask

  initial begin
    #(T * 1000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T/4) rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      symbol_t s;
      s = (n < 8) ? NB'(n) : NB'($urandom);
      @(posedge rclk);
      #1;
      // Output after this edge belongs to the symbol sent two periods ago.
      if (n >= 2) begin
        checks++;
        if (symbol != sent[n-2] || code_err) begin
          failures++;
          if (failures < 8) $display("period %0d: got %0d want %0d err %b", n, symbol, sent[n-2], code_err);
        end
      end
      sent.push_back(s);
      pulse_at(DLY - 1);
      if (s != 0) pulse_at(int'(s) * T / 8 + DLY - 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
