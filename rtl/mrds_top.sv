// Top level: the multirate designs side by side.
//
//  * dtp_top      one beam of the Digital Transparent Processor: IF to
//                 Analytic, analysis channelizer, (switch ports), synthesis
//                 channelizer, Analytic to IF. Clock clk, one ADC sample per
//                 clock.
//  * sppm_tx      S-PPM optical-link transmitter (clock_m, symbol, en ->
//                 tx_pulse); sppm_decoder the receiver logic, fed with the
//                 delayed received pulses and the recovered clock and phases
//                 (clock recovery, delay line, laser driver and photodiode
//                 front end are outside).
//  * fa_nand      NAND/inverter full adder with its internal nodes.
//  * sfg_fir      two-tap FIR of the signal-flow-graph example (clock clk).
// The designs share nothing but the reset; each keeps its own ports.
`timescale 1ps / 1ps
module mrds_top
  import sppm_pkg::*;
(
  // DTP
  input  logic                clk,
  input  logic                rst_n,
  input  logic                adc_valid,
  input  logic signed [12:0]  adc_data,
  output logic                sw_out_valid,
  output logic                sw_out_first,
  output logic [2:0]          sw_out_ch,
  output logic signed [19:0]  sw_out_re,
  output logic signed [19:0]  sw_out_im,
  input  logic                sw_in_valid,
  input  logic signed [19:0]  sw_in_re,
  input  logic signed [19:0]  sw_in_im,
  output logic                dac_valid,
  output logic signed [12:0]  dac_data,
  output logic                dtp_sat,
  output logic                dtp_overrun,
  // S-PPM link
  input  logic                clock_m,
  input  symbol_t             tx_symbol,
  input  logic                tx_en,
  output phase_t              tx_phi,
  output logic                tx_pulse,
  input  logic                rx_pulse,
  input  logic                rx_clk,
  input  phase_t              rx_phi,
  output symbol_t             rx_symbol,
  output logic                rx_code_err,
  // Full adder
  input  logic                fa_a,
  input  logic                fa_b,
  input  logic                fa_ci,
  output logic                fa_out,
  output logic                fa_co,
  output logic [13:1]         fa_nodes,
  // Signal-flow-graph FIR
  input  logic signed [7:0]   fir_x,
  input  logic signed [7:0]   fir_a0,
  input  logic signed [7:0]   fir_a1,
  output logic signed [15:0]  fir_y
);

  dtp_top u_dtp (
    .clk(clk), .rst_n(rst_n), .adc_valid(adc_valid), .adc_data(adc_data),
    .sw_out_valid(sw_out_valid), .sw_out_first(sw_out_first), .sw_out_ch(sw_out_ch),
    .sw_out_re(sw_out_re), .sw_out_im(sw_out_im),
    .sw_in_valid(sw_in_valid), .sw_in_re(sw_in_re), .sw_in_im(sw_in_im),
    .dac_valid(dac_valid), .dac_data(dac_data), .sat(dtp_sat), .overrun(dtp_overrun));

  logic    sync_pulse, data_pulse;
  phase_t  rx_buf;

  sppm_tx u_tx (
    .clock_m(clock_m), .rst_n(rst_n), .symbol(tx_symbol), .en(tx_en), .phi(tx_phi),
    .sync_pulse(sync_pulse), .data_pulse(data_pulse), .tx_pulse(tx_pulse));

  sppm_decoder u_rx (
    .rx_pulse(rx_pulse), .rclk(rx_clk), .rst_n(rst_n), .rphi(rx_phi),
    .data_buf(rx_buf), .symbol(rx_symbol), .code_err(rx_code_err));

  fa_nand u_fa (.a(fa_a), .b(fa_b), .ci(fa_ci), .out(fa_out), .co(fa_co), .d(fa_nodes));

  sfg_fir #(.N(8), .A(8)) u_fir (.clk(clk), .rst_n(rst_n), .x(fir_x), .a0(fir_a0), .a1(fir_a1), .y(fir_y));

endmodule
