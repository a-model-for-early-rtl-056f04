// S-PPM receiver logic: the DIGITAL DATA DECODING block without its clock
// recovery.
//
// rx_pulse is the received pulse train after the alignment delay; rclk and
// rphi are the recovered symbol clock and its NPH delayed copies. Every
// received pulse clocks NPH flip-flops that sample rphi: the sync pulse (just
// after the rising edge of rclk) samples all zeros and so clears them, a data
// pulse samples the phase word of its slot. On each rising edge of rclk,
// before the next sync pulse, the DATA BUFFER stores that word; LUT2 turns it
// back into the slot number, which the output buffer presents as the
// recovered symbol on the following edge. A symbol sent in period k is at the
// output after edge k+2 (two symbol periods). code_err flags a stored word
// that no slot produces (output 0).
//
// Capture flip-flops, data buffer, LUT2 and output buffer follow the decoding
// block of the optical link; the reset is this design's addition.
`timescale 1ps / 1ps
module sppm_decoder
  import sppm_pkg::*;
(
  input  logic    rx_pulse,
  input  logic    rclk,
  input  logic    rst_n,
  input  phase_t  rphi,
  output phase_t  data_buf,
  output symbol_t symbol,
  output logic    code_err
);

  phase_t cap;
  int     slot;

  always_ff @(posedge rx_pulse or negedge rst_n)
    if (!rst_n) cap <= '0;
    else        cap <= rphi;

  always_comb slot = code_slot(data_buf);

  always_ff @(posedge rclk or negedge rst_n)
    if (!rst_n) begin
      data_buf <= '0;
      symbol   <= '0;
      code_err <= 1'b0;
    end else begin
      data_buf <= cap;
      symbol   <= (slot < 0) ? '0 : NB'(slot);
      code_err <= (slot < 0);
    end

endmodule
