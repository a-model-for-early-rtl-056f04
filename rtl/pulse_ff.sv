// Behavioural model of a pulse-shortening flip-flop. Not synthesizable.
//
// A flip-flop with D tied to 1 whose output drives its own asynchronous
// reset: a rising edge on 'trig' sets q, and q clears itself after the reset
// propagation time TRST_PS (picoseconds). The result is a pulse of fixed
// short width at every rising edge of 'trig', whatever the width of 'trig'.
// The width is a timing property of the real flip-flop; 500 ps is used, the
// laser pulse width of the optical link. rst_n clears q.
`timescale 1ps / 1ps
module pulse_ff #(
  parameter int TRST_PS = 500
) (
  input  logic trig,
  input  logic rst_n,
  output logic q
);

  logic clr;

  initial begin
    q   = 1'b0;
    clr = 1'b0;
  end

  always @(q) clr <= #(TRST_PS) q;

  // The self-reset and the external reset form one asynchronous clear.
  logic clr_n;
  assign clr_n = rst_n && !clr;

  always @(posedge trig or negedge clr_n)
    if (!clr_n) q <= 1'b0;
    else        q <= 1'b1;

endmodule
