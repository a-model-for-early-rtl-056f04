// Two-tap FIR filter y(n) = a0 x(n-1) + a1 x(n-2).
//
// The worked example of the augmented signal-flow graph: two N-bit registers
// (the z^-1 nodes), two multipliers whose N x A products are kept on N+A-1
// bits, and one adder whose result has N+A bits. x, a0 and a1 are signed. The
// product width N+A-1 cannot hold (-2^(N-1)) * (-2^(A-1)); that single input
// pair wraps, as in the example's sizing. The output is combinational from
// the registers.
`timescale 1ps / 1ps
module sfg_fir #(
  parameter int N = 8,
  parameter int A = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic signed [N-1:0]   x,
  input  logic signed [A-1:0]   a0,
  input  logic signed [A-1:0]   a1,
  output logic signed [N+A-1:0] y
);

  logic signed [N-1:0]   d1, d2;
  logic signed [N+A-2:0] d3, d4;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d1 <= '0;
      d2 <= '0;
    end else begin
      d1 <= x;
      d2 <= d1;
    end

  always_comb begin
    d3 = (N+A-1)'(d1 * a0);
    d4 = (N+A-1)'(d2 * a1);
    y  = (N+A)'(d3) + (N+A)'(d4);
  end

endmodule
