// Saturation and Rounding Block (SRB).
//
// Shortens a two's complement word of NI bits to NI-NH-NL bits: the NL least
// significant bits are removed by rounding (round half up when B = 1, plain
// truncation when B = 0) and the NH most significant bits are removed with
// saturation, so a value outside the output range is clamped to the largest
// or smallest output code and 'ovf' is raised. Purely combinational.
//
// The parameter set (n_i, n_H, n_L, b) is the one the DTP hardware-complexity
// tables use for these blocks; the rounding rule and the meaning of b are this
// design's choice.
`timescale 1ps / 1ps
module srb #(
  parameter int NI = 24,
  parameter int NH = 1,
  parameter int NL = 8,
  parameter bit B  = 1'b1,
  localparam int NO = NI - NH - NL
) (
  input  logic signed [NI-1:0] din,
  output logic signed [NO-1:0] dout,
  output logic                 ovf
);

  // Rounded value, one extra bit so the rounding carry cannot wrap.
  localparam int NR = NI - NL + 1;
  logic signed [NR-1:0] rounded;
  logic signed [NI:0]   ext;

  localparam logic signed [NR-1:0] OMAX = NR'(( 1 <<< (NO - 1)) - 1);
  localparam logic signed [NR-1:0] OMIN = NR'(-(1 <<< (NO - 1)));

  always_comb begin
    ext = {din[NI-1], din};
    if (NL > 0 && B) ext = ext + (NI+1)'(1 <<< (NL > 0 ? NL - 1 : 0));
    rounded = NR'(ext >>> NL);
    ovf = 1'b0;
    if (rounded > OMAX) begin
      dout = OMAX[NO-1:0];
      ovf  = 1'b1;
    end else if (rounded < OMIN) begin
      dout = OMIN[NO-1:0];
      ovf  = 1'b1;
    end else begin
      dout = rounded[NO-1:0];
    end
  end

endmodule
