// One-bit full adder built from NAND gates and inverters only.
//
//   out = a ^ b ^ ci,   co = a b + (a ^ b) ci
// Thirteen gates; d[g] is the output of gate g:
//   d1 = ~a, d2 = ~b, d3 = nand(d1,b), d4 = nand(a,d2), d5 = nand(d3,d4) = a^b,
//   d6 = ~d5, d7 = ~ci, d8 = nand(d6,ci), d9 = nand(d5,d7),
//   d10 = nand(d5,ci), d11 = nand(a,b), d12 = out = nand(d8,d9),
//   d13 = co = nand(d10,d11).
// The internal nodes are brought out so the switching activity of each gate
// can be observed (this is the network used to find the worst-case number of
// internal transitions: from (a,b,ci) = (1,1,1) to (1,0,0) eleven weighted
// transitions, d5 counting three times for its fan-out). Combinational.
`timescale 1ps / 1ps
module fa_nand (
  input  logic        a,
  input  logic        b,
  input  logic        ci,
  output logic        out,
  output logic        co,
  output logic [13:1] d
);

  function automatic logic nand2(input logic x, input logic y);
    return ~(x & y);
  endfunction

  always_comb begin
    d[1]  = ~a;
    d[2]  = ~b;
    d[3]  = nand2(d[1], b);
    d[4]  = nand2(a, d[2]);
    d[5]  = nand2(d[3], d[4]);
    d[6]  = ~d[5];
    d[7]  = ~ci;
    d[8]  = nand2(d[6], ci);
    d[9]  = nand2(d[5], d[7]);
    d[10] = nand2(d[5], ci);
    d[11] = nand2(a, b);
    d[12] = nand2(d[8], d[9]);
    d[13] = nand2(d[10], d[11]);
  end

  assign out = d[12];
  assign co  = d[13];

endmodule
