// Testbench of srb: random words through two SRB configurations (rounding
// with saturation, and truncation), compared with an integer model.
`timescale 1ps / 1ps
module tb_srb;
  int checks = 0, failures = 0;

  logic signed [11:0] din;
  logic signed [6:0]  d_r;     // NI=12, NH=2, NL=3, rounding
  logic signed [7:0]  d_t;     // NI=12, NH=0, NL=4, truncation
  logic               o_r, o_t;
  int                 n_sat = 0;

  srb #(.NI(12), .NH(2), .NL(3), .B(1'b1)) dut_r (.din(din), .dout(d_r), .ovf(o_r));
  srb #(.NI(12), .NH(0), .NL(4), .B(1'b0)) dut_t (.din(din), .dout(d_t), .ovf(o_t));

  function automatic int model(int x, int nl, int no, bit rnd, output bit sat);
    int r = rnd ? ((x + (1 << (nl - 1))) >>> nl) : (x >>> nl);
    int hi = (1 << (no - 1)) - 1, lo = -(1 << (no - 1));
    sat = 0;
    if (r > hi) begin r = hi; sat = 1; end
    if (r < lo) begin r = lo; sat = 1; end
    return r;
  endfunction

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      int e_r, e_t;
      bit s_r, s_t;
      din = (i < 4096) ? 12'(i * 7 + 2048) : 12'($urandom);
      #1;
      e_r = model(int'(din), 3, 7, 1, s_r);
      e_t = model(int'(din), 4, 8, 0, s_t);
      checks += 2;
      if (int'(d_r) != e_r || o_r != s_r) begin
        failures++;
        if (failures < 10) $display("round: din=%0d got %0d/%0b want %0d/%0b", din, d_r, o_r, e_r, s_r);
      end
      if (int'(d_t) != e_t || o_t != s_t) begin
        failures++;
        if (failures < 10) $display("trunc: din=%0d got %0d want %0d", din, d_t, e_t);
      end
      n_sat += int'(s_r);
    end
    checks++;
    if (n_sat == 0) failures++;   // saturation must have been exercised
    $display("saturations seen: %0d", n_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
