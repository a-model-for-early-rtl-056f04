// Testbench of fa_nand: all eight inputs against a+b+ci, every internal node
// against its gate equation, and the worst-case transition count: from
// (1,1,1) to (1,0,0) the weighted number of toggling nodes (d5 weighted 3 for
// its fan-out) must be 11, and 10 without the two outputs; no other input
// pair may exceed 11.
`timescale 1ps / 1ps
module tb_fa_nand;
  int checks = 0, failures = 0;
  logic a, b, ci, out, co;
  logic [13:1] d;

  fa_nand dut (.a(a), .b(b), .ci(ci), .out(out), .co(co), .d(d));

  function automatic int weight(logic [13:1] x, logic [13:1] y, bit with_out);
    int w = 0;
    for (int g = 1; g <= 13; g++) begin
      if (!with_out && g >= 12) continue;
      if (x[g] != y[g]) w += (g == 5) ? 3 : 1;
    end
    return w;
  endfunction

  logic [13:1] nodes [8];
  int          wmax;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, ci} = 3'(v);
      #1;
      nodes[v] = d;
      checks++;
      if ({co, out} != 2'(int'(a) + int'(b) + int'(ci))) begin
        failures++;
        $display("a=%b b=%b ci=%b: co,out=%b%b", a, b, ci, co, out);
      end
      checks++;
      if (d[5] != (a ^ b) || d[1] != ~a || d[7] != ~ci || d[11] != ~(a & b)) begin
        failures++;
        $display("internal nodes wrong for %b%b%b: %b", a, b, ci, d);
      end
    end
    checks += 2;
    if (weight(nodes[7], nodes[4], 1) != 11) begin failures++; $display("W(111->100)=%0d", weight(nodes[7], nodes[4], 1)); end
    if (weight(nodes[7], nodes[4], 0) != 10) begin failures++; $display("W'(111->100)=%0d", weight(nodes[7], nodes[4], 0)); end
    wmax = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        if (weight(nodes[i], nodes[j], 1) > wmax) wmax = weight(nodes[i], nodes[j], 1);
    checks++;
    if (wmax != 11) begin failures++; $display("max W = %0d", wmax); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
