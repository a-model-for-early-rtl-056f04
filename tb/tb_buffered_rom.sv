// Testbench of buffered_rom: every address is read; the word must appear one
// clock after the address is presented and match the table formula 3a+5.
`timescale 1ps / 1ps
module tb_buffered_rom;
  int checks = 0, failures = 0;
  localparam int DEPTH = 12, DW = 10;

  typedef logic [DW-1:0] rom_t [DEPTH];
  function automatic rom_t table_f();
    rom_t t;
    for (int a = 0; a < DEPTH; a++) t[a] = DW'(3 * a + 5);
    return t;
  endfunction

  logic clk = 0;
  logic [3:0] addr;
  logic [DW-1:0] data;

  buffered_rom #(.DEPTH(DEPTH), .DW(DW), .INIT(table_f())) dut (.clk(clk), .addr(addr), .data(data));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    addr = 0;
    @(posedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      addr = 4'(DEPTH - 1 - a);
      #1;
      // Before the edge the previous address is still registered.
      if (a > 0) begin
        checks++;
        if (data != DW'(3 * (DEPTH - a) + 5)) begin
          failures++;
          $display("addr %0d early change: %0d", DEPTH - 1 - a, data);
        end
      end
      @(posedge clk);
      #1;
      checks++;
      if (data != DW'(3 * (DEPTH - 1 - a) + 5)) begin
        failures++;
        $display("addr %0d: got %0d", DEPTH - 1 - a, data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
