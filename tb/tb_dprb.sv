// Testbench of dprb in both orders: blocks of J random words are written,
// either back to back or with gaps, and each output block is compared with
// the expected permutation (bit reversal, or the half rotation on odd
// blocks). Also checks out_first on word 0 of each block and that overrun
// stays low.
`timescale 1ps / 1ps
module tb_dprb;
  import dtp_pkg::*;
  localparam int W = 20, J = 8, JB = 3, NBLK = 40;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 1, in_valid = 0;
  initial #1 rst_n = 0;   // a real edge for the asynchronous resets
  logic signed [W-1:0] in_re = '0, in_im = '0;
  logic signed [W-1:0] re_b, im_b, re_h, im_h;
  logic v_b, f_b, o_b, v_h, f_h, o_h;

  dprb #(.W(W), .J(J), .MODE(ORDER_BITREV)) u_b (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_re(re_b), .out_im(im_b), .out_valid(v_b), .out_first(f_b), .overrun(o_b));
  dprb #(.W(W), .J(J), .MODE(ORDER_HALF_ROTATE)) u_h (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_re(in_re), .in_im(in_im),
    .out_re(re_h), .out_im(im_h), .out_valid(v_h), .out_first(f_h), .overrun(o_h));

  always #5 clk = ~clk;

  logic signed [W-1:0] xr [$], xi [$];
  int nb = 0, nh = 0, rotated = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (v_b) begin
      automatic int blk = nb / J, k = nb % J;
      automatic int src = blk * J + int'(bitrev(k, JB));
      checks++;
      if (re_b !== xr[src] || im_b !== xi[src] || f_b !== (k == 0)) begin
        failures++;
        if (failures < 6) $display("bitrev blk %0d k %0d", blk, k);
      end
      nb++;
    end
    if (v_h) begin
      automatic int blk = nh / J, k = nh % J;
      automatic int src = blk * J + ((blk % 2) ? (k + J / 2) % J : k);
      checks++;
      if (re_h !== xr[src] || im_h !== xi[src] || f_h !== (k == 0)) begin
        failures++;
        if (failures < 6) $display("rotate blk %0d k %0d", blk, k);
      end
      if (blk % 2 && k == 0) rotated++;
      nh++;
    end
    if (rst_n && (o_b || o_h)) begin
      checks++;
      failures++;
    end
  end

  initial begin
    #22 rst_n = 1;
    for (int b = 0; b < NBLK; b++)
      for (int k = 0; k < J; k++) begin
        @(negedge clk);
        in_valid = 1;
        in_re = W'($urandom);
        in_im = W'($urandom);
        xr.push_back(in_re);
        xi.push_back(in_im);
        if (b >= NBLK / 2) begin   // second half: one word every 2 clocks
          @(negedge clk);
          in_valid = 0;
        end
      end
    @(negedge clk);
    in_valid = 0;
    repeat (4 * J) @(negedge clk);
    checks += 3;
    if (nb != NBLK * J) failures++;
    if (nh != NBLK * J) failures++;
    if (rotated != NBLK / 2) failures++;
    $display("blocks out %0d/%0d, rotated %0d", nb / J, nh / J, rotated);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
