// Shared constants and helper functions of the Digital Transparent Processor
// (DTP) chain: the read orders of the dual-port RAM buffers and the latency of
// the pipelined binary adder tree, so that the blocks that align a side path
// with a filter branch compute the same number.
`timescale 1ps / 1ps
package dtp_pkg;

  // Read order of a dual-port RAM buffer (DPRB).
  typedef enum logic [0:0] {
    ORDER_BITREV      = 1'b0,  // bit-reversed read: restores natural order after a radix-2 DIF FFT
    ORDER_HALF_ROTATE = 1'b1   // odd blocks read rotated by J/2: phase term of the 2x oversampled channelizer
  } dprb_order_e;

  // Number of adder levels of a binary tree over n words.
  function automatic int tree_levels(input int n);
    int l = 0;
    int c = n;
    while (c > 1) begin
      c = (c + 1) / 2;
      l++;
    end
    return l;
  endfunction

  // Register levels in the tree: one after every ubl adder levels.
  function automatic int tree_latency(input int n, input int ubl);
    return tree_levels(n) / ubl;
  endfunction

  // Words left after l levels of pairwise addition.
  function automatic int tree_count(input int n, input int l);
    int c = n;
    for (int i = 0; i < l; i++) c = (c + 1) / 2;
    return c;
  endfunction

  // Bit reversal of the low 'bits' bits of v.
  function automatic int bitrev(input int v, input int bits);
    int r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction

endpackage
