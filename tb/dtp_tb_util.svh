// Reference arithmetic shared by the DTP testbenches: integer models of the
// SRB (round half up, saturate) and of the coefficient formulas.
`ifndef DTP_TB_UTIL_SVH
`define DTP_TB_UTIL_SVH

// Round off nl LSBs (half up) and saturate to no bits.
function automatic longint m_srb(longint x, int nl, int no);
  longint r = (nl > 0) ? ((x + (longint'(1) << (nl - 1))) >>> nl) : x;
  longint hi = (longint'(1) << (no - 1)) - 1;
  longint lo = -(longint'(1) << (no - 1));
  if (r > hi) r = hi;
  if (r < lo) r = lo;
  return r;
endfunction

// Saturating negation in no bits.
function automatic longint m_neg(longint x, int no);
  longint lo = -(longint'(1) << (no - 1));
  return (x == lo) ? -lo - 1 : -x;
endfunction

// Half-band branch coefficient i of n (Hann-windowed odd taps, scaled by 2).
function automatic longint m_hb(int i, int n, int nh);
  real pi = 3.14159265358979;
  real d = real'(2 * i - n + 1);
  real w = 0.5 * (1.0 + $cos(pi * d / real'(n + 1)));
  real v = 2.0 * $sin(pi * d / 2.0) / (pi * d) * w;
  return longint'($rtoi(v * real'(1 << (nh - 1)) + (v >= 0.0 ? 0.5 : -0.5)));
endfunction

// Polyphase prototype coefficient k of taps*j (Hann-windowed sinc, cut-off pi/j).
function automatic longint m_proto(int k, int taps, int j, int nh);
  real pi = 3.14159265358979;
  real x = (real'(k) - real'(taps * j - 1) / 2.0) / real'(j);
  real s = (x == 0.0) ? 1.0 : $sin(pi * x) / (pi * x);
  real w = 0.5 - 0.5 * $cos(2.0 * pi * (real'(k) + 0.5) / real'(taps * j));
  real v = 0.99 * s * w;
  return longint'($rtoi(v * real'(1 << (nh - 1)) + (v >= 0.0 ? 0.5 : -0.5)));
endfunction

function automatic int m_levels(int n);
  int l = 0;
  while (n > 1) begin n = (n + 1) / 2; l++; end
  return l;
endfunction

`endif
