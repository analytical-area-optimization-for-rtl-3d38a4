// Shared constants and elaboration-time helpers for the FFT blocks.
//
// Twiddle factors are W_N^k = exp(-j*2*pi*k/N) in signed fixed point with TW bits, where the
// value 1.0 is 2^(TW-2) (one guard bit above the sign), rounded to the nearest integer. The
// document gives no twiddle format; this one is a choice of this design. bitrev() reverses the
// low `bits` bits of a value and is used to describe output orders.
package fft_pkg;
  localparam real PI = 3.14159265358979323846;

  function automatic int tw_re(int k, int n, int tw);
    return $rtoi($floor($cos(2.0 * PI * k / n) * (2.0 ** (tw - 2)) + 0.5));
  endfunction

  function automatic int tw_im(int k, int n, int tw);
    return $rtoi($floor(-$sin(2.0 * PI * k / n) * (2.0 ** (tw - 2)) + 0.5));
  endfunction

  function automatic int bitrev(int v, int bits);
    int r;
    r = 0;
    for (int i = 0; i < bits; i++) r = (r << 1) | ((v >> i) & 1);
    return r;
  endfunction
endpackage
