// iir_ref_pkg -- bit-exact software model of the direct form II band-stop
// filter, used by the filter testbenches as the independent reference.
// It performs the same fixed-point recursion as the hardware with ordinary
// 64-bit multiplications instead of shift-and-add networks:
//   w[n] = (x[n]*2**16 - sum_{k>=1} a_k w[n-k] + 2**15) >>> 16
//   y[n] = (sum_{k>=0} b_k w[n-k] + 2**15) >>> 16
// The state is kept as 64-bit integers; the hardware's 28-bit state must
// never need more, which the testbenches check through the returned value.
package iir_ref_pkg;
  import iir_pkg::*;

  class iir_ref;
    longint w [ORDER+1];   // w[0] = w[n] (latest), w[k] = w[n-k]

    function new();
      reset();
    endfunction

    function void reset();
      foreach (w[k]) w[k] = 0;
    endfunction

    // Advance one sample; returns y[n].
    function longint step(longint x);
      longint v, wn, acc;
      v = x * 65536;
      for (int k = 1; k <= ORDER; k++) v -= A_COEF[k] * w[k-1];
      wn = (v + 32768) >>> 16;
      acc = B_COEF[0] * wn;
      for (int k = 1; k <= ORDER; k++) acc += B_COEF[k] * w[k-1];
      for (int k = ORDER; k > 0; k--) w[k] = w[k-1];
      w[0] = wn;
      return (acc + 32768) >>> 16;
    endfunction
  endclass

endpackage
