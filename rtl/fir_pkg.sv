// fir_pkg: sizes shared by the blocks of the programmable two-lane FIR.
//
// The defaults are the largest configuration of the filter: up to 48 taps
// and 12-bit samples and coefficients, the top of the 10-12 bit range that
// the wireless-LAN and broadcast standards call for. The output keeps full
// precision, so its width is the product width plus the growth of a sum of
// N_TAPS products; no rounding or saturation is applied anywhere.
package fir_pkg;
  parameter int unsigned N_TAPS_DEF = 48;   // largest programmable tap count
  parameter int unsigned MIN_TAPS   = 8;    // smallest programmable tap count
  parameter int unsigned DATA_W_DEF = 12;   // input sample width, two's complement
  parameter int unsigned COEF_W_DEF = 12;   // coefficient width, two's complement

  // Full-precision output width of an n-tap sum of dw x cw products.
  function automatic int unsigned out_width(int unsigned dw, int unsigned cw,
                                            int unsigned n);
    return dw + cw + $clog2(n);
  endfunction
endpackage
