// fir_model_pkg: reference arithmetic for the filter testbenches.
//
// Works on plain integers, independently of the RTL structure: for a sample
// history x[0] (newest) .. x[26] and coefficients c[0] (outermost tap pair) ..
// c[13] (centre tap) it forms each folded product c[k] * (x[k] + x[26-k])
// (c[13] * x[13] for the centre), truncates its magnitude by 4 bits (toward
// zero), wraps it to 12 bits, sums the 14 products, and returns the 16-bit
// output word in the D/A code (MSB kept, other bits inverted). Also holds the
// three coefficient sets the filter was evaluated with (low-pass, high-pass,
// equalizer) and the four presets of the PC download program (low-pass,
// high-pass, band-pass 2.8-5.5 kHz, band-stop 2.8-5.5 kHz), all listed from
// the centre coefficient outward.
package fir_model_pkg;
  localparam int NTAPS = 27;
  localparam int NCOEF = 14;

  typedef int hist_t [NTAPS];
  typedef int coefs_t [NCOEF];

  // Coefficient sets, index 0 = centre coefficient (sent first).
  localparam int LOWPASS  [NCOEF] = '{127, 113, 76, 33, 0, -16, -16, -8, 0, 4, 3, 1, 0, 0};
  localparam int HIGHPASS [NCOEF] = '{127, -38, -25, -11, 0, 5, 5, 3, 0, -1, -1, 0, 0, 0};
  localparam int EQUALIZER[NCOEF] = '{127, -2, 1, 4, 6, 7, 6, 4, 2, 1, 0, 0, 0, 0};
  localparam int PRESET_LP[NCOEF] = '{127, 122, 108, 87, 64, 41, 22, 8, 0, -3, -4, -4, -2, -1};
  localparam int PRESET_HP[NCOEF] = '{127, -17, -15, -12, -9, -6, -3, -1, 0, 1, 1, 1, 0, 0};
  localparam int PRESET_BP[NCOEF] = '{127, 69, 30, -14, -43, -49, -36, -16, 0, 7, 7, 4, 1, 0};
  localparam int PRESET_BS[NCOEF] = '{127, -16, -7, 3, 10, 11, 8, 4, 0, -2, -2, -1, 0, 0};

  function automatic int trunc_product(int p);
    int m;
    m = (p < 0) ? -p : p;
    m = (m >>> 4) % 4096;
    return (p < 0) ? -m : m;
  endfunction

  function automatic int wrap12(int v);
    int w;
    w = v & 32'hFFF;
    return (w >= 2048) ? w - 4096 : w;
  endfunction

  // c[k]: coefficient of register position k (0 = outermost pair).
  function automatic int expected_sum(hist_t x, coefs_t c);
    int s;
    s = 0;
    for (int k = 0; k < NCOEF - 1; k++)
      s += wrap12(trunc_product(c[k] * (x[k] + x[NTAPS-1-k])));
    s += wrap12(trunc_product(c[NCOEF-1] * x[NCOEF-1]));
    return s;
  endfunction

  function automatic logic [15:0] dac_code(int s);
    logic [15:0] v;
    v = 16'(s);
    return {v[15], ~v[14:0]};
  endfunction

  // Converts a set listed from the centre outward into register order.
  function automatic coefs_t to_register_order(int set_c [NCOEF]);
    coefs_t c;
    for (int k = 0; k < NCOEF; k++) c[k] = set_c[NCOEF-1-k];
    return c;
  endfunction
endpackage
