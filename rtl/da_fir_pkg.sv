// da_fir_pkg -- types, limits and sizing functions shared by the
// distributed-arithmetic (DA) FIR filter modules.
//
// Coefficients travel between modules as one packed parameter of type
// coef_set_t: MAX_T entries of MAX_CW bits, entry i holding h(i) in its low
// CW bits (two's complement, sign-extended). Taps beyond T are ignored.
// The sizing functions give the worst-case word widths, chosen so that no
// sum in the filter can overflow whatever the coefficient values are; the
// output width alone is fitted to the actual coefficients, so that the
// output is sized from taps, input width and coefficient values. The limits
// MAX_T and MAX_CW and the default coefficient set are this design's choice.
package da_fir_pkg;

  localparam int MAX_T  = 64;   // largest tap count the coefficient bus holds
  localparam int MAX_CW = 16;   // widest coefficient the bus holds

  typedef logic [MAX_T-1:0][MAX_CW-1:0] coef_set_t;

  // Width of one ROM word: sum of K signed CW-bit coefficients.
  function automatic int rom_width(int cw, int k);
    return cw + $clog2(k);
  endfunction

  // Width of an adder-tree sum over nl ROMs of k taps each.
  function automatic int sum_width(int cw, int nl, int k);
    return cw + $clog2(nl * k);
  endfunction

  // Worst-case width of the filter output: T products of CW x N bits.
  function automatic int out_width(int cw, int n, int t);
    return cw + n + $clog2(t);
  endfunction

  // Width of the filter output for a given coefficient set: the fewest bits
  // that hold both extremes of sum h(i) x(i) over all N-bit inputs. Each
  // product is largest with x = -2^(N-1) or 2^(N-1)-1, chosen per sign of h.
  function automatic int coef_out_width(coef_set_t c, int t, int cw, int n);
    longint hi, lo, h, w;
    hi = 0;
    lo = 0;
    for (int i = 0; i < t && i < MAX_T; i++) begin
      h = longint'(c[i]);
      h = (h << (64 - cw)) >>> (64 - cw);   // low CW bits, sign-extended
      if (h >= 0) begin
        hi += h * ((longint'(1) << (n - 1)) - 1);
        lo -= h * (longint'(1) << (n - 1));
      end else begin
        hi -= h * (longint'(1) << (n - 1));
        lo += h * ((longint'(1) << (n - 1)) - 1);
      end
    end
    w = 1;
    while (hi > (longint'(1) << (w - 1)) - 1 || lo < -(longint'(1) << (w - 1))) w++;
    return int'(w);
  endfunction

  // Latency of the adder tree: one register rank after the ROMs and one
  // after each adder level when pipelined, none otherwise.
  function automatic int tree_latency(int nl, bit pipe);
    return pipe ? $clog2(nl) + 1 : 0;
  endfunction

  // Default coefficient set: a symmetric triangular (Bartlett) low-pass
  // h(i) = round(min(i+1, T-i) * (2^(CW-1)-1) / ceil(T/2)).
  function automatic coef_set_t default_coefs(int t, int cw);
    coef_set_t c;
    int half, w;
    c = '0;
    half = (t + 1) / 2;
    for (int i = 0; i < t && i < MAX_T; i++) begin
      w = (i + 1 < t - i) ? i + 1 : t - i;
      c[i] = MAX_CW'((w * ((1 << (cw - 1)) - 1) + half / 2) / half);
    end
    return c;
  endfunction

endpackage
