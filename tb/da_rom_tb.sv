// da_rom_tb -- checks DA ROM contents exhaustively: for every address the
// word must equal the sum of the coefficients whose address bit is set.
// Covers K = 4 and K = 2, a partition at an offset, a partition running past
// the last tap (those taps count as zero), negative extremes, and the
// default coefficient set.
module da_rom_tb;
  import da_fir_pkg::*;

  localparam int T = 10, CW = 8;

  function automatic coef_set_t make_coefs();
    coef_set_t c = '0;
    int v [T] = '{-128, 127, -1, 55, -77, 3, 0, 100, -128, -128};
    for (int i = 0; i < T; i++) c[i] = MAX_CW'(v[i]);
    return c;
  endfunction
  localparam coef_set_t C = make_coefs();

  logic [3:0] a4;
  logic [1:0] a2;
  logic signed [9:0] w0, w4, w8;
  logic signed [8:0] w2;
  logic signed [9:0] wd;

  da_rom #(.K(4), .CW(CW), .T(T), .BASE(0), .COEFS(C)) r0 (.addr(a4), .dout(w0));
  da_rom #(.K(4), .CW(CW), .T(T), .BASE(4), .COEFS(C)) r4 (.addr(a4), .dout(w4));
  da_rom #(.K(4), .CW(CW), .T(T), .BASE(8), .COEFS(C)) r8 (.addr(a4), .dout(w8));
  da_rom #(.K(2), .CW(CW), .T(T), .BASE(8), .COEFS(C)) r2 (.addr(a2), .dout(w2));
  da_rom #(.K(4), .CW(8),  .T(16))                       rd (.addr(a4), .dout(wd));

  int checks = 0, failures = 0;
  int hcoef [T] = '{-128, 127, -1, 55, -77, 3, 0, 100, -128, -128};
  // default set: triangular low-pass, 16 taps, peak 127
  int dcoef [4] = '{16, 32, 48, 64};

  function automatic int expect_sum(int base, int k, int a);
    int s = 0;
    for (int m = 0; m < k; m++)
      if (a[m] && base + m < T) s += hcoef[base + m];
    return s;
  endfunction

  initial begin
    for (int a = 0; a < 16; a++) begin
      automatic int sd = 0;
      a4 = 4'(a); a2 = 2'(a);
      #1;
      checks += 5;
      if (w0 != expect_sum(0, 4, a)) begin failures++; $display("base0 a=%0d: %0d", a, w0); end
      if (w4 != expect_sum(4, 4, a)) begin failures++; $display("base4 a=%0d: %0d", a, w4); end
      if (w8 != expect_sum(8, 4, a)) begin failures++; $display("base8 a=%0d: %0d", a, w8); end
      if (w2 != expect_sum(8, 2, a % 4)) begin failures++; $display("K=2 a=%0d: %0d", a, w2); end
      for (int m = 0; m < 4; m++) if (a[m]) sd += dcoef[m];
      if (wd != sd) begin failures++; $display("default a=%0d: %0d expected %0d", a, wd, sd); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
