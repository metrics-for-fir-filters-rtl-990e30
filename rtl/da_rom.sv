// da_rom -- distributed-arithmetic look-up table for one partition of K taps.
//
// The word at address a is  sum over m of a[m] * h(BASE+m),  i.e. the partial
// inner product of the K coefficients with one bit of each of the K taps.
// Splitting a T-tap filter into T/K such tables of 2^K words, instead of one
// table of 2^T words, trades memory for an adder tree. Coefficients beyond T
// count as zero, so T need not be a multiple of K. The contents are computed
// at elaboration from the COEFS parameter (constant-coefficient filter).
// Read is combinational (an FPGA LUT ROM); dout is signed, WR bits wide.
module da_rom
  import da_fir_pkg::*;
#(
  parameter int        K     = 4,     // address bits = taps per partition
  parameter int        CW    = 8,     // coefficient width
  parameter int        T     = 16,    // taps of the whole filter
  parameter int        BASE  = 0,     // index of the first tap of this partition
  parameter coef_set_t COEFS = default_coefs(T, CW),
  localparam int       WR    = rom_width(CW, K)
) (
  input  logic                 [K-1:0]  addr,
  output logic signed          [WR-1:0] dout
);

  typedef logic [2**K-1:0][WR-1:0] table_t;

  function automatic table_t build_table();
    table_t tbl;
    logic signed [WR-1:0] acc;
    for (int a = 0; a < 2**K; a++) begin
      acc = '0;
      for (int m = 0; m < K; m++)
        if (a[m] && (BASE + m) < T)
          acc += WR'($signed(COEFS[BASE+m][CW-1:0]));
      tbl[a] = acc;
    end
    return tbl;
  endfunction

  localparam table_t TABLE = build_table();

  assign dout = $signed(TABLE[addr]);

endmodule
