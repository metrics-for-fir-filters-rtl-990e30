// da_fir_top -- the DA FIR architectures of one input precision side by side.
//
// Instantiates NV independent da_fir filters with the same taps, widths and
// coefficients, differing only in digit size DIGIT[v] and adder-tree
// pipelining PIPES[v]. The defaults are the seven 8-bit architectures:
//   v = 0 bit-serial          v = 1 bit-serial, pipelined
//   v = 2 digit-serial D = 2  v = 3 digit-serial D = 2, pipelined
//   v = 4 digit-serial D = 4  v = 5 digit-serial D = 4, pipelined
//   v = 6 bit-parallel (D = N)
// The 12-bit family is N = CW = 12, NV = 9, DIGIT = {1,1,2,2,4,4,6,6,12},
// PIPES = {0,1,0,1,0,1,0,1,0}.
// Each filter keeps its own valid/ready input and output strobe (the
// architectures run at different sample rates: N/DIGIT[v] clocks per sample),
// with the timing documented in da_fir.
module da_fir_top
  import da_fir_pkg::*;
#(
  parameter int        T     = 16,
  parameter int        N     = 8,
  parameter int        CW    = 8,
  parameter int        K     = 4,
  parameter int        NV    = 7,
  parameter int        DIGIT [NV] = '{1, 1, 2, 2, 4, 4, 8},
  parameter bit        PIPES [NV] = '{0, 1, 0, 1, 0, 1, 0},
  parameter coef_set_t COEFS = default_coefs(T, CW),
  localparam int       WY    = coef_out_width(COEFS, T, CW, N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid [NV],
  output logic                 in_ready [NV],
  input  logic signed [N-1:0]  x_in     [NV],
  output logic                 y_valid  [NV],
  output logic signed [WY-1:0] y        [NV]
);

  for (genvar v = 0; v < NV; v++) begin : g_arch
    da_fir #(
      .T(T), .N(N), .CW(CW), .D(DIGIT[v]), .K(K), .PIPE(PIPES[v]), .COEFS(COEFS)
    ) u_fir (
      .clk, .rst_n,
      .in_valid(in_valid[v]), .in_ready(in_ready[v]), .x_in(x_in[v]),
      .y_valid(y_valid[v]), .y(y[v])
    );
  end

endmodule
