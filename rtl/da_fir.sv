// da_fir -- constant-coefficient FIR filter in distributed arithmetic (DA).
//
// Computes y(n) = sum_{i<T} h(i) * x(n-i) without multipliers. The newest
// sample enters a parallel-to-serial register and leaves it D bits per
// clock, least significant digit first, into a chain of T-1 SRL stages, each
// one sample long, so that in every clock the same digit of x(n) ... x(n-T+1)
// is available side by side. For each of the D bits of that digit, the T
// tap bits address T/K ROMs of 2^K words (each word a partial sum of
// coefficients), and an adder tree adds the ROM words. The D tree sums are
// weighted 2^0 ... 2^(D-1), the sign bit subtracted (A/S), and accumulated
// with a right shift of one digit per clock.
//
// One parameterised structure covers the architectures the filter family is
// built in:   D = 1            bit-serial
//             1 < D < N        digit-serial (digit size D)
//             D = N            bit-parallel
// and PIPE = 1 adds a register after the ROMs and after each adder level.
//
// Interface: valid/ready input (x_in taken when in_valid && in_ready),
// two's-complement samples of N bits; y is registered and exact, with a
// one-cycle y_valid strobe. Its width WY is computed from the coefficient
// values: the fewest bits that hold the largest positive and negative
// output any input can produce. Samples before the first are 0.
// Timing: a continuous stream is taken at one sample per N/D clocks; y(n)
// appears N/D + 1 + tree_latency clocks after the clock that takes x(n)
// (tree_latency = clog2(ceil(T/K)) + 1 with PIPE, else 0).
// The ROM partitioning, P/S-SRL delay line, adder tree and A/S accumulator
// follow the DA architecture; K, the coefficient set, the handshake, the
// widths and the reset behaviour are choices of this design.
module da_fir
  import da_fir_pkg::*;
#(
  parameter int        T     = 16,   // taps
  parameter int        N     = 8,    // input sample width
  parameter int        CW    = 8,    // coefficient width
  parameter int        D     = 2,    // digit size: 1 bit-serial ... N bit-parallel
  parameter int        K     = 4,    // taps per ROM partition (ROM address bits)
  parameter bit        PIPE  = 1,    // pipelined adder tree
  parameter coef_set_t COEFS = default_coefs(T, CW),
  localparam int       WY    = coef_out_width(COEFS, T, CW, N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic signed [N-1:0]  x_in,
  output logic                 y_valid,
  output logic signed [WY-1:0] y
);

  localparam int L  = N / D;                 // clocks per sample
  localparam int NR = (T + K - 1) / K;       // ROM partitions per bit lane
  localparam int WR = rom_width(CW, K);      // ROM word width
  localparam int WS = sum_width(CW, NR, K);  // adder-tree width
  localparam int P  = tree_latency(NR, PIPE);

  // ---------------- control ----------------
  logic load, shift;
  logic acc_valid, acc_first, acc_sub, acc_last;

  da_ctrl #(.L(L), .P(P)) u_ctrl (
    .clk, .rst_n, .in_valid, .in_ready, .load, .shift,
    .acc_valid, .acc_first, .acc_sub, .acc_last
  );

  // ---------------- delay line: P/S + SRL chain ----------------
  logic [D-1:0] tap [T];   // current digit of x(n-i)

  da_ps_reg #(.N(N), .D(D)) u_ps (
    .clk, .rst_n, .load, .shift, .din(x_in), .dout(tap[0])
  );

  for (genvar i = 1; i < T; i++) begin : g_srl
    da_srl #(.D(D), .L(L)) u_srl (
      .clk, .rst_n, .shift, .din(tap[i-1]), .dout(tap[i])
    );
  end

  // ---------------- per bit lane: ROMs + adder tree ----------------
  logic signed [WS-1:0] lane_sum [D];

  for (genvar j = 0; j < D; j++) begin : g_lane
    logic signed [WS-1:0] rom_word [NR];
    for (genvar r = 0; r < NR; r++) begin : g_rom
      logic [K-1:0]         addr;
      logic signed [WR-1:0] word;
      for (genvar m = 0; m < K; m++) begin : g_addr
        assign addr[m] = (r * K + m < T) ? tap[(r * K + m) % T][j] : 1'b0;
      end
      da_rom #(.K(K), .CW(CW), .T(T), .BASE(r * K), .COEFS(COEFS)) u_rom (
        .addr, .dout(word)
      );
      assign rom_word[r] = WS'(word);
    end
    da_adder_tree #(.NL(NR), .W(WS), .PIPE(PIPE)) u_tree (
      .clk, .leaves(rom_word), .sum(lane_sum[j])
    );
  end

  // ---------------- scaling accumulator ----------------
  da_scaling_acc #(.D(D), .N(N), .WS(WS), .WY(WY)) u_acc (
    .clk, .rst_n, .valid(acc_valid), .first(acc_first), .sub(acc_sub),
    .last(acc_last), .lane_sum, .y, .y_valid
  );

  initial assert (N % D == 0 && T <= MAX_T && CW <= MAX_CW && K >= 1)
    else $error("da_fir: D must divide N, T <= %0d, CW <= %0d", MAX_T, MAX_CW);

endmodule
