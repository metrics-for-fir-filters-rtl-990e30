// da_scaling_acc -- shift-and-add accumulator that turns per-bit DA sums into
// the filter output.
//
// For each digit of the input samples the adder trees deliver D sums
// lane_sum[j] = sum_i h(i) * bit(d*D + j) of x(n-i). They are combined into
// one digit value  V = sum_j +/- lane_sum[j] * 2^j , where the top lane is
// subtracted when `sub` (A/S) is high: that lane then carries the two's-
// complement sign bit of the samples. The accumulator works least
// significant digit first, as  acc = acc * 2^-D + V * 2^(N-D) ; with the
// first digit it restarts from V * 2^(N-D). Because the register is WS+N bits
// wide no shifted-out bit is lost, and after the last of the N/D digits acc
// holds the exact integer  y = sum_i h(i) * x(n-i).
// Timing: lane_sum and the flags are sampled on the clock edge with `valid`
// high; y and a one-cycle y_valid are registered on the edge that takes the
// `last` digit. The structure is the add/subtract-register-2^-1 loop of the
// DA block diagrams; the digit form and the full-precision register are
// this design's reading of them.
module da_scaling_acc #(
  parameter int D  = 1,    // digit width
  parameter int N  = 8,    // sample width, multiple of D
  parameter int WS = 12,   // width of each lane sum
  parameter int WY = 20    // output width, at most WS + N
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 valid,
  input  logic                 first,
  input  logic                 sub,
  input  logic                 last,
  input  logic signed [WS-1:0] lane_sum [D],
  output logic signed [WY-1:0] y,
  output logic                 y_valid
);

  localparam int WA = WS + N;   // accumulator width

  logic signed [WA-1:0] digit_val;   // V * 2^(N-D)
  logic signed [WA-1:0] acc, acc_next;

  always_comb begin
    logic signed [WA-1:0] v;
    v = '0;
    for (int j = 0; j < D; j++) begin
      if (sub && j == D - 1) v -= WA'(lane_sum[j]) <<< j;
      else                   v += WA'(lane_sum[j]) <<< j;
    end
    digit_val = v <<< (N - D);
    acc_next  = first ? digit_val : (acc >>> D) + digit_val;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= valid && last;
      if (valid) begin
        acc <= acc_next;
        if (last) y <= WY'(acc_next);
      end
    end
  end

  initial assert (N % D == 0 && WY <= WA)
    else $error("da_scaling_acc: D must divide N and WY must not exceed WS+N");

endmodule
