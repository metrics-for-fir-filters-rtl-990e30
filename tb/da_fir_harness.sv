// da_fir_harness -- drives one da_fir with a stream of samples and checks it.
//
// Builds its own pseudo-random coefficient set (seeded, including the most
// negative and most positive values), feeds NSAMP samples through the
// valid/ready input with bursts of idle cycles, and compares every output
// with a direct convolution y(n) = sum h(i) x(n-i) computed here in 64-bit
// integers. It also checks the latency (N/D + 1 + pipeline clocks from the
// accepting clock to y_valid) and that a continuously offered stream is
// accepted exactly every N/D clocks. Results are reported on its ports.
module da_fir_harness
  import da_fir_pkg::*;
#(
  parameter int T       = 8,
  parameter int N       = 8,
  parameter int CW      = 8,
  parameter int D       = 1,
  parameter int K       = 4,
  parameter bit PIPE    = 0,
  parameter int SEED    = 1,
  parameter int NSAMP   = 150
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   stalls,        // cycles with in_valid high and in_ready low
  output int   idles,         // cycles with no sample offered
  output int   negatives,     // samples with the sign bit set (A/S subtracts)
  output logic done
);

  localparam int L   = N / D;
  localparam int NR  = (T + K - 1) / K;
  localparam int LAT = L + 1 + (PIPE ? $clog2(NR) + 1 : 0);

  function automatic coef_set_t make_coefs();
    coef_set_t c;
    int unsigned s;
    c = '0;
    s = SEED * 747796405 + 2891336453;
    for (int i = 0; i < T; i++) begin
      s = s * 1664525 + 1013904223;
      case (s[31:29])
        3'd0:    c[i] = MAX_CW'(-(1 << (CW - 1)));     // most negative
        3'd1:    c[i] = MAX_CW'((1 << (CW - 1)) - 1);  // most positive
        default: c[i] = MAX_CW'($signed(s[CW+7:8]));
      endcase
    end
    return c;
  endfunction

  localparam coef_set_t C = make_coefs();
  localparam int WY = coef_out_width(C, T, CW, N);   // the filter's output width

  function automatic logic signed [N-1:0] sample(int k);
    int unsigned h;
    h = (k + 17) * 2654435761 ^ (SEED * 40503);
    h = h ^ (h >> 13);
    h = h * 2246822519;
    case (h[30:28])
      3'd0:    return {1'b1, {(N-1){1'b0}}};   // most negative
      3'd1:    return {1'b0, {(N-1){1'b1}}};   // most positive
      default: return N'(h[N+3:4]);
    endcase
  endfunction

  logic                 in_valid, in_ready, y_valid;
  logic signed [N-1:0]  x_in;
  logic signed [WY-1:0] y;

  da_fir #(.T(T), .N(N), .CW(CW), .D(D), .K(K), .PIPE(PIPE), .COEFS(C)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .x_in, .y_valid, .y
  );

  longint          cyc, last_acc;
  bit              cont;
  int              sent, recv;
  longint          hist [T];
  longint          exp_q [$];
  longint          cyc_q [$];

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0; sent <= 0; recv <= 0; in_valid <= 1'b0; x_in <= '0;
      checks <= 0; failures <= 0; stalls <= 0; idles <= 0; negatives <= 0;
      done <= 1'b0; cont <= 1'b0; last_acc <= 0;
      for (int i = 0; i < T; i++) hist[i] = 0;
    end else begin
      automatic int s = sent;
      automatic int c = checks, f = failures;
      cyc <= cyc + 1;
      if (in_valid && !in_ready) stalls <= stalls + 1;
      if (!in_valid) begin idles <= idles + 1; cont <= 1'b0; end
      // ---- accepted sample: update the reference model
      if (in_valid && in_ready) begin
        automatic longint e = 0;
        for (int i = T - 1; i > 0; i--) hist[i] = hist[i-1];
        hist[0] = longint'(x_in);
        for (int i = 0; i < T; i++)
          e += longint'($signed(C[i][CW-1:0])) * hist[i];
        exp_q.push_back(e);
        cyc_q.push_back(cyc);
        if (x_in < 0) negatives <= negatives + 1;
        if (cont) begin      // offered without a break since the last accept
          c++;
          if (cyc - last_acc != L) begin
            f++;
            $display("[%m] accept spacing %0d, expected %0d", cyc - last_acc, L);
          end
        end
        cont <= 1'b1;
        last_acc <= cyc;
        s++;
      end
      // ---- output check
      if (y_valid) begin
        c++;
        if (exp_q.size() == 0) begin
          f++; $display("[%m] unexpected output");
        end else begin
          automatic longint e = exp_q.pop_front();
          automatic longint t0 = cyc_q.pop_front();
          if (longint'(y) != e) begin
            f++; $display("[%m] y=%0d expected %0d", y, e);
          end
          c++;
          if (cyc - t0 != LAT) begin
            f++; $display("[%m] latency %0d expected %0d", cyc - t0, LAT);
          end
        end
        recv <= recv + 1;
        if (recv + 1 == NSAMP) done <= 1'b1;
      end
      // ---- drive the next sample (hold while not accepted)
      if (!in_valid || in_ready) begin
        // idle bursts in every other block of 24 samples
        if (s < NSAMP && !(((s / 24) % 2 == 1) && ($urandom % 100 < 40))) begin
          in_valid <= 1'b1;
          x_in     <= sample(s);
        end else begin
          in_valid <= 1'b0;
        end
      end
      sent <= s;
      checks <= c;
      failures <= f;
    end
  end

endmodule
