// da_fir_top_harness -- drives and checks one da_fir_top (all architectures of
// one sample precision) at a given tap count.
//
// Every architecture receives the same NSAMP-sample sequence through its own
// handshake, with idle bursts in every other block of 50 samples. Outputs are
// compared with a direct convolution using the default triangular
// coefficients, recomputed here as round(min(i+1, T-i) * (2^(CW-1)-1) /
// ceil(T/2)). For each architecture the harness reports the clocks between
// samples taken without an input break (cps), which must be N / DIGIT[v],
// and checks the latency N/DIGIT[v] + 1 (+ clog2(ceil(T/4)) + 1 if pipelined).
module da_fir_top_harness #(
  parameter int T     = 16,
  parameter int N     = 8,
  parameter int NV    = 7,
  parameter int DIGIT [NV] = '{1, 1, 2, 2, 4, 4, 8},
  parameter bit PIPES [NV] = '{0, 1, 0, 1, 0, 1, 0},
  parameter int NSAMP = 120
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   cps [NV],
  output logic done
);

  localparam int CW = N;
  localparam int WY = da_fir_pkg::coef_out_width(da_fir_pkg::default_coefs(T, CW), T, CW, N);
  localparam int NR = (T + 3) / 4;

  logic                 in_valid [NV], in_ready [NV], y_valid [NV];
  logic signed [N-1:0]  x_in [NV];
  logic signed [WY-1:0] y [NV];

  da_fir_top #(.T(T), .N(N), .CW(CW), .NV(NV), .DIGIT(DIGIT), .PIPES(PIPES)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .x_in, .y_valid, .y
  );

  int     h [T];
  longint hist [NV][T];
  longint exp_q [NV][$];
  longint cyc_q [NV][$];
  int     sent [NV], recv [NV];
  longint last_acc [NV];
  bit     cont [NV];
  longint cyc;

  initial for (int i = 0; i < T; i++) begin
    automatic int w = (i + 1 < T - i) ? i + 1 : T - i;
    h[i] = $rtoi(w * real'((1 << (CW - 1)) - 1) / real'((T + 1) / 2) + 0.5);
  end

  function automatic logic signed [N-1:0] sample(int k);
    int unsigned r;
    r = (k + T) * 2654435761;
    r = r ^ (r >> 15);
    r = r * 2246822519;
    case (r[29:27])
      3'd0:    return {1'b1, {(N-1){1'b0}}};
      3'd1:    return {1'b0, {(N-1){1'b1}}};
      default: return N'(r[N+5:6]);
    endcase
  endfunction

  always @(posedge clk) begin
    if (!rst_n) begin
      cyc = 0; checks <= 0; failures <= 0; done <= 1'b0;
      for (int v = 0; v < NV; v++) begin
        in_valid[v] <= 1'b0; x_in[v] <= '0; sent[v] = 0; recv[v] = 0; cont[v] = 0; cps[v] <= 0;
        for (int i = 0; i < T; i++) hist[v][i] = 0;
      end
    end else begin
      automatic int c = checks, f = failures;
      automatic bit all = 1;
      cyc++;
      for (int v = 0; v < NV; v++) begin
        automatic int l = N / DIGIT[v];
        automatic int lat = l + 1 + (PIPES[v] ? $clog2(NR) + 1 : 0);
        if (!in_valid[v]) cont[v] = 0;
        if (in_valid[v] && in_ready[v]) begin
          automatic longint e = 0;
          for (int i = T - 1; i > 0; i--) hist[v][i] = hist[v][i-1];
          hist[v][0] = longint'(x_in[v]);
          for (int i = 0; i < T; i++) e += h[i] * hist[v][i];
          exp_q[v].push_back(e);
          cyc_q[v].push_back(cyc);
          if (cont[v]) begin
            cps[v] <= int'(cyc - last_acc[v]);
            c++;
            if (cyc - last_acc[v] != longint'(l)) begin
              f++; $display("[%m] arch %0d: %0d clocks per sample", v, cyc - last_acc[v]);
            end
          end
          cont[v] = 1;
          last_acc[v] = cyc;
          sent[v]++;
        end
        if (y_valid[v]) begin
          c += 2;
          if (exp_q[v].size() == 0) begin
            f++; $display("[%m] arch %0d: unexpected output", v);
          end else begin
            automatic longint e = exp_q[v].pop_front();
            automatic longint t0 = cyc_q[v].pop_front();
            if (longint'(y[v]) != e) begin f++; $display("[%m] arch %0d: y=%0d expected %0d", v, y[v], e); end
            if (cyc - t0 != longint'(lat)) begin f++; $display("[%m] arch %0d: latency %0d", v, cyc - t0); end
          end
          recv[v]++;
        end
        if (recv[v] < NSAMP) all = 0;
        if (!in_valid[v] || in_ready[v]) begin
          if (sent[v] < NSAMP && !(((sent[v] / 50) % 2 == 1) && ($urandom % 100 < 50))) begin
            in_valid[v] <= 1'b1;
            x_in[v] <= sample(sent[v]);
          end else begin
            in_valid[v] <= 1'b0;
          end
        end
      end
      checks <= c;
      failures <= f;
      done <= all;
    end
  end

endmodule
