// da_fir_top_tb -- end-to-end test of da_fir_top at its default parameters:
// 16 taps, 8-bit samples and coefficients, the seven architectures
// (bit-serial, digit-serial 2 and 4, each plain and pipelined, bit-parallel).
//
// All seven filters receive the same sample sequence, each through its own
// handshake and at its own rate, with idle bursts. Every output is compared
// with a direct convolution using the default coefficients, recomputed here
// as round(min(i+1, 16-i) * 127 / 8). Per architecture it checks the clocks
// per sample when the input never pauses (8 / D) and the latency
// (8/D + 1, plus 3 for the pipelined tree of 4 ROMs). It counts each
// mechanism -- back-pressure, idle input, negative samples (A/S
// subtraction), full-scale samples, back-to-back samples and pipelined
// outputs -- and fails if one never occurred.
module da_fir_top_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // output width for the default coefficients: sum |h| = 1144, so the output
  // lies in [-1144 * 128, 1144 * 127], which needs 19 bits
  localparam int NV = 7, T = 16, N = 8, WY = 19, NSAMP = 400;
  localparam int DIG [NV] = '{1, 1, 2, 2, 4, 4, 8};
  localparam int PIP [NV] = '{0, 1, 0, 1, 0, 1, 0};

  logic                 in_valid [NV], in_ready [NV], y_valid [NV];
  logic signed [N-1:0]  x_in [NV];
  logic signed [WY-1:0] y [NV];

  da_fir_top dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .y_valid, .y);

  int     h [T];
  longint hist [NV][T];
  longint exp_q [NV][$];
  longint cyc_q [NV][$];
  int     sent [NV], recv [NV];
  longint last_acc [NV];
  bit     cont [NV];
  longint cyc = 0;
  int checks = 0, failures = 0;
  int n_stall = 0, n_idle = 0, n_neg = 0, n_full = 0, n_b2b = 0, n_pipe_out = 0;
  int n_out [NV];

  function automatic logic signed [N-1:0] sample(int k);
    int unsigned r;
    r = (k + 3) * 2654435761;
    r = r ^ (r >> 15);
    r = r * 2246822519;
    case (r[29:27])
      3'd0:    return -128;
      3'd1:    return 127;
      default: return N'(r[N+5:6]);
    endcase
  endfunction

  initial for (int i = 0; i < T; i++) begin
    automatic int w = (i + 1 < T - i) ? i + 1 : T - i;
    h[i] = $rtoi(w * 127.0 / 8.0 + 0.5);
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      for (int v = 0; v < NV; v++) begin
        in_valid[v] <= 1'b0; x_in[v] <= '0; sent[v] = 0; recv[v] = 0; cont[v] = 0; n_out[v] = 0;
        for (int i = 0; i < T; i++) hist[v][i] = 0;
      end
    end else begin
      cyc++;
      for (int v = 0; v < NV; v++) begin
        automatic int l = N / DIG[v];
        automatic int lat = l + 1 + (PIP[v] ? 3 : 0);
        if (in_valid[v] && !in_ready[v]) n_stall++;
        if (!in_valid[v]) begin n_idle++; cont[v] = 0; end
        if (in_valid[v] && in_ready[v]) begin
          automatic longint e = 0;
          for (int i = T - 1; i > 0; i--) hist[v][i] = hist[v][i-1];
          hist[v][0] = longint'(x_in[v]);
          for (int i = 0; i < T; i++) e += h[i] * hist[v][i];
          exp_q[v].push_back(e);
          cyc_q[v].push_back(cyc);
          if (x_in[v] < 0) n_neg++;
          if (x_in[v] == -128 || x_in[v] == 127) n_full++;
          if (cont[v]) begin
            n_b2b++;
            checks++;
            if (cyc - last_acc[v] != longint'(l)) begin
              failures++; $display("arch %0d: %0d clocks per sample, expected %0d", v, cyc - last_acc[v], l);
            end
          end
          cont[v] = 1;
          last_acc[v] = cyc;
          sent[v]++;
        end
        if (y_valid[v]) begin
          checks += 2;
          if (exp_q[v].size() == 0) begin
            failures++; $display("arch %0d: unexpected output", v);
          end else begin
            automatic longint e = exp_q[v].pop_front();
            automatic longint t0 = cyc_q[v].pop_front();
            if (longint'(y[v]) != e) begin failures++; $display("arch %0d: y=%0d expected %0d", v, y[v], e); end
            if (cyc - t0 != longint'(lat)) begin failures++; $display("arch %0d: latency %0d expected %0d", v, cyc - t0, lat); end
          end
          recv[v]++; n_out[v]++;
          if (PIP[v]) n_pipe_out++;
        end
        if (!in_valid[v] || in_ready[v]) begin
          // samples 100..199 and 300..399 come with random idle cycles
          if (sent[v] < NSAMP && !(((sent[v] / 100) % 2 == 1) && ($urandom % 100 < 50))) begin
            in_valid[v] <= 1'b1;
            x_in[v] <= sample(sent[v]);
          end else begin
            in_valid[v] <= 1'b0;
          end
        end
      end
    end
  end

  function automatic bit all_done();
    for (int v = 0; v < NV; v++) if (recv[v] < NSAMP) return 0;
    return 1;
  endfunction

  task automatic report();
    checks += 7 + NV;
    if ($bits(dut.y[0]) != WY) begin failures++; $display("output width %0d, expected %0d", $bits(dut.y[0]), WY); end
    if (n_stall == 0) begin failures++; $display("no back-pressure"); end
    if (n_idle == 0) begin failures++; $display("no idle input"); end
    if (n_neg == 0) begin failures++; $display("no negative sample"); end
    if (n_full == 0) begin failures++; $display("no full-scale sample"); end
    if (n_b2b == 0) begin failures++; $display("no back-to-back samples"); end
    if (n_pipe_out == 0) begin failures++; $display("no pipelined output"); end
    for (int v = 0; v < NV; v++)
      if (n_out[v] != NSAMP) begin failures++; $display("arch %0d: %0d outputs", v, n_out[v]); end
    $display("mechanisms: back-pressure=%0d idle=%0d negative=%0d full-scale=%0d back-to-back=%0d pipelined-outputs=%0d",
             n_stall, n_idle, n_neg, n_full, n_b2b, n_pipe_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        while (!all_done()) @(posedge clk);
        repeat (2) @(posedge clk);
      end
      begin   // watchdog
        repeat (20000) @(posedge clk);
        failures++;
        $display("watchdog expired");
      end
    join_any
    report();
  end
endmodule
