// da_fir_workloads12_tb -- runs every filter size of the 12-bit evaluation:
// 8, 12, 16, 24, 32 and 64 taps, each with the 9 12-bit architectures
// (digit sizes 1, 2, 4 and 6, plain and pipelined,
// bit-parallel).
// Each da_fir_top_harness checks every output against a direct convolution.
// In addition, the measured clocks per sample of each architecture must
// equal the clock-rate / sample-rate ratio of the published 8-tap results
// for 12-bit filters (listed below in MHz), i.e. N / D.
module da_fir_workloads12_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NV = 9;
  localparam int TAPS [6] = '{8, 12, 16, 24, 32, 64};
  localparam int DIG [NV] = '{1, 1, 2, 2, 4, 4, 6, 6, 12};
  localparam bit PIP [NV] = '{0, 1, 0, 1, 0, 1, 0, 1, 0};

  // published 8-tap clock rate and sample rate per architecture [MHz]
  real cr [NV] = '{111.60, 133.15, 75.07, 131.93, 61.05, 70.67, 44.31, 53.30, 25.99};
  real sr [NV] = '{9.30, 11.09, 12.51, 21.99, 20.35, 23.56, 22.15, 26.65, 25.99};

  int   chk [6], fail [6];
  int   cps [6][NV];
  logic dn [6];

  for (genvar t = 0; t < 6; t++) begin : g_t
    da_fir_top_harness #(.T(TAPS[t]), .N(12), .NV(NV), .DIGIT(DIG), .PIPES(PIP)) h (
      .clk, .rst_n, .checks(chk[t]), .failures(fail[t]), .cps(cps[t]), .done(dn[t]));
  end

  int checks = 0, failures = 0;

  function automatic bit all_done();
    for (int t = 0; t < 6; t++) if (!dn[t]) return 0;
    return 1;
  endfunction

  task automatic report();
    for (int t = 0; t < 6; t++) begin
      checks += chk[t] + 1;
      failures += fail[t];
      if (!dn[t]) begin failures++; $display("%0d taps: not finished", TAPS[t]); end
      for (int v = 0; v < NV; v++) begin
        checks++;
        if (cps[t][v] != $rtoi(cr[v] / sr[v] + 0.5)) begin
          failures++; $display("arch %0d, %0d taps: %0d clocks per sample", v, TAPS[t], cps[t][v]);
        end
      end
    end
    $write("clocks per sample:");
    for (int v = 0; v < NV; v++) $write(" %0d", cps[0][v]);
    $write("\n");
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
