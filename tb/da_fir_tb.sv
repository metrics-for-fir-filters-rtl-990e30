// da_fir_tb -- self-checking test of da_fir in several architectures.
//
// Runs bit-serial, digit-serial (D = 2, 3, 4, 6) and bit-parallel filters,
// with and without the pipelined adder tree, with ROM partitions of 2 and 4
// taps and one unpartitioned 256-word table, tap counts that are and are not multiples of K, and 8- and 12-bit
// samples and coefficients. Each instance of da_fir_harness checks every
// output against a direct convolution, the latency and the sample rate.
module da_fir_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 8;
  int   chk [NH], fail [NH], stl [NH], idl [NH], neg [NH];
  logic dn  [NH];

  da_fir_harness #(.T(8),  .N(8),  .CW(8),  .D(1),  .K(4), .PIPE(0), .SEED(1)) h0 (.clk, .rst_n, .checks(chk[0]), .failures(fail[0]), .stalls(stl[0]), .idles(idl[0]), .negatives(neg[0]), .done(dn[0]));
  da_fir_harness #(.T(12), .N(8),  .CW(8),  .D(2),  .K(4), .PIPE(1), .SEED(2)) h1 (.clk, .rst_n, .checks(chk[1]), .failures(fail[1]), .stalls(stl[1]), .idles(idl[1]), .negatives(neg[1]), .done(dn[1]));
  da_fir_harness #(.T(16), .N(8),  .CW(8),  .D(4),  .K(2), .PIPE(1), .SEED(3)) h2 (.clk, .rst_n, .checks(chk[2]), .failures(fail[2]), .stalls(stl[2]), .idles(idl[2]), .negatives(neg[2]), .done(dn[2]));
  da_fir_harness #(.T(10), .N(8),  .CW(8),  .D(8),  .K(4), .PIPE(0), .SEED(4)) h3 (.clk, .rst_n, .checks(chk[3]), .failures(fail[3]), .stalls(stl[3]), .idles(idl[3]), .negatives(neg[3]), .done(dn[3]));
  da_fir_harness #(.T(24), .N(12), .CW(12), .D(6),  .K(4), .PIPE(1), .SEED(5)) h4 (.clk, .rst_n, .checks(chk[4]), .failures(fail[4]), .stalls(stl[4]), .idles(idl[4]), .negatives(neg[4]), .done(dn[4]));
  da_fir_harness #(.T(64), .N(12), .CW(12), .D(3),  .K(4), .PIPE(1), .SEED(6)) h5 (.clk, .rst_n, .checks(chk[5]), .failures(fail[5]), .stalls(stl[5]), .idles(idl[5]), .negatives(neg[5]), .done(dn[5]));
  da_fir_harness #(.T(5),  .N(12), .CW(12), .D(12), .K(2), .PIPE(1), .SEED(7)) h6 (.clk, .rst_n, .checks(chk[6]), .failures(fail[6]), .stalls(stl[6]), .idles(idl[6]), .negatives(neg[6]), .done(dn[6]));
  // one unpartitioned table of 2^T words (K = T): no adder tree
  da_fir_harness #(.T(8),  .N(8),  .CW(8),  .D(1),  .K(8), .PIPE(0), .SEED(8)) h7 (.clk, .rst_n, .checks(chk[7]), .failures(fail[7]), .stalls(stl[7]), .idles(idl[7]), .negatives(neg[7]), .done(dn[7]));

  int checks, failures;

  task automatic finish();
    checks = 0; failures = 0;
    for (int i = 0; i < NH; i++) begin
      checks += chk[i]; failures += fail[i];
      if (!dn[i]) begin failures++; $display("instance %0d did not finish", i); end
      // every instance must have seen back-pressure, idle input and negative samples
      checks += 3;
      if (stl[i] == 0 && i != 3 && i != 6) begin failures++; $display("instance %0d: no stall", i); end
      if (idl[i] == 0) begin failures++; $display("instance %0d: no idle input", i); end
      if (neg[i] == 0) begin failures++; $display("instance %0d: no negative sample", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    fork
      begin
        for (int i = 0; i < NH; i++) wait (dn[i]);
        repeat (2) @(posedge clk);
      end
      begin   // watchdog
        repeat (20000) @(posedge clk);
        failures++;
        $display("watchdog expired");
      end
    join_any
    finish();
  end
endmodule
