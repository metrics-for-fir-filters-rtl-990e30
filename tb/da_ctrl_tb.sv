// da_ctrl_tb -- checks the sequencer with L = 4 digits and a 2-clock tree
// latency. A reference written here as a down-counter of remaining digits
// predicts in_ready, load and shift each clock, and the digit flags
// (valid, first, A/S, last) are compared two clocks later. Samples are
// offered at random, so both back-to-back and idle operation occur; it also
// counts that a stream offered without a break is taken every 4 clocks.
module da_ctrl_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int L = 4, P = 2;
  logic in_valid, in_ready, load, shift, av, af, as, al;
  int checks = 0, failures = 0;
  int remaining;             // digits still to process after this clock
  logic [3:0] fq [$];        // predicted {valid, first, sub, last}
  int backtoback = 0;

  da_ctrl #(.L(L), .P(P)) dut (
    .clk, .rst_n, .in_valid, .in_ready, .load, .shift,
    .acc_valid(av), .acc_first(af), .acc_sub(as), .acc_last(al)
  );

  initial begin
    in_valid = 0; remaining = 0;
    repeat (P) fq.push_back(4'b0);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      automatic bit busy = remaining > 0;
      automatic bit exp_ready = !busy || remaining == 1;
      in_valid = ($urandom % 4 != 0);
      #1;
      checks += 4;
      if (in_ready != exp_ready) begin failures++; $display("in_ready %0b expected %0b", in_ready, exp_ready); end
      if (load != (in_valid && exp_ready)) begin failures++; $display("load wrong"); end
      if (shift != busy) begin failures++; $display("shift wrong"); end
      // flags for the digit processed this clock, due P clocks later
      fq.push_back({busy, busy && remaining == L, busy && remaining == 1, busy && remaining == 1});
      if ({av, af, as, al} != fq[0]) begin
        failures++; $display("flags %b expected %b", {av, af, as, al}, fq[0]);
      end
      void'(fq.pop_front());
      if (busy && remaining == 1 && in_valid) backtoback++;
      if (in_valid && exp_ready) remaining = L;
      else if (busy) remaining--;
      @(negedge clk);
    end
    checks++;
    if (backtoback == 0) begin failures++; $display("no back-to-back sample"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
