// da_scaling_acc_tb -- checks the shift-add/subtract accumulator for D = 1,
// D = 2 and D = N = 8. For each sample it draws random per-bit sums A(b),
// b = 0..7, and expects y = sum_{b<7} A(b) 2^b - A(7) 2^7 (two's-complement
// weighting, computed here in integers). The digits are fed least
// significant first with random idle cycles in between; y must appear with
// y_valid one clock after the last digit.
module da_scaling_acc_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int N = 8, WS = 12, WY = 20;
  logic valid, first, sub, last;
  logic signed [WS-1:0] ls1 [1];
  logic signed [WS-1:0] ls2 [2];
  logic signed [WS-1:0] ls8 [8];
  logic signed [WY-1:0] y1, y2, y8;
  logic v1, v2, v8;
  int checks = 0, failures = 0;
  int a [N];

  // three accumulators share the control lines; each runs its own digit
  // sequence, so drive them one after the other
  logic val1, val2, val8;
  da_scaling_acc #(.D(1), .N(N), .WS(WS), .WY(WY)) u1 (.clk, .rst_n, .valid(val1), .first, .sub, .last, .lane_sum(ls1), .y(y1), .y_valid(v1));
  da_scaling_acc #(.D(2), .N(N), .WS(WS), .WY(WY)) u2 (.clk, .rst_n, .valid(val2), .first, .sub, .last, .lane_sum(ls2), .y(y2), .y_valid(v2));
  da_scaling_acc #(.D(8), .N(N), .WS(WS), .WY(WY)) u8 (.clk, .rst_n, .valid(val8), .first, .sub, .last, .lane_sum(ls8), .y(y8), .y_valid(v8));

  task automatic run(int d);
    int e = 0;
    int l = N / d;
    for (int b = 0; b < N; b++) begin
      a[b] = $signed(11'($urandom));
      e += (b == N - 1) ? -(a[b] << b) : (a[b] << b);
    end
    for (int c = 0; c < l; c++) begin
      while ($urandom % 3 == 0) @(negedge clk);   // idle cycle: valid low
      first = (c == 0); last = (c == l - 1); sub = last;
      for (int j = 0; j < d; j++) begin
        if (d == 1) ls1[0] = WS'(a[c]);
        if (d == 2) ls2[j] = WS'(a[2*c + j]);
        if (d == 8) ls8[j] = WS'(a[j]);
      end
      val1 = (d == 1); val2 = (d == 2); val8 = (d == 8);
      @(negedge clk);
      val1 = 0; val2 = 0; val8 = 0;
    end
    // result registered at the posedge that took the last digit
    checks += 2;
    if (!((d == 1 && v1) || (d == 2 && v2) || (d == 8 && v8))) begin
      failures++; $display("D=%0d: no y_valid", d);
    end
    if ((d == 1 ? y1 : d == 2 ? y2 : y8) != WY'(e)) begin
      failures++; $display("D=%0d: y=%0d expected %0d", d, (d == 1 ? y1 : d == 2 ? y2 : y8), e);
    end
    @(negedge clk);
    checks++;
    if (v1 || v2 || v8) begin failures++; $display("y_valid longer than one clock"); end
  endtask

  initial begin
    val1 = 0; val2 = 0; val8 = 0; first = 0; sub = 0; last = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) run((n % 3 == 0) ? 1 : (n % 3 == 1) ? 2 : 8);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
