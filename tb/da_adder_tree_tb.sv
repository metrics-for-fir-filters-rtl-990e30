// da_adder_tree_tb -- checks the adder tree with 5 leaves (not a power of
// two) and with 1 leaf, combinational and pipelined: every sum must equal
// the sum of its leaves, and the pipelined tree must deliver it exactly
// clog2(NL)+1 clocks later (4 clocks for 5 leaves, 1 for 1 leaf).
module da_adder_tree_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int W = 12;
  logic signed [W-1:0] lv5 [5];
  logic signed [W-1:0] lv1 [1];
  logic signed [W-1:0] s5c, s5p, s1c, s1p;
  int checks = 0, failures = 0;
  int hist5 [$], hist1 [$];

  da_adder_tree #(.NL(5), .W(W), .PIPE(0)) t5c (.clk, .leaves(lv5), .sum(s5c));
  da_adder_tree #(.NL(5), .W(W), .PIPE(1)) t5p (.clk, .leaves(lv5), .sum(s5p));
  da_adder_tree #(.NL(1), .W(W), .PIPE(0)) t1c (.clk, .leaves(lv1), .sum(s1c));
  da_adder_tree #(.NL(1), .W(W), .PIPE(1)) t1p (.clk, .leaves(lv1), .sum(s1p));

  initial begin
    for (int n = 0; n < 500; n++) begin
      automatic int s = 0;
      @(negedge clk);
      for (int i = 0; i < 5; i++) begin
        lv5[i] = W'($signed(10'($urandom)));   // 10-bit values: the sum fits in 12 bits
        s += int'(lv5[i]);
      end
      lv1[0] = W'($urandom);
      #1;
      checks += 2;
      if (s5c != W'(s))  begin failures++; $display("comb 5: %0d expected %0d", s5c, s); end
      if (s1c != lv1[0]) begin failures++; $display("comb 1: %0d", s1c); end
      hist5.push_front(s); hist1.push_front(int'(lv1[0]));
      // values launched at this negedge are registered on the next posedge;
      // after the posedge that completes latency P, compare
      @(posedge clk); #1;
      if (hist5.size() > 4) begin
        checks++;
        if (s5p != W'(hist5[3])) begin failures++; $display("pipe 5: %0d expected %0d", s5p, hist5[3]); end
      end
      checks++;
      if (s1p != W'(hist1[0])) begin failures++; $display("pipe 1: %0d expected %0d", s1p, hist1[0]); end
    end
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
