// da_srl_tb -- checks one SRL delay-line stage (D = 2, L = 4 and the
// bit-serial D = 1, L = 8): with random shift enables, dout must be the
// digit that entered exactly L shifts earlier (zero after reset).
module da_srl_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       shift;
  logic [1:0] din;
  logic [1:0] dout2;
  logic [0:0] dout1;
  int checks = 0, failures = 0;
  logic [1:0] hist2 [$];
  logic [0:0] hist1 [$];

  da_srl #(.D(2), .L(4)) u2 (.clk, .rst_n, .shift, .din, .dout(dout2));
  da_srl #(.D(1), .L(8)) u1 (.clk, .rst_n, .shift, .din(din[0]), .dout(dout1));

  initial begin
    shift = 0; din = 0;
    for (int i = 0; i < 4; i++) hist2.push_back(2'b00);
    for (int i = 0; i < 8; i++) hist1.push_back(1'b0);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      checks += 2;
      if (dout2 != hist2[0]) begin failures++; $display("D=2: %0d expected %0d", dout2, hist2[0]); end
      if (dout1 != hist1[0]) begin failures++; $display("D=1: %0d expected %0d", dout1, hist1[0]); end
      shift = ($urandom % 3 != 0);
      din = 2'($urandom);
      if (shift) begin
        void'(hist2.pop_front()); hist2.push_back(din);
        void'(hist1.pop_front()); hist1.push_back(din[0]);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
