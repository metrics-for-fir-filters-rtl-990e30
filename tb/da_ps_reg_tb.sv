// da_ps_reg_tb -- checks the parallel-to-serial converter for D = 1 and D = 2.
// Loads random words, then shifts them out while randomly pausing, and
// compares each digit with the word's digit computed here; also checks that
// load wins over shift.
module da_ps_reg_tb;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic       load, shift;
  logic [7:0] din;
  logic [0:0] d1;
  logic [1:0] d2;
  int checks = 0, failures = 0;

  da_ps_reg #(.N(8), .D(1)) u1 (.clk, .rst_n, .load, .shift, .din, .dout(d1));
  da_ps_reg #(.N(8), .D(2)) u2 (.clk, .rst_n, .load, .shift, .din, .dout(d2));

  task automatic check(input logic [7:0] w, input int k);
    checks += 2;
    if (d1 != w[k]) begin failures++; $display("D=1 bit %0d: %b, expected %b", k, d1, w[k]); end
    if (k < 4 && d2 != w[2*k +: 2]) begin failures++; $display("D=2 digit %0d: %b, expected %b", k, d2, w[2*k +: 2]); end
  endtask

  initial begin
    load = 0; shift = 0; din = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    checks++; if (d1 != 0 || d2 != 0) failures++;
    for (int n = 0; n < 200; n++) begin
      automatic logic [7:0] w = 8'($urandom);
      @(negedge clk); load = 1; shift = ($urandom % 2 == 0); din = w;
      @(negedge clk); load = 0; shift = 0;
      // D = 1 sees one bit per shift; D = 2 one digit per shift
      for (int k = 0; k < 8; ) begin
        check(w, k);     // u2 is at digit k only while k < 4
        if ($urandom % 4 != 0) begin
          shift = 1; @(negedge clk); shift = 0; k++;
        end else begin
          @(negedge clk);  // hold: no shift, digit unchanged
        end
      end
      // after all shifts, D=1 register must be empty
      checks++; if (d1 != 0) failures++;
    end
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
