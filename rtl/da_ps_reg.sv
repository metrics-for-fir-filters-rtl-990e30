// da_ps_reg -- parallel-to-serial converter at the head of the DA delay line.
//
// Loads one N-bit input sample and presents it D bits at a time on dout,
// least significant digit first, moving one digit per clock while `shift`
// is high. Its dout is tap 0 of the filter: the digit of the newest sample
// x(n) that is being processed. `load` takes priority over `shift`, so a new
// sample can be loaded in the cycle that uses the previous sample's last
// digit. Timing: dout is a register output (no combinational path from the
// inputs). The box is the "P/S" of the serial FIR block diagrams; its digit
// order, reset value and load priority are choices of this design.
module da_ps_reg #(
  parameter int N = 8,   // sample width
  parameter int D = 1    // digit width, divides N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] din,
  output logic [D-1:0] dout
);

  logic [N-1:0] sr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     sr <= '0;
    else if (load)  sr <= din;
    else if (shift) sr <= sr >> D;
  end

  assign dout = sr[D-1:0];

endmodule
