// da_srl -- one stage of the serial tap delay line ("SRL" in the block
// diagrams).
//
// An L-digit shift register of D-bit digits, L = N/D, so that it holds one
// whole sample. Stages are chained behind the P/S converter; because every
// stage is exactly one sample long, the digit leaving stage i is the same
// digit (same bit weights) of sample x(n-i) as the P/S presents for x(n).
// Interface: din enters and dout leaves on each clock with `shift` high;
// dout is the oldest digit held (a register output). Contents reset to zero,
// which models zero samples before the first input. On an FPGA this maps to
// SRL16-type shift-register LUTs.
module da_srl #(
  parameter int D = 1,   // digit width
  parameter int L = 8    // digits per sample, N/D
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         shift,
  input  logic [D-1:0] din,
  output logic [D-1:0] dout
);

  logic [D-1:0] sr [L];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < L; i++) sr[i] <= '0;
    end else if (shift) begin
      sr[0] <= din;
      for (int i = 1; i < L; i++) sr[i] <= sr[i-1];
    end
  end

  assign dout = sr[L-1];

endmodule
