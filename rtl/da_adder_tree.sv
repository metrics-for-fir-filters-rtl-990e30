// da_adder_tree -- adds the outputs of the DA ROM partitions.
//
// A balanced binary tree of adders over NL signed W-bit leaves (missing
// leaves up to the next power of two are zero). With PIPE = 0 it is purely
// combinational. With PIPE = 1 a register rank sits on the leaves (the ROM
// outputs) and after every adder level, which shortens the longest path to
// one adder; the sum then appears clog2(NL)+1 clocks after its leaves
// (da_fir_pkg::tree_latency). The pipeline registers have no enable and no
// reset: the controller delays its valid/first/last flags by the same
// number of clocks. W must be wide enough for the sum; da_fir sizes it for
// the worst case.
module da_adder_tree #(
  parameter int NL   = 4,    // number of leaves (ROM partitions)
  parameter int W    = 10,   // width of leaves, sums and result
  parameter bit PIPE = 0     // 1: register after the ROMs and each adder level
) (
  input  logic                clk,
  input  logic signed [W-1:0] leaves [NL],
  output logic signed [W-1:0] sum
);

  localparam int LV = $clog2(NL);   // adder levels
  localparam int NP = 1 << LV;      // leaves padded to a power of two

  // g_lvl[l].v holds the NP >> l values present after adder level l
  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic signed [W-1:0] v [NP >> l];
    for (genvar i = 0; i < (NP >> l); i++) begin : g_node
      logic signed [W-1:0] s;
      if (l == 0) begin : g_leaf
        assign s = (i < NL) ? leaves[i % NL] : '0;
      end else begin : g_add
        assign s = g_lvl[l-1].v[2*i] + g_lvl[l-1].v[2*i+1];
      end
      if (PIPE) begin : g_reg
        logic signed [W-1:0] r;
        always_ff @(posedge clk) r <= s;
        assign v[i] = r;
      end else begin : g_comb
        assign v[i] = s;
      end
    end
  end

  assign sum = g_lvl[LV].v[0];

endmodule
