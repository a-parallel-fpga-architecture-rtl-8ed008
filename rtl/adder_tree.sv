// adder_tree: balanced binary tree of adders summing N unsigned operands.
//
// Inputs are padded with zeros up to the next power of two and summed pairwise,
// level by level, so the depth is ceil(log2 N) adders. Every node of the tree
// is OW bits wide, which cannot overflow. Purely combinational.
module adder_tree #(
  parameter int unsigned N  = potts_pkg::DEF_K,
  parameter int unsigned W  = potts_pkg::DEF_WW,
  localparam int unsigned LV = (N > 1) ? $clog2(N) : 0,
  localparam int unsigned OW = W + LV
) (
  input  logic [W-1:0]  in [N],
  output logic [OW-1:0] sum
);

  localparam int unsigned NP = 1 << LV;

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    localparam int unsigned CNT = NP >> l;
    logic [OW-1:0] v [CNT];
    if (l == 0) begin : g_leaf
      for (genvar i = 0; i < CNT; i++) begin : g_in
        if (i < N) begin : g_op
          assign v[i] = OW'(in[i]);
        end else begin : g_pad
          assign v[i] = '0;
        end
      end
    end else begin : g_node
      for (genvar i = 0; i < CNT; i++) begin : g_add
        assign v[i] = g_lvl[l-1].v[2*i] + g_lvl[l-1].v[2*i+1];
      end
    end
  end

  assign sum = g_lvl[LV].v[0];

endmodule
