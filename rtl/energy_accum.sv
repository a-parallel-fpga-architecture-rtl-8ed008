// energy_accum: pipeline stage 3, interaction energy for every candidate cluster.
//
// For each cluster c it forms E_int(c) = sum over the K neighbours j of
// J_ij * [s_j == c]: each weight is gated by a compare of the neighbour's spin
// with c and the K gated weights go through one parallel adder tree, so all K
// interactions of a node are accumulated in a single pass (Q trees per PE).
// Combinational; the PE registers e_int at the end of the stage.
module energy_accum #(
  parameter int unsigned K  = potts_pkg::DEF_K,
  parameter int unsigned Q  = potts_pkg::DEF_Q,
  parameter int unsigned WW = potts_pkg::DEF_WW,
  localparam int unsigned QW = $clog2(Q),
  localparam int unsigned EW = WW + ((K > 1) ? $clog2(K) : 0)
) (
  input  logic [QW-1:0] nbr_spin [K],
  input  logic [WW-1:0] nbr_w    [K],
  output logic [EW-1:0] e_int    [Q]
);

  for (genvar c = 0; c < Q; c++) begin : g_cluster
    logic [WW-1:0] gated [K];
    always_comb begin
      for (int k = 0; k < K; k++)
        gated[k] = (nbr_spin[k] == QW'(c)) ? nbr_w[k] : '0;
    end
    adder_tree #(.N(K), .W(WW)) u_tree (.in(gated), .sum(e_int[c]));
  end

endmodule
