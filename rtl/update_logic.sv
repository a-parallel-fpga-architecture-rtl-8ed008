// update_logic: pipeline stage 4, minimum-dH decision for one node.
//
// For the node's current cluster A and each other candidate c it computes
//   dH(A->c) = E_int(A) - E_int(c) + 2*gamma*(n_c - n_A + 1)
// i.e. the loss of interaction energy plus the exact change of the balance
// penalty gamma * sum_k (n_k - N/q)^2 when one node moves from A to c, so no
// squaring is needed. Staying (c == A) costs 0. The candidate with the
// smallest dH wins, the lowest index on a tie; the node flips only if that
// minimum is negative. Combinational; the PE writes the result back at the end
// of the stage. Integer arithmetic in 32-bit signed.
module update_logic #(
  parameter int unsigned Q  = potts_pkg::DEF_Q,
  parameter int unsigned EW = potts_pkg::DEF_WW + $clog2(potts_pkg::DEF_K),
  parameter int unsigned CW = $clog2(potts_pkg::DEF_N + 1),
  parameter int unsigned GW = potts_pkg::DEF_GW,
  localparam int unsigned QW = $clog2(Q)
) (
  input  logic [EW-1:0]      e_int  [Q],
  input  logic [QW-1:0]      cur,
  input  logic [CW-1:0]      counts [Q],
  input  logic [GW-1:0]      gamma,
  output logic [QW-1:0]      best,
  output potts_pkg::dh_t     best_dh,
  output logic               flip
);
  import potts_pkg::*;

  dh_t dh [Q];

  always_comb begin
    for (int c = 0; c < Q; c++) begin
      if (QW'(c) == cur) begin
        dh[c] = '0;
      end else begin
        dh[c] = dh_t'(e_int[cur]) - dh_t'(e_int[c])
              + dh_t'(2 * gamma) * (dh_t'(counts[c]) - dh_t'(counts[cur]) + dh_t'(1));
      end
    end
    best    = cur;
    best_dh = '0;
    for (int c = 0; c < Q; c++) begin
      if (dh[c] < best_dh) begin
        best    = QW'(c);
        best_dh = dh[c];
      end
    end
    flip = (best != cur);
  end

endmodule
