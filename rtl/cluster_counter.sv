// cluster_counter: global cluster sizes n_c shared by all PEs.
//
// Each PE reports per cycle at most one gain (the cluster a node enters) and
// one loss (the cluster it leaves). For every cluster the counter adds the
// number of gains and subtracts the number of losses of that cycle, so the
// counts follow all P PEs at full rate and are consistent again one edge after
// the last update. `clr` (start of initialisation) zeroes the counts and has
// priority. The counts are registered; PEs see them in the next cycle.
module cluster_counter #(
  parameter int unsigned N  = potts_pkg::DEF_N,
  parameter int unsigned P  = potts_pkg::DEF_P,
  parameter int unsigned Q  = potts_pkg::DEF_Q,
  localparam int unsigned QW = $clog2(Q),
  localparam int unsigned CW = $clog2(N + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clr,
  input  logic [P-1:0]   inc_v,
  input  logic [QW-1:0]  inc_c [P],
  input  logic [P-1:0]   dec_v,
  input  logic [QW-1:0]  dec_c [P],
  output logic [CW-1:0]  counts [Q]
);

  localparam int unsigned PW = $clog2(P + 1);

  logic [PW-1:0] n_inc [Q];
  logic [PW-1:0] n_dec [Q];

  always_comb begin
    for (int c = 0; c < Q; c++) begin
      n_inc[c] = '0;
      n_dec[c] = '0;
      for (int p = 0; p < P; p++) begin
        if (inc_v[p] && inc_c[p] == QW'(c)) n_inc[c] = n_inc[c] + 1'b1;
        if (dec_v[p] && dec_c[p] == QW'(c)) n_dec[c] = n_dec[c] + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < Q; c++) counts[c] <= '0;
    end else if (clr) begin
      for (int c = 0; c < Q; c++) counts[c] <= '0;
    end else begin
      for (int c = 0; c < Q; c++) counts[c] <= counts[c] + CW'(n_inc[c]) - CW'(n_dec[c]);
    end
  end

endmodule
