// graph_rom: the slice of the graph memory that serves one PE.
//
// Holds, for each of the NPP nodes owned by the PE, its K neighbour IDs and
// K integer edge weights. The host writes one node's whole neighbour list per
// cycle (wr_en/wr_addr). The PE reads one whole row per cycle with a
// synchronous read: rd_addr sampled at a rising edge gives rd_nid/rd_w in the
// following cycle (pipeline stage 1, graph fetch). Read-only to the PE, hence
// the name; the host write port is this design's choice of how it is loaded.
// Unused neighbour slots are filled by the host with weight 0.
module graph_rom #(
  parameter int unsigned NPP = potts_pkg::DEF_N / potts_pkg::DEF_P,
  parameter int unsigned K   = potts_pkg::DEF_K,
  parameter int unsigned IDW = $clog2(potts_pkg::DEF_N),
  parameter int unsigned WW  = potts_pkg::DEF_WW,
  localparam int unsigned LW = $clog2(NPP)
) (
  input  logic                clk,
  // host write port
  input  logic                wr_en,
  input  logic [LW-1:0]       wr_addr,
  input  logic [IDW-1:0]      wr_nid [K],
  input  logic [WW-1:0]       wr_w   [K],
  // PE read port
  input  logic                rd_en,
  input  logic [LW-1:0]       rd_addr,
  output logic [IDW-1:0]      rd_nid [K],
  output logic [WW-1:0]       rd_w   [K]
);

  typedef logic [K-1:0][IDW+WW-1:0] row_t;

  row_t mem [NPP];
  row_t wr_row, rd_row;

  always_comb begin
    for (int k = 0; k < K; k++) wr_row[k] = {wr_nid[k], wr_w[k]};
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_row;
    if (rd_en) rd_row <= mem[rd_addr];
  end

  always_comb begin
    for (int k = 0; k < K; k++) begin
      rd_nid[k] = rd_row[k][IDW+WW-1:WW];
      rd_w[k]   = rd_row[k][WW-1:0];
    end
  end

endmodule
