// potts_top: parallel Potts-model clustering solver.
//
// P processing elements (PEs) each own N/P contiguous nodes. The host loads
// the K-nearest-neighbour graph (neighbour IDs and integer Gaussian-kernel
// weights) into the graph ROM, one node per cycle, sets gamma, max_iter and a
// seed, and pulses start. The global controller then
//   1. initialises every spin to a pseudo-random cluster and counts clusters,
//   2. broadcasts node indices to all PEs, which run their four-stage
//      pipelines in lock step (SIMD), each writing only its own spin bank
//      while reading any bank through the shared read interconnect,
//   3. after every epoch checks the number of flips of all PEs and raises
//      done when it is zero (converged) or max_iter epochs have run.
// The cluster label of any node is then read with rd_node/rd_spin (one cycle
// latency); phase, epoch_flips and last_epoch_flips show progress. One epoch
// takes N/P + 4 cycles, initialisation N/P cycles.
// Structure and update rule follow the document; bus widths, host protocol,
// the random generator and the drain between epochs are this design's choices.
module potts_top #(
  parameter int unsigned N  = potts_pkg::DEF_N,
  parameter int unsigned P  = potts_pkg::DEF_P,
  parameter int unsigned K  = potts_pkg::DEF_K,
  parameter int unsigned Q  = potts_pkg::DEF_Q,
  parameter int unsigned WW = potts_pkg::DEF_WW,
  parameter int unsigned GW = potts_pkg::DEF_GW,
  localparam int unsigned NPP = N / P,
  localparam int unsigned LW  = $clog2(NPP),
  localparam int unsigned IDW = $clog2(N),
  localparam int unsigned QW  = $clog2(Q),
  localparam int unsigned CW  = $clog2(N + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // graph load
  input  logic                   graph_we,
  input  logic [IDW-1:0]         graph_node,
  input  logic [IDW-1:0]         graph_nid [K],
  input  logic [WW-1:0]          graph_w   [K],
  output logic                   graph_dropped,
  // run control
  input  logic [GW-1:0]          gamma,
  input  logic [15:0]            max_iter,
  input  logic [15:0]            seed,
  input  logic                   start,
  output logic                   busy,
  output logic                   done,
  output logic                   converged,
  output potts_pkg::ctrl_state_e phase,
  output logic [15:0]            epoch_count,
  output logic [CW-1:0]          epoch_flips,
  output logic [CW-1:0]          last_epoch_flips,
  output logic [CW-1:0]          cluster_size [Q],
  // result read-back
  input  logic [IDW-1:0]         rd_node,
  output logic [QW-1:0]          rd_spin
);
  import potts_pkg::*;

  logic          seed_load, clr_counts, init_we, issue;
  logic [LW-1:0] node_idx;
  logic [CW-1:0] counts [Q];

  logic [P-1:0]  rom_we;
  logic [LW-1:0] rom_waddr;

  logic [P-1:0][NPP-1:0][QW-1:0] bank_contents;
  logic [IDW-1:0] nbr_id   [P][K];
  logic [QW-1:0]  nbr_spin [P][K];

  logic [P-1:0]  flip, inc_v, dec_v;
  logic [QW-1:0] inc_c [P];
  logic [QW-1:0] dec_c [P];

  global_controller #(.N(N), .P(P)) u_ctrl (
    .clk, .rst_n, .start, .max_iter, .flip,
    .state(phase), .busy, .done, .converged, .seed_load, .clr_counts, .init_we,
    .issue, .node_idx, .epoch_count, .epoch_flips, .last_epoch_flips
  );

  host_interface #(.N(N), .P(P), .Q(Q)) u_host (
    .clk, .rst_n, .busy,
    .graph_we, .graph_node, .rom_we, .rom_waddr, .graph_dropped,
    .rd_node, .bank_contents, .rd_spin
  );

  cluster_counter #(.N(N), .P(P), .Q(Q)) u_counts (
    .clk, .rst_n, .clr(clr_counts),
    .inc_v, .inc_c, .dec_v, .dec_c, .counts
  );

  spin_read_xbar #(.P(P), .NPP(NPP), .K(K), .Q(Q)) u_xbar (
    .bank_contents, .req_id(nbr_id), .rsp_spin(nbr_spin)
  );

  for (genvar p = 0; p < P; p++) begin : g_pe
    logic           rom_en;
    logic [LW-1:0]  rom_addr;
    logic [IDW-1:0] rom_nid [K];
    logic [WW-1:0]  rom_w   [K];
    logic [LW-1:0]  own_raddr, bank_waddr;
    logic [QW-1:0]  own_rspin, bank_wspin;
    logic           bank_we;

    graph_rom #(.NPP(NPP), .K(K), .IDW(IDW), .WW(WW)) u_rom (
      .clk,
      .wr_en(rom_we[p]), .wr_addr(rom_waddr), .wr_nid(graph_nid), .wr_w(graph_w),
      .rd_en(rom_en), .rd_addr(rom_addr), .rd_nid(rom_nid), .rd_w(rom_w)
    );

    spin_bank #(.NPP(NPP), .Q(Q)) u_bank (
      .clk, .rst_n,
      .we(bank_we), .waddr(bank_waddr), .wspin(bank_wspin),
      .raddr(own_raddr), .rspin(own_rspin), .contents(bank_contents[p])
    );

    potts_pe #(.N(N), .P(P), .K(K), .Q(Q), .WW(WW), .GW(GW), .PE_ID(p)) u_pe (
      .clk, .rst_n,
      .seed_load, .seed, .init_we, .issue, .node_idx, .gamma, .counts,
      .rom_en, .rom_addr, .rom_nid, .rom_w,
      .nbr_id(nbr_id[p]), .nbr_spin(nbr_spin[p]),
      .own_raddr, .own_rspin, .bank_we, .bank_waddr, .bank_wspin,
      .cnt_inc_v(inc_v[p]), .cnt_inc_c(inc_c[p]),
      .cnt_dec_v(dec_v[p]), .cnt_dec_c(dec_c[p]),
      .flip(flip[p])
    );
  end

  assign cluster_size = counts;

endmodule
