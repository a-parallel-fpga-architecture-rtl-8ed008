// potts_pe: one processing element of the SIMD Potts solver.
//
// The PE owns NPP contiguous nodes and the spin bank holding them. All PEs
// receive the same node index from the global controller each cycle and run
// it through a four-stage pipeline:
//   stage 1  graph fetch       the graph ROM row (K neighbour IDs and weights)
//                              of the node is read; the ROM registers it.
//   stage 2  state retrieval   the neighbour IDs go to the read interconnect,
//                              the returned spins and the node's own spin A are
//                              registered.
//   stage 3  energy accum.     E_int(c) for all Q clusters, registered.
//   stage 4  update logic      minimum-dH candidate B against the global
//                              cluster counts; if B != A and dH < 0 the spin
//                              is written to the own bank and the global
//                              counter is told (A loses one, B gains one).
// A node issued in cycle t is written back at the rising edge ending cycle
// t+3; one node enters per cycle. Spins and counts read by a node may be up to
// three cycles old (updates of other nodes still in flight): the solver runs
// all PEs in parallel without hazard checks, as the parallel update rule
// intends. During initialisation the PE instead writes a pseudo-random spin
// to the given node and reports it to the counter as a gain.
module potts_pe #(
  parameter int unsigned N     = potts_pkg::DEF_N,
  parameter int unsigned P     = potts_pkg::DEF_P,
  parameter int unsigned K     = potts_pkg::DEF_K,
  parameter int unsigned Q     = potts_pkg::DEF_Q,
  parameter int unsigned WW    = potts_pkg::DEF_WW,
  parameter int unsigned GW    = potts_pkg::DEF_GW,
  parameter int unsigned PE_ID = 0,
  localparam int unsigned NPP  = N / P,
  localparam int unsigned LW   = $clog2(NPP),
  localparam int unsigned IDW  = $clog2(N),
  localparam int unsigned QW   = $clog2(Q),
  localparam int unsigned CW   = $clog2(N + 1),
  localparam int unsigned EW   = WW + ((K > 1) ? $clog2(K) : 0)
) (
  input  logic               clk,
  input  logic               rst_n,
  // broadcast control from the global controller
  input  logic               seed_load,
  input  logic [15:0]        seed,
  input  logic               init_we,
  input  logic               issue,
  input  logic [LW-1:0]      node_idx,
  input  logic [GW-1:0]      gamma,
  input  logic [CW-1:0]      counts [Q],
  // graph ROM read port
  output logic               rom_en,
  output logic [LW-1:0]      rom_addr,
  input  logic [IDW-1:0]     rom_nid [K],
  input  logic [WW-1:0]      rom_w   [K],
  // neighbour spins through the read interconnect
  output logic [IDW-1:0]     nbr_id   [K],
  input  logic [QW-1:0]      nbr_spin [K],
  // own spin bank
  output logic [LW-1:0]      own_raddr,
  input  logic [QW-1:0]      own_rspin,
  output logic               bank_we,
  output logic [LW-1:0]      bank_waddr,
  output logic [QW-1:0]      bank_wspin,
  // global cluster-count update
  output logic               cnt_inc_v,
  output logic [QW-1:0]      cnt_inc_c,
  output logic               cnt_dec_v,
  output logic [QW-1:0]      cnt_dec_c,
  output logic               flip
);
  import potts_pkg::*;

  // ---------------- stage 1: graph fetch ----------------
  logic          s1_v;
  logic [LW-1:0] s1_idx;

  assign rom_en   = issue;
  assign rom_addr = node_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v   <= 1'b0;
      s1_idx <= '0;
    end else begin
      s1_v   <= issue;
      s1_idx <= node_idx;
    end
  end

  // ---------------- stage 2: state retrieval ----------------
  logic          s2_v;
  logic [LW-1:0] s2_idx;
  logic [QW-1:0] s2_cur;
  logic [QW-1:0] s2_spin [K];
  logic [WW-1:0] s2_w    [K];

  assign nbr_id    = rom_nid;
  assign own_raddr = s1_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v   <= 1'b0;
      s2_idx <= '0;
      s2_cur <= '0;
      for (int k = 0; k < K; k++) begin
        s2_spin[k] <= '0;
        s2_w[k]    <= '0;
      end
    end else begin
      s2_v   <= s1_v;
      s2_idx <= s1_idx;
      s2_cur <= own_rspin;
      for (int k = 0; k < K; k++) begin
        s2_spin[k] <= nbr_spin[k];
        s2_w[k]    <= rom_w[k];
      end
    end
  end

  // ---------------- stage 3: energy accumulation ----------------
  logic [EW-1:0] e_int [Q];
  logic          s3_v;
  logic [LW-1:0] s3_idx;
  logic [QW-1:0] s3_cur;
  logic [EW-1:0] s3_e [Q];

  energy_accum #(.K(K), .Q(Q), .WW(WW)) u_accum (
    .nbr_spin(s2_spin), .nbr_w(s2_w), .e_int(e_int)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s3_v   <= 1'b0;
      s3_idx <= '0;
      s3_cur <= '0;
      for (int c = 0; c < Q; c++) s3_e[c] <= '0;
    end else begin
      s3_v   <= s2_v;
      s3_idx <= s2_idx;
      s3_cur <= s2_cur;
      for (int c = 0; c < Q; c++) s3_e[c] <= e_int[c];
    end
  end

  // ---------------- stage 4: update logic ----------------
  logic [QW-1:0] best;
  dh_t           best_dh;
  logic          want_flip;

  update_logic #(.Q(Q), .EW(EW), .CW(CW), .GW(GW)) u_update (
    .e_int(s3_e), .cur(s3_cur), .counts(counts), .gamma(gamma),
    .best(best), .best_dh(best_dh), .flip(want_flip)
  );

  // ---------------- initialisation spins ----------------
  logic [QW-1:0] rnd_spin;

  spin_init_rng #(.Q(Q), .PE_ID(PE_ID)) u_rng (
    .clk, .rst_n, .load(seed_load), .seed, .step(init_we), .spin(rnd_spin)
  );

  // ---------------- write-back and count update ----------------
  assign flip       = s3_v && want_flip;
  assign bank_we    = init_we || flip;
  assign bank_waddr = init_we ? node_idx : s3_idx;
  assign bank_wspin = init_we ? rnd_spin : best;
  assign cnt_inc_v  = bank_we;
  assign cnt_inc_c  = bank_wspin;
  assign cnt_dec_v  = flip;
  assign cnt_dec_c  = s3_cur;

  // Initialisation and solving never overlap.
  init_vs_run: assert property (@(posedge clk) disable iff (!rst_n) !(init_we && (issue || s3_v)));
  // A flip always lowers the energy.
  flip_lowers: assert property (@(posedge clk) disable iff (!rst_n) flip |-> (best_dh < 0));

endmodule
