// spin_read_xbar: shared read interconnect from all spin banks to all PEs.
//
// Every PE presents the K global neighbour IDs of the node it is processing.
// With contiguous partitioning node id lives in bank id / NPP at offset
// id % NPP; NPP is a power of two, so the upper ID bits pick the bank and the
// lower bits the entry. The interconnect is purely combinational; the PE
// registers its output at the end of pipeline stage 2 (state retrieval).
module spin_read_xbar #(
  parameter int unsigned P   = potts_pkg::DEF_P,
  parameter int unsigned NPP = potts_pkg::DEF_N / potts_pkg::DEF_P,
  parameter int unsigned K   = potts_pkg::DEF_K,
  parameter int unsigned Q   = potts_pkg::DEF_Q,
  localparam int unsigned LW  = $clog2(NPP),
  localparam int unsigned BW  = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned IDW = $clog2(P * NPP),
  localparam int unsigned QW  = $clog2(Q)
) (
  input  logic [P-1:0][NPP-1:0][QW-1:0] bank_contents,
  input  logic [IDW-1:0]                req_id   [P][K],
  output logic [QW-1:0]                 rsp_spin [P][K]
);

  if ((1 << LW) != NPP) begin : g_bad_npp
    $error("spin_read_xbar: nodes per bank must be a power of two");
  end

  always_comb begin
    for (int p = 0; p < P; p++) begin
      for (int k = 0; k < K; k++) begin
        logic [BW-1:0] bank;
        logic [LW-1:0] off;
        bank = BW'(req_id[p][k] >> LW);
        off  = req_id[p][k][LW-1:0];
        rsp_spin[p][k] = bank_contents[bank][off];
      end
    end
  end

endmodule
