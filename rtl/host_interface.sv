// host_interface: the FPGA side of the link to the host CPU.
//
// Graph load: the host sends one node's neighbour list (K neighbour IDs and
// K integer weights) per cycle with graph_we; the node ID's upper bits select
// the PE whose graph ROM slice is written and the lower bits the row. Writes
// are ignored while the solver is busy, so the ROM stays read-only during a
// run. Result read-back: the host gives a node ID on rd_node and gets the
// node's cluster label on rd_spin one cycle later, from the spin banks.
// The document only names this block; word widths, one-row-per-cycle loading
// and the registered read-back are this design's choices.
module host_interface #(
  parameter int unsigned N  = potts_pkg::DEF_N,
  parameter int unsigned P  = potts_pkg::DEF_P,
  parameter int unsigned Q  = potts_pkg::DEF_Q,
  localparam int unsigned NPP = N / P,
  localparam int unsigned LW  = $clog2(NPP),
  localparam int unsigned IDW = $clog2(N),
  localparam int unsigned QW  = $clog2(Q)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         busy,
  // graph load from the host
  input  logic                         graph_we,
  input  logic [IDW-1:0]               graph_node,
  output logic [P-1:0]                 rom_we,
  output logic [LW-1:0]                rom_waddr,
  output logic                         graph_dropped,
  // result read-back
  input  logic [IDW-1:0]               rd_node,
  input  logic [P-1:0][NPP-1:0][QW-1:0] bank_contents,
  output logic [QW-1:0]                rd_spin
);

  localparam int unsigned BW = (P > 1) ? $clog2(P) : 1;

  logic [BW-1:0] wbank, rbank;

  assign wbank         = BW'(graph_node >> LW);
  assign rom_waddr     = graph_node[LW-1:0];
  assign graph_dropped = graph_we && busy;

  always_comb begin
    rom_we = '0;
    if (graph_we && !busy) rom_we[wbank] = 1'b1;
  end

  assign rbank = BW'(rd_node >> LW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_spin <= '0;
    else        rd_spin <= bank_contents[rbank][rd_node[LW-1:0]];
  end

endmodule
