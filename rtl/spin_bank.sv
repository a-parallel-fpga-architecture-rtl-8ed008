// spin_bank: bank i of the interleaved spin memory.
//
// Holds the spins (cluster labels) of the NPP contiguous nodes owned by PE i.
// Only PE i writes it (one write port, so there are never write conflicts);
// every PE reads it through the read interconnect. Because each PE gathers
// all K neighbour spins of a node in one cycle, the bank is a register file:
// its whole contents are presented on `contents` for the interconnect, and a
// separate combinational port gives the PE the current spin of its own node.
// Writes take effect at the rising edge. Reset clears all spins to 0.
module spin_bank #(
  parameter int unsigned NPP = potts_pkg::DEF_N / potts_pkg::DEF_P,
  parameter int unsigned Q   = potts_pkg::DEF_Q,
  localparam int unsigned LW = $clog2(NPP),
  localparam int unsigned QW = $clog2(Q)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    we,
  input  logic [LW-1:0]           waddr,
  input  logic [QW-1:0]           wspin,
  input  logic [LW-1:0]           raddr,
  output logic [QW-1:0]           rspin,
  output logic [NPP-1:0][QW-1:0]  contents
);

  logic [NPP-1:0][QW-1:0] spins;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  spins <= '0;
    else if (we) spins[waddr] <= wspin;
  end

  assign rspin    = spins[raddr];
  assign contents = spins;

  wspin_legal: assert property (@(posedge clk) disable iff (!rst_n) we |-> (int'(wspin) < Q));

endmodule
