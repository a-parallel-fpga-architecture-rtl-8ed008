// tb_potts_top_full: end-to-end test of the solver at its default size
// (4096 nodes, 32 PEs, 120 neighbours, 4 clusters, gamma 20): the Gaussian
// blobs workload; see potts_tb_body.svh for what is generated and checked.
module tb_potts_top_full;
  localparam int N = potts_pkg::DEF_N, P = potts_pkg::DEF_P, K = potts_pkg::DEF_K;
  localparam int Q = potts_pkg::DEF_Q, WW = potts_pkg::DEF_WW, GW = potts_pkg::DEF_GW;
  localparam int SPREAD = 250, GAMMA = 20;
  localparam real RADIUS = 1000.0;
  localparam real SIGMA = 150.0;
  localparam real ARI_MIN = 0.9;

  `include "potts_tb_body.svh"

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  potts_top dut (.*);
endmodule
