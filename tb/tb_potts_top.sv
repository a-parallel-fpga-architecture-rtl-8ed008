// tb_potts_top: end-to-end test of the solver at reduced size
// (512 nodes, 8 PEs, 24 neighbours, 4 clusters); see potts_tb_body.svh.
module tb_potts_top;
  localparam int N = 512, P = 8, K = 48, Q = 4, WW = 8, GW = 8;
  localparam int SPREAD = 250, GAMMA = 20;
  localparam real RADIUS = 1000.0;
  localparam real SIGMA = 400.0;
  localparam real ARI_MIN = 0.9;

  `include "potts_tb_body.svh"

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  potts_top #(.N(N), .P(P), .K(K), .Q(Q), .WW(WW), .GW(GW)) dut (.*);
endmodule
