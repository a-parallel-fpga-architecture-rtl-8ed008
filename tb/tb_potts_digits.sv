// tb_potts_digits: the solver configured for the handwritten-digits setting
// (10 clusters, 30 neighbours, gamma 10) on a synthetic stand-in: 10 Gaussian
// blobs, 2048 nodes (the nearest size with N/P a power of two to 1797), 32 PEs.
// Exercises a cluster count that is not a power of two (4-bit labels). See
// potts_tb_body.svh for what is generated and checked.
module tb_potts_digits;
  localparam int N = 2048, P = 32, K = 30, Q = 10, WW = 8, GW = 8;
  localparam int SPREAD = 250, GAMMA = 10;
  localparam real RADIUS = 3000.0;
  localparam real SIGMA = 1000.0;
  // From random labels the greedy rule leaves several of the ten blobs split
  // (a fixed point, checked); the floor only guards against a regression.
  localparam real ARI_MIN = 0.4;

  `include "potts_tb_body.svh"

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  potts_top #(.N(N), .P(P), .K(K), .Q(Q), .WW(WW), .GW(GW)) dut (.*);
endmodule
