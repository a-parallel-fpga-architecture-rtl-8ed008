// spin_init_rng: pseudo-random initial cluster label for each node of one PE.
//
// A 16-bit Galois LFSR (polynomial x^16 + x^14 + x^13 + x^11 + 1, taps 0xB400)
// is loaded with seed XOR a per-PE constant on `load` and advances once per
// cycle while `step` is high. The label is the 16-bit state reduced modulo Q.
// The kind of generator is this design's choice: the initial spins only need
// to be spread over the clusters, not to be of high statistical quality.
module spin_init_rng #(
  parameter int unsigned Q     = potts_pkg::DEF_Q,
  parameter int unsigned PE_ID = 0,
  localparam int unsigned QW   = $clog2(Q)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [15:0]   seed,
  input  logic          step,
  output logic [QW-1:0] spin
);

  localparam logic [15:0] SALT = 16'(PE_ID * 40503 + 1);

  logic [15:0] state, seeded;

  always_comb begin
    seeded = seed ^ SALT;
    if (seeded == 16'h0) seeded = 16'h1;  // the all-zero state is a lock-up
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= 16'h1;
    else if (load)  state <= seeded;
    else if (step)  state <= state[0] ? ((state >> 1) ^ 16'hB400) : (state >> 1);
  end

  assign spin = QW'(state % 16'(Q));

endmodule
