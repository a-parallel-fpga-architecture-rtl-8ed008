// global_controller: three-phase FSM that sequences the SIMD solver.
//
//   IDLE  --start-->  INIT: counts cleared and RNGs seeded on the start edge;
//         then NPP cycles in which every PE writes a random spin to node
//         0..NPP-1 of its bank (init_we) while the counter tallies them.
//   RUN:  one epoch: node indices 0..NPP-1 are broadcast to all PEs, one per
//         cycle (issue/node_idx).
//   DRAIN: PIPE_LAT cycles in which the last nodes leave the pipeline. On the
//         last drain cycle the flips of the epoch (summed over all PEs) are
//         complete: zero flips ends the run as converged (early exit);
//         otherwise reaching max_iter epochs ends it unconverged; otherwise the
//         next epoch starts.
//   DONE: done is high until the next start.
// An epoch therefore takes NPP + PIPE_LAT cycles and initialisation NPP
// cycles. max_iter = 0 means no iteration limit. Draining between epochs,
// the limit encoding and the exact cycle counts are this design's choices.
module global_controller #(
  parameter int unsigned N  = potts_pkg::DEF_N,
  parameter int unsigned P  = potts_pkg::DEF_P,
  localparam int unsigned NPP = N / P,
  localparam int unsigned LW  = $clog2(NPP),
  localparam int unsigned FW  = $clog2(N + 1)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [15:0]            max_iter,
  input  logic [P-1:0]           flip,
  output potts_pkg::ctrl_state_e state,
  output logic                   busy,
  output logic                   done,
  output logic                   converged,
  output logic                   seed_load,
  output logic                   clr_counts,
  output logic                   init_we,
  output logic                   issue,
  output logic [LW-1:0]          node_idx,
  output logic [15:0]            epoch_count,
  output logic [FW-1:0]          epoch_flips,
  output logic [FW-1:0]          last_epoch_flips
);
  import potts_pkg::*;

  localparam int unsigned PW = $clog2(P + 1);

  logic [LW-1:0] idx;
  logic [2:0]    drain_cnt;
  logic [PW-1:0] flips_now;
  logic          launch, last_node, decide;

  always_comb begin
    flips_now = '0;
    for (int p = 0; p < P; p++) flips_now = flips_now + PW'(flip[p]);
  end

  assign launch    = start && (state == ST_IDLE || state == ST_DONE);
  assign last_node = (idx == LW'(NPP - 1));
  assign decide    = (state == ST_DRAIN) && (drain_cnt == 3'(PIPE_LAT - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= ST_IDLE;
      idx              <= '0;
      drain_cnt        <= '0;
      epoch_count      <= '0;
      epoch_flips      <= '0;
      last_epoch_flips <= '0;
      converged        <= 1'b0;
    end else begin
      epoch_flips <= epoch_flips + FW'(flips_now);
      unique case (state)
        ST_IDLE, ST_DONE: begin
          if (launch) begin
            state       <= ST_INIT;
            idx         <= '0;
            epoch_count <= '0;
            epoch_flips <= '0;
            converged   <= 1'b0;
          end
        end
        ST_INIT: begin
          idx <= idx + 1'b1;
          if (last_node) begin
            state <= ST_RUN;
            idx   <= '0;
          end
        end
        ST_RUN: begin
          idx <= idx + 1'b1;
          if (last_node) begin
            state     <= ST_DRAIN;
            idx       <= '0;
            drain_cnt <= '0;
          end
        end
        ST_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (decide) begin
            epoch_count      <= epoch_count + 1'b1;
            last_epoch_flips <= epoch_flips;
            epoch_flips      <= '0;
            if (epoch_flips == '0) begin
              state     <= ST_DONE;
              converged <= 1'b1;
            end else if (max_iter != 16'd0 && epoch_count + 16'd1 >= max_iter) begin
              state <= ST_DONE;
            end else begin
              state <= ST_RUN;
            end
          end
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign busy       = (state == ST_INIT) || (state == ST_RUN) || (state == ST_DRAIN);
  assign done       = (state == ST_DONE);
  assign seed_load  = launch;
  assign clr_counts = launch;
  assign init_we    = (state == ST_INIT);
  assign issue      = (state == ST_RUN);
  assign node_idx   = idx;

  // Flips can only come from nodes in the pipeline.
  no_idle_flips: assert property (@(posedge clk) disable iff (!rst_n)
    (state == ST_IDLE || state == ST_DONE || state == ST_INIT) |-> flip == '0);

endmodule
