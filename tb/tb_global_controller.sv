// tb_global_controller: self-checking test of the solver FSM.
// The testbench plays the PEs: whenever it wants an epoch to count as
// "changed", it raises one flip exactly three cycles after the last node of
// the epoch was issued, the latest a real PE pipeline can flip, so the drain
// window is checked. Checked: init writes cover nodes 0..NPP-1 once, each
// epoch issues 0..NPP-1 in order, the epoch length is NPP + 4 cycles, early
// exit after the first epoch without flips (converged), the max_iter limit
// (not converged), flip totals, and restart from DONE.
module tb_global_controller;
  import potts_pkg::*;
  localparam int N = 64, P = 4, NPP = N / P, LW = $clog2(NPP), FW = $clog2(N + 1);
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] max_iter = '0;
  logic [P-1:0] flip = '0;
  ctrl_state_e state;
  logic busy, done, converged, seed_load, clr_counts, init_we, issue;
  logic [LW-1:0] node_idx;
  logic [15:0] epoch_count;
  logic [FW-1:0] epoch_flips, last_epoch_flips;
  int checks = 0, failures = 0;

  global_controller #(.N(N), .P(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string tag, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", tag, got, exp); end
  endtask

  // Run one solve. changed_epochs: number of leading epochs that see flips
  // (flips_per on each). Returns cycles from start to done.
  task automatic run(input int limit, input int changed_epochs, input int flips_per,
                     output int cycles, output int epochs_seen);
    int inits, issues, expect_idx, pending, epoch, ep_start, last_issue_cyc, cyc;
    inits = 0; issues = 0; expect_idx = 0; pending = -1; epoch = 0; cyc = 0;
    ep_start = -1;
    max_iter = 16'(limit);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    expect_eq("clr/seed on start edge leaves INIT", int'(state), int'(ST_INIT));
    while (!done) begin
      cyc++;
      flip = '0;
      if (pending == 0) begin
        flip = '0;
        for (int p = 0; p < flips_per; p++) flip[p] = 1'b1;
      end
      if (pending >= 0) pending--;
      if (init_we) begin
        expect_eq("init index", int'(node_idx), inits);
        inits++;
      end
      if (issue) begin
        if (node_idx == 0) begin
          if (ep_start >= 0) expect_eq("epoch length", cyc - ep_start, NPP + PIPE_LAT);
          ep_start = cyc;
        end
        expect_eq("issue index", int'(node_idx), expect_idx);
        expect_idx = (expect_idx + 1) % NPP;
        issues++;
        if (node_idx == LW'(NPP - 1)) begin
          if (epoch < changed_epochs) pending = 2;
          epoch++;
        end
      end
      @(negedge clk);
      if (cyc > 5000) break;
    end
    flip = '0;
    expect_eq("init writes", inits, NPP);
    expect_eq("issues", issues, epoch * NPP);
    cycles = cyc;
    epochs_seen = epoch;
  endtask

  initial begin
    int cycles, epochs;
    #12 rst_n = 1;
    @(negedge clk);
    expect_eq("idle after reset", int'(state), int'(ST_IDLE));
    expect_eq("not busy", int'(busy), 0);
    // 1) three changing epochs, then a quiet one: early exit after epoch 4
    run(0, 3, 2, cycles, epochs);
    expect_eq("early exit epochs", epochs, 4);
    expect_eq("early exit epoch_count", int'(epoch_count), 4);
    expect_eq("early exit converged", int'(converged), 1);
    expect_eq("early exit total cycles", cycles, NPP + 4 * (NPP + PIPE_LAT));
    expect_eq("quiet last epoch", int'(last_epoch_flips), 0);
    // 2) always changing, limit 3: stops unconverged
    run(3, 100, 3, cycles, epochs);
    expect_eq("limit epochs", epochs, 3);
    expect_eq("limit epoch_count", int'(epoch_count), 3);
    expect_eq("limit not converged", int'(converged), 0);
    expect_eq("limit last flips", int'(last_epoch_flips), 3);
    // 3) converges at once
    run(5, 0, 0, cycles, epochs);
    expect_eq("immediate epochs", epochs, 1);
    expect_eq("immediate converged", int'(converged), 1);
    // done holds
    repeat (5) @(negedge clk);
    expect_eq("done holds", int'(done), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
