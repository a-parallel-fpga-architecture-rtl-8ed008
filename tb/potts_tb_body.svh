// potts_tb_body.svh: end-to-end test body shared by tb_potts_top (reduced
// size) and tb_potts_top_full (default size). The including module defines
// localparams N, P, K, Q, WW, GW, GAMMA, RADIUS, SPREAD, SIGMA and instantiates potts_top as
// `dut` on the signals declared here.
//
// Workload: Q Gaussian blobs in the plane (centres evenly on a circle of radius
// RADIUS, per-axis noise the sum of 12 uniforms, so about SPREAD standard
// deviation), N points with random ground-truth labels, so every cluster is
// spread over all PEs. The testbench builds the K-nearest-neighbour graph by
// brute force and quantises the Gaussian kernel exp(-d^2 / 2 SIGMA^2) to
// 8-bit weights (minimum 1), then:
//   run 1  gamma GAMMA, no limit: must end converged (early exit); the result
//          is read back through the host port and checked to be a true fixed
//          point of the update rule (no node has a negative-dH move given the
//          final labels and counts), the counts must equal the label
//          histogram, the epoch timing must be N/P + 4 cycles per epoch, and
//          the adjusted Rand index against the ground truth is reported.
//   run 2  same graph, other seed, max_iter 1: must stop after one epoch
//          unconverged (iteration limit).
// During run 1 the testbench tries a graph write, which must be dropped.
// Mechanism counters: early exits, limit stops, dropped writes, epochs with
// flips, init phases; each must have happened at least once.

  localparam int NPP = N / P;
  localparam int IDW = $clog2(N), QW = $clog2(Q), CW = $clog2(N + 1);

  logic clk = 0, rst_n = 0;
  logic graph_we = 0, graph_dropped;
  logic [IDW-1:0] graph_node = '0;
  logic [IDW-1:0] graph_nid [K];
  logic [WW-1:0]  graph_w   [K];
  logic [GW-1:0]  gamma = GW'(GAMMA);
  logic [15:0]    max_iter = '0, seed = 16'h5EED;
  logic           start = 0, busy, done, converged;
  logic [15:0]    epoch_count;
  potts_pkg::ctrl_state_e phase;
  logic [CW-1:0]  epoch_flips;
  logic [CW-1:0]  last_epoch_flips;
  logic [CW-1:0]  cluster_size [Q];
  logic [IDW-1:0] rd_node = '0;
  logic [QW-1:0]  rd_spin;

  int checks = 0, failures = 0;
  int truth [N];
  int px [N];
  int py [N];
  int nb_id [N][K];
  int nb_w [N][K];
  int label [N];
  int n_drain = 0, n_early = 0, n_limit = 0, n_dropped = 0, n_flip_epochs = 0, n_init = 0;

  always #5 clk = ~clk;

  task automatic expect_eq(input string tag, input longint got, input longint exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", tag, got, exp); end
  endtask

  function automatic int gauss(input int sd);
    int s = 0;
    for (int i = 0; i < 12; i++) s += $urandom_range(2000);
    return ((s - 12000) * sd) / 2000;
  endfunction

  task automatic make_graph();
    longint key [];
    key = new[N];
    for (int i = 0; i < N; i++) begin
      real ang;
      truth[i] = $urandom_range(Q - 1);
      ang = 6.283185307 * truth[i] / Q;
      px[i] = int'(RADIUS * $cos(ang)) + gauss(SPREAD);
      py[i] = int'(RADIUS * $sin(ang)) + gauss(SPREAD);
    end
    for (int i = 0; i < N; i++) begin
      for (int j = 0; j < N; j++) begin
        longint dx, dy, d2;
        dx = px[i] - px[j]; dy = py[i] - py[j];
        d2 = (j == i) ? 64'h0FFF_FFFF_FFFF : dx * dx + dy * dy;
        key[j] = (d2 << 16) | longint'(j);
      end
      key.sort();
      for (int k = 0; k < K; k++) begin
        real d2r, w;
        nb_id[i][k] = int'(key[k] & 64'hFFFF);
        d2r = real'(key[k] >> 16);
        w = 255.0 * $exp(-d2r / (2.0 * SIGMA * SIGMA));
        nb_w[i][k] = (int'(w) < 1) ? 1 : int'(w);
      end
    end
  endtask

  task automatic load_graph();
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      graph_we = 1; graph_node = IDW'(i);
      for (int k = 0; k < K; k++) begin
        graph_nid[k] = IDW'(nb_id[i][k]);
        graph_w[k]   = WW'(nb_w[i][k]);
      end
    end
    @(negedge clk); graph_we = 0;
  endtask

  // Start a solve and wait for done; returns cycles from start to done.
  task automatic run_solve(input int limit, input int sd, input bit try_write, output int cycles);
    int c = 0;
    max_iter = 16'(limit); seed = 16'(sd);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    n_init++;
    while (!done) begin
      c++;
      if (try_write && c == NPP + 10) begin
        graph_we = 1; graph_node = '0;
        for (int k = 0; k < K; k++) begin graph_nid[k] = '0; graph_w[k] = '0; end
        #1;
        if (graph_dropped) n_dropped++;
      end else begin
        graph_we = 0;
      end
      if (phase == potts_pkg::ST_DRAIN) n_drain++;
      @(negedge clk);
      if (c > 200000) begin failures++; $display("FAIL run_solve did not finish"); break; end
    end
    graph_we = 0;
    cycles = c;
  endtask

  task automatic read_back();
    for (int i = 0; i < N; i++) begin
      rd_node = IDW'(i);
      @(negedge clk);
      label[i] = int'(rd_spin);
    end
  endtask

  function automatic longint choose2(input longint x);
    return x * (x - 1) / 2;
  endfunction

  initial begin
    int cycles, bad, hist [Q], cont [Q][Q];
    real ari, sum_ij, sum_a, sum_b, expv, maxv;
    for (int k = 0; k < K; k++) begin graph_nid[k] = '0; graph_w[k] = '0; end
    make_graph();
    #12 rst_n = 1;
    load_graph();

    // ---- run 1: free run until convergence ----
    run_solve(0, 16'h5EED, 1'b1, cycles);
    $display("run 1: %0d epochs, %0d cycles, converged=%0d", epoch_count, cycles, converged);
    if (converged) n_early++;
    if (epoch_count > 1) n_flip_epochs++;
    expect_eq("run 1 converged", converged, 1);
    expect_eq("run 1 cycles", cycles, NPP + int'(epoch_count) * (NPP + 4));
    expect_eq("run 1 drain cycles", n_drain, 4 * int'(epoch_count));
    read_back();
    for (int c = 0; c < Q; c++) hist[c] = 0;
    for (int i = 0; i < N; i++) hist[label[i]]++;
    for (int c = 0; c < Q; c++) expect_eq($sformatf("count %0d", c), cluster_size[c], hist[c]);
    // fixed point of the update rule
    bad = 0;
    for (int i = 0; i < N; i++) begin
      longint e [Q];
      int a;
      for (int c = 0; c < Q; c++) e[c] = 0;
      for (int k = 0; k < K; k++) e[label[nb_id[i][k]]] += nb_w[i][k];
      a = label[i];
      for (int c = 0; c < Q; c++) if (c != a) begin
        longint dh;
        dh = e[a] - e[c] + 2 * longint'(gamma) * (hist[c] - hist[a] + 1);
        if (dh < 0) bad++;
      end
    end
    expect_eq("nodes with an improving move", bad, 0);
    // adjusted Rand index against the ground truth
    for (int a = 0; a < Q; a++) for (int b = 0; b < Q; b++) cont[a][b] = 0;
    for (int i = 0; i < N; i++) cont[truth[i]][label[i]]++;
    sum_ij = 0; sum_a = 0; sum_b = 0;
    for (int a = 0; a < Q; a++) begin
      int ra, cb;
      ra = 0; cb = 0;
      for (int b = 0; b < Q; b++) begin
        sum_ij += real'(choose2(cont[a][b]));
        ra += cont[a][b];
        cb += cont[b][a];
      end
      sum_a += real'(choose2(ra));
      sum_b += real'(choose2(cb));
    end
    expv = sum_a * sum_b / real'(choose2(N));
    maxv = (sum_a + sum_b) / 2.0;
    ari = (sum_ij - expv) / (maxv - expv);
    for (int a = 0; a < Q; a++) begin
      string row;
      row = "";
      for (int b = 0; b < Q; b++) row = {row, $sformatf(" %0d", cont[a][b])};
      $display("truth cluster %0d -> labels:%s", a, row);
    end
    $display("run 1: ARI %0.4f", ari);
    checks++;
    if (ari < ARI_MIN) begin failures++; $display("FAIL ARI %0.4f below %0.2f", ari, ARI_MIN); end

    // ---- run 2: iteration limit ----
    run_solve(1, 16'hBEEF, 1'b0, cycles);
    if (!converged && epoch_count == 1) n_limit++;
    expect_eq("run 2 stopped after one epoch", epoch_count, 1);
    expect_eq("run 2 not converged", converged, 0);
    expect_eq("run 2 flips in epoch", last_epoch_flips > 0, 1);
    if (last_epoch_flips > 0) n_flip_epochs++;
    expect_eq("run 2 cycles", cycles, NPP + (NPP + 4));

    $display("mechanisms: init=%0d early_exit=%0d iter_limit=%0d dropped_write=%0d flip_epochs=%0d",
             n_init, n_early, n_limit, n_dropped, n_flip_epochs);
    if (n_init == 0 || n_early == 0 || n_limit == 0 || n_dropped == 0 || n_flip_epochs == 0) begin
      failures++; $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
