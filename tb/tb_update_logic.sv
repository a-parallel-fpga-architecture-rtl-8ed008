// tb_update_logic: self-checking test of the stage-4 minimum-dH decision.
// The reference evaluates, for every candidate, the change of the full
// Hamiltonian  -sum J delta + gamma * sum_k (n_k - N/q)^2  when the node moves
// (interaction energy from E_int, balance term from the squared counts before
// and after the move) and takes the first strict minimum; a flip is expected
// only for a negative minimum. Directed cases cover a pure balance move, a
// tie and a node that must stay; the rest are random.
module tb_update_logic;
  localparam int Q = 4, EW = 15, CW = 13, GW = 8, QW = 2, NN = 4096;
  logic [EW-1:0] e_int [Q];
  logic [QW-1:0] cur, best;
  logic [CW-1:0] counts [Q];
  logic [GW-1:0] gamma;
  potts_pkg::dh_t best_dh;
  logic flip;
  int checks = 0, failures = 0;

  update_logic #(.Q(Q), .EW(EW), .CW(CW), .GW(GW)) dut (.*);

  // Energy of the balance term times 4 (N/q exact for N = 4096, q = 4).
  function automatic longint bal(input longint n [Q]);
    longint s = 0;
    for (int k = 0; k < Q; k++) s += (n[k] - NN / Q) * (n[k] - NN / Q);
    return s;
  endfunction

  task automatic check(input string tag);
    longint dh [Q];
    longint n0 [Q];
    longint n1 [Q];
    longint bdh;
    int b;
    for (int k = 0; k < Q; k++) n0[k] = counts[k];
    for (int c = 0; c < Q; c++) begin
      n1 = n0;
      if (c != cur) begin n1[cur]--; n1[c]++; end
      dh[c] = -(longint'(e_int[c]) - longint'(e_int[cur])) + longint'(gamma) * (bal(n1) - bal(n0));
    end
    b = cur; bdh = 0;
    for (int c = 0; c < Q; c++) if (dh[c] < bdh) begin b = c; bdh = dh[c]; end
    #1;
    checks += 3;
    if (int'(best) != b)       begin failures++; $display("FAIL %s best %0d exp %0d", tag, best, b); end
    if (longint'(best_dh) != bdh) begin failures++; $display("FAIL %s dh %0d exp %0d", tag, best_dh, bdh); end
    if (flip != (b != int'(cur))) begin failures++; $display("FAIL %s flip %0d", tag, flip); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // pure balance move: all interaction equal, cluster 0 oversized
    gamma = 20; cur = 0;
    e_int = '{100, 100, 100, 100};
    counts = '{1300, 1000, 900, 896};
    check("balance");
    checks++; if (best != 3) begin failures++; $display("FAIL balance expected cluster 3"); end
    // tie between clusters 1 and 3: the lower index wins
    e_int = '{0, 500, 0, 500}; counts = '{1024, 1024, 1024, 1024};
    check("tie");
    checks++; if (best != 1) begin failures++; $display("FAIL tie expected cluster 1"); end
    // staying is best: strong own cluster
    cur = 3; e_int = '{10, 20, 30, 3000}; counts = '{1020, 1020, 1020, 1036};
    check("stay");
    checks++; if (flip) begin failures++; $display("FAIL stay flipped"); end
    // zero-gain move must not flip (dH == 0)
    cur = 0; gamma = 0; e_int = '{50, 50, 10, 10}; counts = '{1, 2, 3, 4090};
    check("zero");
    checks++; if (flip) begin failures++; $display("FAIL zero-gain flipped"); end
    for (int t = 0; t < 3000; t++) begin
      int left;
      cur = QW'($urandom);
      gamma = (t % 3 == 0) ? 8'd20 : GW'($urandom);
      for (int c = 0; c < Q; c++) e_int[c] = EW'($urandom_range(30600));
      left = NN;
      for (int c = 0; c < Q - 1; c++) begin
        counts[c] = CW'($urandom_range(left));
        left -= int'(counts[c]);
      end
      counts[Q-1] = CW'(left);
      if (counts[cur] == 0) counts[cur] = 1;  // the node itself is in its cluster
      check($sformatf("rand%0d", t));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
