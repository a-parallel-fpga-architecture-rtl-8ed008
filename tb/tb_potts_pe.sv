// tb_potts_pe: self-checking test of one processing element.
// The testbench provides the graph ROM (one-cycle read), the read interconnect
// (a flat array of all node spins), the PE's own bank and the cluster counts.
//  A. initialisation: every init write must carry the LFSR label for its node
//     and be reported to the counter as a gain.
//  B. back-to-back epoch: one node per cycle, neighbours only in other banks
//     and fixed counts, so each node's outcome is known in advance; each flip
//     must arrive exactly three cycles after its issue, with the right
//     cluster, bank address and gain/loss report, and nothing else may flip.
//  C. spaced issues with neighbours anywhere (own bank included) and counts
//     that follow the PE's reports: each outcome is recomputed at issue.
module tb_potts_pe;
  import potts_pkg::*;
  localparam int N = 64, P = 4, K = 6, Q = 4, WW = 8, GW = 8, PE_ID = 1;
  localparam int NPP = N / P, LW = $clog2(NPP), IDW = $clog2(N), QW = 2, CW = $clog2(N + 1);
  localparam int BASE = PE_ID * NPP;

  logic clk = 0, rst_n = 0;
  logic seed_load = 0, init_we = 0, issue = 0;
  logic [15:0] seed = 16'h1234;
  logic [LW-1:0] node_idx = '0;
  logic [GW-1:0] gamma = 8'd3;
  logic [CW-1:0] counts [Q];
  logic rom_en;
  logic [LW-1:0] rom_addr;
  logic [IDW-1:0] rom_nid [K];
  logic [WW-1:0] rom_w [K];
  logic [IDW-1:0] nbr_id [K];
  logic [QW-1:0] nbr_spin [K];
  logic [LW-1:0] own_raddr, bank_waddr;
  logic [QW-1:0] own_rspin, bank_wspin, cnt_inc_c, cnt_dec_c;
  logic bank_we, cnt_inc_v, cnt_dec_v, flip;

  // testbench-side memories
  logic [IDW-1:0] g_nid [NPP][K];
  logic [WW-1:0]  g_w [NPP][K];
  logic [QW-1:0]  spins [N];
  int             n_model [Q];
  int checks = 0, failures = 0, cyc = 0;

  potts_pe #(.N(N), .P(P), .K(K), .Q(Q), .WW(WW), .GW(GW), .PE_ID(PE_ID)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  // graph ROM model: registered read
  always_ff @(posedge clk) if (rom_en) for (int k = 0; k < K; k++) begin
    rom_nid[k] <= g_nid[rom_addr][k];
    rom_w[k]   <= g_w[rom_addr][k];
  end
  always_comb begin
    for (int k = 0; k < K; k++) nbr_spin[k] = spins[nbr_id[k]];
    own_rspin = spins[BASE + int'(own_raddr)];
    for (int c = 0; c < Q; c++) counts[c] = CW'(n_model[c]);
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string tag, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", tag, got, exp); end
  endtask

  // Reference decision for local node i from the testbench state.
  function automatic void decide(input int i, output bit f, output int b);
    int e [Q];
    int a, best_dh, dh;
    for (int c = 0; c < Q; c++) e[c] = 0;
    for (int k = 0; k < K; k++) e[spins[g_nid[i][k]]] += g_w[i][k];
    a = spins[BASE + i];
    b = a; best_dh = 0;
    for (int c = 0; c < Q; c++) if (c != a) begin
      dh = e[a] - e[c] + 2 * int'(gamma) * (n_model[c] - n_model[a] + 1);
      if (dh < best_dh) begin best_dh = dh; b = c; end
    end
    f = (b != a);
  endfunction

  function automatic logic [15:0] lfsr_next(input logic [15:0] s);
    return s[0] ? ((s >> 1) ^ 16'hB400) : (s >> 1);
  endfunction

  initial begin
    logic [15:0] r;
    bit exp_f [NPP];
    int exp_b [NPP];
    int seen;
    for (int n = 0; n < N; n++) spins[n] = QW'($urandom);
    for (int c = 0; c < Q; c++) n_model[c] = 0;
    for (int n = 0; n < N; n++) n_model[spins[n]]++;
    #12 rst_n = 1;
    // ---- A: initialisation ----
    @(negedge clk); seed_load = 1;
    @(negedge clk); seed_load = 0;
    r = seed ^ 16'(PE_ID * 40503 + 1);
    for (int i = 0; i < NPP; i++) begin
      init_we = 1; node_idx = LW'(i);
      #1;
      expect_eq("init we", int'(bank_we), 1);
      expect_eq("init addr", int'(bank_waddr), i);
      expect_eq("init spin", int'(bank_wspin), int'(r % 16'(Q)));
      expect_eq("init gain", int'(cnt_inc_v && !cnt_dec_v && cnt_inc_c == bank_wspin), 1);
      expect_eq("init no flip", int'(flip), 0);
      @(posedge clk);
      n_model[spins[BASE + i]]--; spins[BASE + i] = bank_wspin; n_model[bank_wspin]++;
      r = lfsr_next(r);
      @(negedge clk);
    end
    init_we = 0;
    // ---- B: back-to-back, neighbours outside the own bank ----
    for (int i = 0; i < NPP; i++)
      for (int k = 0; k < K; k++) begin
        int id;
        do id = $urandom_range(N - 1); while (id / NPP == PE_ID);
        g_nid[i][k] = IDW'(id);
        g_w[i][k] = WW'($urandom_range(255));
      end
    gamma = 8'd2;
    for (int i = 0; i < NPP; i++) decide(i, exp_f[i], exp_b[i]);
    seen = 0;
    fork
      begin
        for (int i = 0; i < NPP; i++) begin
          issue = 1; node_idx = LW'(i);
          @(negedge clk);
        end
        issue = 0;
      end
      begin
        // node i issued in cycle c0+i flips in cycle c0+i+3
        repeat (3) @(negedge clk);
        for (int i = 0; i < NPP; i++) begin
          expect_eq($sformatf("B flip node %0d", i), int'(flip), int'(exp_f[i]));
          expect_eq($sformatf("B we node %0d", i), int'(bank_we), int'(exp_f[i]));
          if (exp_f[i]) begin
            seen++;
            expect_eq("B addr", int'(bank_waddr), i);
            expect_eq("B spin", int'(bank_wspin), exp_b[i]);
            expect_eq("B gain", int'(cnt_inc_v) * 8 + int'(cnt_inc_c), 8 + exp_b[i]);
            expect_eq("B loss", int'(cnt_dec_v) * 8 + int'(cnt_dec_c), 8 + int'(spins[BASE + i]));
          end
          @(negedge clk);
        end
      end
    join
    // apply B's outcome to the model
    for (int i = 0; i < NPP; i++) if (exp_f[i]) begin
      n_model[spins[BASE + i]]--; n_model[exp_b[i]]++; spins[BASE + i] = QW'(exp_b[i]);
    end
    checks++;
    if (seen == 0) begin failures++; $display("FAIL B produced no flips"); end
    repeat (3) @(negedge clk);
    // ---- C: spaced issues, neighbours anywhere, counts follow the PE ----
    for (int i = 0; i < NPP; i++)
      for (int k = 0; k < K; k++) begin
        g_nid[i][k] = IDW'($urandom_range(N - 1));
        g_w[i][k] = WW'($urandom_range(255));
      end
    gamma = 8'd20;
    seen = 0;
    for (int t = 0; t < 60; t++) begin
      bit f;
      int b, i;
      i = $urandom_range(NPP - 1);
      decide(i, f, b);
      issue = 1; node_idx = LW'(i);
      @(negedge clk); issue = 0;
      repeat (2) @(negedge clk);
      expect_eq("C flip", int'(flip), int'(f));
      if (f) begin
        seen++;
        expect_eq("C spin", int'(bank_wspin), b);
        expect_eq("C addr", int'(bank_waddr), i);
        @(posedge clk);
        n_model[spins[BASE + i]]--; n_model[b]++; spins[BASE + i] = QW'(b);
      end
      @(negedge clk);
      // shuffle a few foreign spins so later decisions differ
      for (int j = 0; j < 4; j++) begin
        int n;
        do n = $urandom_range(N - 1); while (n / NPP == PE_ID);
        n_model[spins[n]]--; spins[n] = QW'($urandom); n_model[spins[n]]++;
      end
    end
    checks++;
    if (seen == 0) begin failures++; $display("FAIL C produced no flips"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
