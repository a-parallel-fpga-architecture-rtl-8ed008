// tb_host_interface: self-checking test of the host link.
// Checks that a graph-row write selects exactly the graph ROM slice of the
// PE owning the node (node / NPP) at row node % NPP, that writes while the
// solver is busy are dropped and flagged, and that the result read-back
// returns the label of the requested node one cycle later.
module tb_host_interface;
  localparam int N = 64, P = 4, Q = 4, NPP = N / P, LW = $clog2(NPP), IDW = $clog2(N), QW = 2;
  logic clk = 0, rst_n = 0, busy = 0, graph_we = 0, graph_dropped;
  logic [IDW-1:0] graph_node = '0, rd_node = '0;
  logic [P-1:0] rom_we;
  logic [LW-1:0] rom_waddr;
  logic [P-1:0][NPP-1:0][QW-1:0] bank_contents;
  logic [QW-1:0] rd_spin;
  int checks = 0, failures = 0;

  host_interface #(.N(N), .P(P), .Q(Q)) dut (.*);

  always #5 clk = ~clk;

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

  initial begin
    for (int n = 0; n < N; n++) bank_contents[n / NPP][n % NPP] = QW'($urandom);
    #12 rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      int node, rn;
      @(negedge clk);
      node = $urandom_range(N - 1);
      rn = $urandom_range(N - 1);
      graph_we = ($urandom_range(3) != 0);
      busy = ($urandom_range(3) == 0);
      graph_node = IDW'(node);
      rd_node = IDW'(rn);
      #1;
      expect_eq("rom_we", int'(rom_we), (graph_we && !busy) ? (1 << (node / NPP)) : 0);
      if (graph_we && !busy) expect_eq("rom_waddr", int'(rom_waddr), node % NPP);
      expect_eq("dropped", int'(graph_dropped), int'(graph_we && busy));
      @(negedge clk);
      expect_eq("rd_spin", int'(rd_spin), int'(bank_contents[rn / NPP][rn % NPP]));
      if (t % 50 == 0) for (int n = 0; n < N; n++) bank_contents[n / NPP][n % NPP] = QW'($urandom);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
