// tb_graph_rom: self-checking test of the graph ROM slice.
// Writes random neighbour rows to every address, reads them back in random
// order and checks the one-cycle read latency and the data against a copy
// kept in the testbench. Also checks that rd_en low holds the last output.
module tb_graph_rom;
  localparam int NPP = 16, K = 5, IDW = 9, WW = 8, LW = $clog2(NPP);
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [LW-1:0] wr_addr = '0, rd_addr = '0;
  logic [IDW-1:0] wr_nid [K], rd_nid [K];
  logic [WW-1:0]  wr_w [K], rd_w [K];
  logic [IDW-1:0] m_nid [NPP][K];
  logic [WW-1:0]  m_w [NPP][K];
  int checks = 0, failures = 0;

  graph_rom #(.NPP(NPP), .K(K), .IDW(IDW), .WW(WW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_row(input int a);
    for (int k = 0; k < K; k++) begin
      checks++;
      if (rd_nid[k] !== m_nid[a][k] || rd_w[k] !== m_w[a][k]) begin
        failures++;
        $display("FAIL addr %0d slot %0d: got %0d/%0d exp %0d/%0d", a, k, rd_nid[k], rd_w[k], m_nid[a][k], m_w[a][k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < K; k++) begin wr_nid[k] = '0; wr_w[k] = '0; end
    @(negedge clk);
    for (int a = 0; a < NPP; a++) begin
      wr_en = 1; wr_addr = LW'(a);
      for (int k = 0; k < K; k++) begin
        wr_nid[k] = IDW'($urandom); wr_w[k] = WW'($urandom);
        m_nid[a][k] = wr_nid[k]; m_w[a][k] = wr_w[k];
      end
      @(negedge clk);
    end
    wr_en = 0;
    for (int i = 0; i < 60; i++) begin
      int a;
      a = $urandom_range(NPP - 1);
      rd_en = 1; rd_addr = LW'(a);
      @(negedge clk);
      check_row(a);
      // hold: output must not change while rd_en is low
      rd_en = 0; rd_addr = LW'(a + 1);
      @(negedge clk);
      check_row(a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
