// tb_cluster_counter: self-checking test of the global cluster counter.
// Drives random gain/loss reports from all PE ports (several PEs hitting the
// same cluster in one cycle included) and compares the registered counts with
// a testbench model after every edge; also checks that clr zeroes the counts.
module tb_cluster_counter;
  localparam int N = 256, P = 8, Q = 4, QW = 2, CW = $clog2(N + 1);
  logic clk = 0, rst_n = 0, clr = 0;
  logic [P-1:0] inc_v = '0, dec_v = '0;
  logic [QW-1:0] inc_c [P];
  logic [QW-1:0] dec_c [P];
  logic [CW-1:0] counts [Q];
  int model [Q];
  int checks = 0, failures = 0;

  cluster_counter #(.N(N), .P(P), .Q(Q)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(input string tag);
    for (int c = 0; c < Q; c++) begin
      checks++;
      if (int'(counts[c]) != model[c]) begin failures++; $display("FAIL %s n[%0d]=%0d exp %0d", tag, c, counts[c], model[c]); end
    end
  endtask

  initial begin
    for (int p = 0; p < P; p++) begin inc_c[p] = '0; dec_c[p] = '0; end
    for (int c = 0; c < Q; c++) model[c] = 0;
    #12 rst_n = 1;
    @(negedge clk); compare("reset");
    // fill: gains only, like initialisation
    for (int i = 0; i < N / P; i++) begin
      for (int p = 0; p < P; p++) begin
        inc_v[p] = 1'b1; inc_c[p] = (i < 4) ? 2'd2 : QW'($urandom);
        model[inc_c[p]]++;
      end
      @(negedge clk); compare("fill");
    end
    inc_v = '0;
    // moves: a node leaves one cluster and enters another
    for (int i = 0; i < 500; i++) begin
      for (int p = 0; p < P; p++) begin
        int a, b;
        a = $urandom_range(Q - 1);
        b = $urandom_range(Q - 1);
        if (model[a] > P && a != b && $urandom_range(1)) begin
          inc_v[p] = 1; inc_c[p] = QW'(b); dec_v[p] = 1; dec_c[p] = QW'(a);
          model[a]--; model[b]++;
        end else begin
          inc_v[p] = 0; dec_v[p] = 0; inc_c[p] = QW'(b); dec_c[p] = QW'(a);
        end
      end
      @(negedge clk); compare("move");
    end
    inc_v = '0; dec_v = '0;
    clr = 1; @(negedge clk); clr = 0;
    for (int c = 0; c < Q; c++) model[c] = 0;
    compare("clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
