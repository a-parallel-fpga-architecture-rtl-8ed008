// tb_spin_read_xbar: self-checking test of the bank read interconnect.
// Fills all banks with random spins, drives random global neighbour IDs for
// every PE port and checks each returned spin against the spin of that node
// in a flat node-indexed model (bank = id / NPP, offset = id % NPP).
module tb_spin_read_xbar;
  localparam int P = 4, NPP = 16, K = 6, Q = 4;
  localparam int N = P * NPP, IDW = $clog2(N), QW = $clog2(Q);
  logic [P-1:0][NPP-1:0][QW-1:0] bank_contents;
  logic [IDW-1:0] req_id [P][K];
  logic [QW-1:0] rsp_spin [P][K];
  logic [QW-1:0] flat [N];
  int checks = 0, failures = 0;

  spin_read_xbar #(.P(P), .NPP(NPP), .K(K), .Q(Q)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int trial = 0; trial < 50; trial++) begin
      for (int n = 0; n < N; n++) begin
        flat[n] = QW'($urandom);
        bank_contents[n / NPP][n % NPP] = flat[n];
      end
      for (int p = 0; p < P; p++)
        for (int k = 0; k < K; k++) req_id[p][k] = IDW'($urandom_range(N - 1));
      #1;
      for (int p = 0; p < P; p++)
        for (int k = 0; k < K; k++) begin
          checks++;
          if (rsp_spin[p][k] !== flat[req_id[p][k]]) begin
            failures++;
            $display("FAIL pe %0d port %0d id %0d: got %0d exp %0d", p, k, req_id[p][k], rsp_spin[p][k], flat[req_id[p][k]]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
