// tb_energy_accum: self-checking test of the stage-3 interaction accumulator.
// Random neighbour spins and weights (including all-maximum weights, which
// exercise the widest sums) are compared with E_int(c) = sum of the weights of
// neighbours in cluster c computed by a loop in the testbench. Runs once with
// the full neighbourhood size K = 120 and once with a K that is not a power
// of two and small.
module tb_energy_accum;
  localparam int Q = 4, WW = 8, QW = 2;
  localparam int K1 = 120, K2 = 7;
  localparam int EW1 = WW + $clog2(K1), EW2 = WW + $clog2(K2);
  logic [QW-1:0] s1 [K1];
  logic [WW-1:0] w1 [K1];
  logic [EW1-1:0] e1 [Q];
  logic [QW-1:0] s2 [K2];
  logic [WW-1:0] w2 [K2];
  logic [EW2-1:0] e2 [Q];
  int checks = 0, failures = 0;

  energy_accum #(.K(K1), .Q(Q), .WW(WW)) dut1 (.nbr_spin(s1), .nbr_w(w1), .e_int(e1));
  energy_accum #(.K(K2), .Q(Q), .WW(WW)) dut2 (.nbr_spin(s2), .nbr_w(w2), .e_int(e2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      int ref1 [Q];
      int ref2 [Q];
      for (int c = 0; c < Q; c++) begin ref1[c] = 0; ref2[c] = 0; end
      for (int k = 0; k < K1; k++) begin
        s1[k] = (t == 0) ? '0 : QW'($urandom);
        w1[k] = (t < 2) ? 8'hFF : WW'($urandom);
        ref1[s1[k]] += w1[k];
      end
      for (int k = 0; k < K2; k++) begin
        s2[k] = QW'($urandom);
        w2[k] = WW'($urandom);
        ref2[s2[k]] += w2[k];
      end
      #1;
      for (int c = 0; c < Q; c++) begin
        checks += 2;
        if (int'(e1[c]) != ref1[c]) begin failures++; $display("FAIL K=120 t%0d c%0d got %0d exp %0d", t, c, e1[c], ref1[c]); end
        if (int'(e2[c]) != ref2[c]) begin failures++; $display("FAIL K=7 t%0d c%0d got %0d exp %0d", t, c, e2[c], ref2[c]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
