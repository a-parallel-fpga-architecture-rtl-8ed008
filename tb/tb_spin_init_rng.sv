// tb_spin_init_rng: self-checking test of the initial-spin generator.
// A reference model of the LFSR (x^16 + x^14 + x^13 + x^11 + 1 in Galois
// form) runs beside two instances with different PE numbers. Checks the
// label sequence, that `step` low holds the state, that two PEs with the same
// seed produce different sequences, that the all-zero seed does not lock up
// and that all four labels occur with roughly equal frequency.
module tb_spin_init_rng;
  localparam int Q = 4, QW = 2;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [15:0] seed = 16'h0;
  logic [QW-1:0] spin_a, spin_b;
  int checks = 0, failures = 0;
  int hist [Q];

  spin_init_rng #(.Q(Q), .PE_ID(0)) dut_a (.clk, .rst_n, .load, .seed, .step, .spin(spin_a));
  spin_init_rng #(.Q(Q), .PE_ID(5)) dut_b (.clk, .rst_n, .load, .seed, .step, .spin(spin_b));

  always #5 clk = ~clk;

  function automatic logic [15:0] nxt(input logic [15:0] s);
    logic fb;
    fb = s[0];
    s = s >> 1;
    if (fb) s = s ^ 16'hB400;
    return s;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] ref_s;
    int diff;
    for (int c = 0; c < Q; c++) hist[c] = 0;
    #12 rst_n = 1;
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      seed = (run == 0) ? 16'h0001 : (run == 1) ? 16'hACE1 : 16'h0000;
      load = 1;
      @(negedge clk);
      load = 0;
      ref_s = seed ^ 16'h0001;            // PE 0 salt is 1
      if (ref_s == 0) ref_s = 16'h0001;
      diff = 0;
      for (int i = 0; i < 1000; i++) begin
        step = ($urandom_range(4) != 0);
        #1;
        checks++;
        if (int'(spin_a) != int'(ref_s % 16'(Q))) begin
          failures++;
          $display("FAIL run %0d step %0d: spin %0d exp %0d", run, i, spin_a, ref_s % Q);
        end
        if (spin_a != spin_b) diff++;
        hist[spin_a]++;
        @(negedge clk);
        if (step) ref_s = nxt(ref_s);
      end
      checks++;
      if (diff < 500) begin failures++; $display("FAIL PEs 0 and 5 too alike (%0d differences)", diff); end
    end
    for (int c = 0; c < Q; c++) begin
      checks++;
      if (hist[c] < 600 || hist[c] > 900) begin failures++; $display("FAIL label %0d occurs %0d times in 3000", c, hist[c]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
