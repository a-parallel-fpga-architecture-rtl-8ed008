// tb_spin_bank: self-checking test of one spin bank.
// Checks reset to zero, then random writes against a model, the own-node read
// port and the full contents vector seen by the read interconnect.
module tb_spin_bank;
  localparam int NPP = 32, Q = 4, LW = $clog2(NPP), QW = $clog2(Q);
  logic clk = 0, rst_n = 0, we = 0;
  logic [LW-1:0] waddr = '0, raddr = '0;
  logic [QW-1:0] wspin = '0, rspin;
  logic [NPP-1:0][QW-1:0] contents;
  logic [QW-1:0] model [NPP];
  int checks = 0, failures = 0;

  spin_bank #(.NPP(NPP), .Q(Q)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < NPP; a++) begin
      raddr = LW'(a);
      #1;
      checks += 2;
      if (rspin !== model[a]) begin failures++; $display("FAIL rspin[%0d]=%0d exp %0d", a, rspin, model[a]); end
      if (contents[a] !== model[a]) begin failures++; $display("FAIL contents[%0d]=%0d exp %0d", a, contents[a], model[a]); end
    end
  endtask

  initial begin
    for (int a = 0; a < NPP; a++) model[a] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    check_all();
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      we = ($urandom_range(3) != 0);
      waddr = LW'($urandom); wspin = QW'($urandom);
      @(posedge clk);
      if (we) model[waddr] = wspin;
      #1;
      if (i % 50 == 0) check_all();
      raddr = waddr; #1;
      checks++;
      if (rspin !== model[waddr]) begin failures++; $display("FAIL after write @%0d", waddr); end
    end
    @(negedge clk) we = 0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
