// tb_ldpc_addr_gen: load, count, hold and wrap-around of the address generator
// (L = 256, START = 250, and a non-power-of-two L = 20, START = 7).
module tb_ldpc_addr_gen;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic load = 0, en = 0;
  logic [7:0] a1;
  logic [4:0] a2;
  int checks = 0, failures = 0;

  ldpc_addr_gen #(.L(256), .START(250)) dut1 (.clk, .rst_n, .load, .en, .addr(a1));
  ldpc_addr_gen #(.L(20),  .START(7))   dut2 (.clk, .rst_n, .load, .en, .addr(a2));

  task automatic chk(int e1, int e2);
    checks += 2;
    if (int'(a1) != e1) begin failures++; $display("FAIL a1=%0d exp %0d", a1, e1); end
    if (int'(a2) != e2) begin failures++; $display("FAIL a2=%0d exp %0d", a2, e2); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // scramble, then load
    en = 1; repeat (5) @(negedge clk);
    en = 0; load = 1; @(negedge clk); load = 0;
    chk(250, 7);
    // hold while en low
    repeat (3) @(negedge clk);
    chk(250, 7);
    en = 1;
    for (int c = 1; c <= 600; c++) begin
      @(negedge clk);
      chk((250 + c) % 256, (7 + c) % 20);
    end
    en = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
