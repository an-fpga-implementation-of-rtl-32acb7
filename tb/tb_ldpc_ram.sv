// tb_ldpc_ram: random writes and reads of the synchronous RAM against a shadow
// array; checks the one-clock read latency and read-before-write on a collision.
module tb_ldpc_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [7:0] raddr, waddr;
  logic [5:0] rdata, wdata;
  logic we;
  logic [5:0] shadow [256];
  int checks = 0, failures = 0;

  ldpc_ram #(.DEPTH(256), .WIDTH(6)) dut (.clk, .raddr, .rdata, .we, .waddr, .wdata);

  initial begin
    logic [5:0] exp_q;
    we = 1;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      waddr = 8'(a); wdata = 6'($urandom); shadow[a] = wdata; raddr = 0;
    end
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      raddr = 8'($urandom);
      we    = 1'($urandom);
      waddr = (t % 3 == 0) ? raddr : 8'($urandom);
      wdata = 6'($urandom);
      exp_q = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata != exp_q) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d addr=%0d got %h exp %h", t, raddr, rdata, exp_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
