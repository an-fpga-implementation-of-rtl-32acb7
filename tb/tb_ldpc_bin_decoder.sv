// tb_ldpc_bin_decoder: every PE index, valid high and low, and out-of-range indices.
module tb_ldpc_bin_decoder;
  logic valid;
  logic [5:0] idx;
  logic [35:0] sel;
  int checks = 0, failures = 0;

  ldpc_bin_decoder #(.N(36)) dut (.valid, .idx, .sel);

  initial begin
    for (int v = 0; v < 2; v++)
      for (int i = 0; i < 64; i++) begin
        logic [35:0] e;
        valid = 1'(v); idx = 6'(i);
        #1;
        e = (v == 1 && i < 36) ? (36'd1 << i) : 36'd0;
        checks++;
        if (sel !== e) begin failures++; $display("FAIL v=%0d i=%0d sel=%h", v, i, sel); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
