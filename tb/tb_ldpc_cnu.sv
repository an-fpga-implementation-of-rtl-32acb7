// tb_ldpc_cnu: random and corner-case stimulus for the degree-6 check node unit,
// compared with the reference check node update; also checks the 2-clock latency
// and one-result-per-clock throughput.
module tb_ldpc_cnu;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  hyb_t [K-1:0] x_in;
  msg_t [K-1:0] beta_out;
  logic         parity_out;
  int checks = 0, failures = 0;

  ldpc_cnu dut (.clk, .rst_n, .x_in, .beta_out, .parity_out);

  typedef logic [KR-1:0][5:0] vec_t;
  vec_t q_in [$];
  vec_t cur, nxt;

  localparam int NVEC = 2000;

  initial begin
    logic [5:0] v [KR];
    logic [4:0] eb [KR];
    logic ep;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NVEC + 2; t++) begin
      @(negedge clk);
      // check output for input applied two cycles ago
      if (t >= 2) begin
        cur = q_in.pop_front();
        for (int i = 0; i < KR; i++) v[i] = cur[i];
        ref_cnu(v, eb, ep);
        checks++;
        if (parity_out != ep) failures++;
        for (int i = 0; i < KR; i++) begin
          checks++;
          if (beta_out[i] != eb[i]) begin
            failures++;
            if (failures < 4) $display("FAIL t=%0d i=%0d got %h exp %h in %h %h %h %h %h %h", t, i, beta_out[i], eb[i], v[0],v[1],v[2],v[3],v[4],v[5]);
          end
        end
      end
      for (int i = 0; i < KR; i++) begin
        case (t % 4)
          0: nxt[i] = 6'($urandom);
          1: nxt[i] = {2'($urandom), 4'd15};        // large magnitudes -> saturation
          2: nxt[i] = {2'($urandom), 4'($urandom % 3)}; // small magnitudes
          default: nxt[i] = (i == t % KR) ? 6'd0 : 6'($urandom);
        endcase
        x_in[i] = nxt[i];
      end
      q_in.push_back(nxt);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC * 2 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
