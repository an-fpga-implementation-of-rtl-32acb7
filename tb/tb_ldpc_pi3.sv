// tb_ldpc_pi3: the configurable shuffle network pi_3.
// Forward: random data, output compared with a model built from the two-stage
// definition (intra-row R_x or identity, then intra-column C_y or identity) and the
// control words of step r. Backward: the CNU side returns the forward output three
// clocks later; the backward output must then equal the forward input of three
// clocks before (inverse route). Also counts how often each control bit was 0 and 1.
module tb_ldpc_pi3;
  import ldpc_pkg::*;
  localparam int L = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] step;
  hyb_t [K-1:0][K-1:0] fwd_in, fwd_out;
  msg_t [K-1:0][K-1:0] bwd_in, bwd_out;
  int checks = 0, failures = 0, ones = 0, zeros = 0;

  ldpc_pi3 #(.L(L)) dut (.clk, .rst_n, .step, .fwd_in, .fwd_out, .bwd_in, .bwd_out);

  hyb_t [K-1:0][K-1:0] in_hist [4];
  hyb_t [K-1:0][K-1:0] out_hist [4];

  initial begin
    hyb_t [K-1:0][K-1:0] b, e;
    logic [K-1:0] sr, sc;
    step = 0; fwd_in = '0; bwd_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3 * L; t++) begin
      @(negedge clk);
      // data for the step presented in the previous cycle
      for (int x = 0; x < K; x++)
        for (int y = 0; y < K; y++) fwd_in[x][y] = 6'($urandom);
      if (t >= 1) begin
        sr = rom_word(ROM_R_SEED, (t - 1) % L);
        sc = rom_word(ROM_C_SEED, (t - 1) % L);
        ones += $countones(sr) + $countones(sc);
        zeros += 2 * K - $countones(sr) - $countones(sc);
        for (int x = 0; x < K; x++)
          for (int y = 0; y < K; y++) b[x][y] = sr[x] ? fwd_in[x][R_PERM[x][y]] : fwd_in[x][y];
        for (int x = 0; x < K; x++)
          for (int y = 0; y < K; y++) e[x][y] = sc[y] ? b[C_PERM[y][x]][y] : b[x][y];
        #1;
        checks++;
        if (fwd_out !== e) begin
          failures++;
          if (failures < 5) $display("FAIL fwd t=%0d", t);
        end
        // history for the backward check
        for (int k = 3; k > 0; k--) begin
          in_hist[k] = in_hist[k-1];
          out_hist[k] = out_hist[k-1];
        end
        in_hist[0] = fwd_in;
        out_hist[0] = fwd_out;
        if (t >= 4) begin
          for (int x = 0; x < K; x++)
            for (int y = 0; y < K; y++) bwd_in[x][y] = out_hist[3][x][y][4:0];
          #1;
          for (int x = 0; x < K; x++)
            for (int y = 0; y < K; y++) begin
              checks++;
              if (bwd_out[x][y] !== in_hist[3][x][y][4:0]) begin
                failures++;
                if (failures < 5) $display("FAIL bwd t=%0d x=%0d y=%0d", t, x, y);
              end
            end
        end
      end
      step = 8'(t % L);
    end
    checks++;
    if (ones == 0 || zeros == 0) failures++;
    $display("control bits: %0d ones, %0d zeros", ones, zeros);
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
