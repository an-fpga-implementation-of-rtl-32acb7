// tb_ldpc_shuffle: the three shuffle networks with their pipeline registers.
// Every PE(x,y) sends a word tagged with its position. One clock later the CNU
// inputs are checked: pi_1 must deliver PE(x,y) to CNU(1,x) input y, pi_2 to CNU(2,y)
// input x, and pi_3 must deliver each PE exactly once to the CNU(3,*) inputs. A
// two-clock loop stands in for the CNUs and returns each tag; one clock later the
// backward outputs must carry every tag back to the PE it came from.
module tb_ldpc_shuffle;
  import ldpc_pkg::*;
  localparam int L = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [7:0] step;
  hyb_t [2:0][K-1:0][K-1:0] h_in, cnu_in;
  msg_t [2:0][K-1:0][K-1:0] cnu_beta, beta_out;
  msg_t [2:0][K-1:0][K-1:0] loop_d;
  int checks = 0, failures = 0;

  ldpc_shuffle #(.L(L)) dut (.clk, .rst_n, .step, .h_in, .cnu_in, .cnu_beta, .beta_out);

  // stand-in for the 2-stage CNUs: pass the 5 low bits back two clocks later
  always_ff @(posedge clk) begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < K; j++)
        for (int n = 0; n < K; n++) loop_d[i][j][n] <= cnu_in[i][j][n][4:0];
    cnu_beta <= loop_d;
  end

  // tag: 5 low bits carry a value unique within one network per cycle
  function automatic hyb_t tag(int x, int y, int t);
    return 6'(((x * K + y) + t) % 32) | ((x * K + y >= 32) ? 6'h20 : 6'h00);
  endfunction

  hyb_t [2:0][K-1:0][K-1:0] h_hist [8];

  initial begin
    step = 0; h_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      @(negedge clk);
      for (int k = 7; k > 0; k--) h_hist[k] = h_hist[k-1];
      h_hist[0] = h_in;
      if (t >= 2) begin
        // forward: cnu_in reflects h_in of one clock ago (h_hist[0])
        int seen [64];
        for (int a = 0; a < 64; a++) seen[a] = 0;
        for (int x = 0; x < K; x++)
          for (int y = 0; y < K; y++) begin
            checks += 2;
            if (cnu_in[0][x][y] !== h_hist[0][0][x][y]) failures++;
            if (cnu_in[1][y][x] !== h_hist[0][1][x][y]) failures++;
            seen[cnu_in[2][x][y]]++;
          end
        for (int x = 0; x < K; x++)
          for (int y = 0; y < K; y++) begin
            checks++;
            if (seen[h_hist[0][2][x][y]] != 1) failures++;
          end
      end
      if (t >= 6) begin
        // backward: beta_out reflects h_in of four clocks ago (1 fwd + 2 loop + 1 bwd)
        for (int i = 0; i < 3; i++)
          for (int x = 0; x < K; x++)
            for (int y = 0; y < K; y++) begin
              checks++;
              if (beta_out[i][x][y] !== h_hist[3][i][x][y][4:0]) begin
                failures++;
                if (failures < 5) $display("FAIL bwd t=%0d i=%0d x=%0d y=%0d got %h exp %h", t, i, x, y,
                                           beta_out[i][x][y], h_hist[3][i][x][y][4:0]);
              end
            end
      end
      for (int i = 0; i < 3; i++)
        for (int x = 0; x < K; x++)
          for (int y = 0; y < K; y++) h_in[i][x][y] = tag(x, y, t + 7 * i);
      step = 8'(t % L);
    end
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
