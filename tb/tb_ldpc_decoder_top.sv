// tb_ldpc_decoder_top: end-to-end test of the decoder at its default size
// (k = 6, L = 256, N = 9216, at most 18 iterations).
//
// Frames are channel LLRs of the all-zero codeword (BPSK over AWGN, Box-Muller noise,
// LLR = 2y/sigma^2 quantised to 0.25 and saturated to +-15), a noiseless frame and a
// frame of random LLRs that cannot converge. They are loaded back to back through
// the intrinsic load port while the previous frame is decoded. A bit-exact model of
// the decoding procedure runs on the same LLRs: it builds the parity-check matrix from
// the code construction (H1: identity blocks, H2: identity blocks shifted by
// ((x-1)*y) mod L, H3: start values t(x,y) and the pi_3 permutations and control
// words), checks that every node is in one check of each group and that the graph has
// no 4-cycles (the property the t(x,y) constraints guarantee), then runs flooding Log-BP with the same quantised arithmetic, parity check
// before every iteration and the same stop rules. For each frame the iteration count,
// the stop cause, every hard decision (read through the readout port) and the number
// of decode cycles are compared with the model. The test also counts the mechanisms
// it exercised: early stop at the first check, early stop after iterating, stop at
// the iteration limit, loading during a decode and readout during a decode.
module tb_ldpc_decoder_top;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;

  localparam int L  = 256;
  localparam int N  = L * K * K;
  localparam int MI = 18;
  localparam int NF = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        ld_valid = 0, ld_last = 0, ld_ready;
  logic [13:0] ld_addr = '0;
  msg_t        ld_data = '0;
  logic        frame_done, done_converged;
  logic [4:0]  done_iters;
  phase_t      phase;
  logic [7:0]  rd_addr = '0;
  logic [35:0] dec_out;

  ldpc_decoder_top dut (.*);

  int checks = 0, failures = 0;

  // ---------------- frames ----------------
  logic [4:0] llr [NF][K][K][L];
  real        ebn0 [NF] = '{3.0, 2.0, 99.0, -1.0, 2.5};   // 99: noiseless, -1: random LLRs

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic logic [4:0] quant(real g);
    int q;
    q = int'($floor(g / 0.25 + 0.5));
    if (q > 15) q = 15;
    if (q < -15) q = -15;
    return (q < 0) ? {1'b1, 4'(-q)} : {1'b0, 4'(q)};
  endfunction

  task automatic make_frames();
    real sigma2;
    for (int f = 0; f < NF; f++) begin
      sigma2 = 1.0 / (2.0 * 0.5 * $pow(10.0, ebn0[f] / 10.0));
      for (int x = 0; x < K; x++)
        for (int y = 0; y < K; y++)
          for (int a = 0; a < L; a++)
            if (ebn0[f] > 50.0)      llr[f][x][y][a] = 5'd15;
            else if (ebn0[f] < 0.0)  llr[f][x][y][a] = 5'($urandom);
            else                     llr[f][x][y][a] = quant(2.0 * (1.0 + $sqrt(sigma2) * gauss()) / sigma2);
    end
  endtask

  // ---------------- code structure (check (i,j,r), input n -> node) ----------------
  int nbx [3][K][L][K];
  int nby [3][K][L][K];
  int nba [3][K][L][K];

  task automatic build_h();
    logic [K-1:0] sr, sc;
    int x1, y0;
    for (int r = 0; r < L; r++) begin
      sr = rom_word(ROM_R_SEED, r);
      sc = rom_word(ROM_C_SEED, r);
      for (int j = 0; j < K; j++)
        for (int n = 0; n < K; n++) begin
          // H1: CNU(1,j) <- PE(j,n), identity block
          nbx[0][j][r][n] = j; nby[0][j][r][n] = n; nba[0][j][r][n] = r;
          // H2: CNU(2,j) <- PE(n,j), identity shifted by ((x-1)*y) mod L (1-based x,y)
          nbx[1][j][r][n] = n; nby[1][j][r][n] = j; nba[1][j][r][n] = (n * (j + 1) + r) % L;
          // H3: CNU(3,j) input n <- c[j][n] of pi_3
          x1 = sc[n] ? C_PERM[n][j] : j;
          y0 = sr[x1] ? R_PERM[x1][n] : n;
          nbx[2][j][r][n] = x1; nby[2][j][r][n] = y0; nba[2][j][r][n] = (t_xy(x1, y0) + r) % L;
        end
    end
  endtask

  // sanity: every node appears exactly once per check node group (column weight 3,
  // row weight k)
  task automatic check_h();
    int cnt [K][K][L];
    for (int i = 0; i < 3; i++) begin
      for (int x = 0; x < K; x++) for (int y = 0; y < K; y++) for (int a = 0; a < L; a++) cnt[x][y][a] = 0;
      for (int j = 0; j < K; j++) for (int r = 0; r < L; r++) for (int n = 0; n < K; n++)
        cnt[nbx[i][j][r][n]][nby[i][j][r][n]][nba[i][j][r][n]]++;
      for (int x = 0; x < K; x++) for (int y = 0; y < K; y++) for (int a = 0; a < L; a++) begin
        checks++;
        if (cnt[x][y][a] != 1) failures++;
      end
    end
  endtask

  // girth: the code has a 4-cycle exactly when two variable nodes share two checks, so
  // every pair of checks of one variable node must belong to no other variable node
  task automatic check_4cycle();
    int vchk [K][K][L][3];
    bit seen [longint];
    longint key;
    for (int i = 0; i < 3; i++) for (int j = 0; j < K; j++) for (int r = 0; r < L; r++)
      for (int n = 0; n < K; n++)
        vchk[nbx[i][j][r][n]][nby[i][j][r][n]][nba[i][j][r][n]][i] = (i * K + j) * L + r;
    for (int x = 0; x < K; x++) for (int y = 0; y < K; y++) for (int a = 0; a < L; a++)
      for (int p = 0; p < 2; p++) for (int q = p + 1; q < 3; q++) begin
        key = longint'(vchk[x][y][a][p]) * (3 * K * L) + longint'(vchk[x][y][a][q]);
        checks++;
        if (seen.exists(key)) failures++;
        else seen[key] = 1;
      end
  endtask

  // ---------------- reference decoder ----------------
  logic [5:0] ext [3][K][K][L];
  logic       mdec [NF][K][K][L];
  int         m_iters [NF];
  bit         m_conv [NF];

  task automatic ref_decode(int f);
    logic [4:0] y3 [3];
    logic [5:0] xo [3];
    logic [5:0] xin [KR];
    logic [4:0] bo [KR];
    logic hd, par;
    bit fail;
    int it;
    for (int i = 0; i < 3; i++) y3[i] = 5'd0;
    for (int x = 0; x < K; x++) for (int y = 0; y < K; y++) for (int a = 0; a < L; a++) begin
      ref_vnu(llr[f][x][y][a], y3, xo, hd);
      for (int i = 0; i < 3; i++) ext[i][x][y][a] = xo[i];
      mdec[f][x][y][a] = hd;
    end
    it = 0;
    forever begin
      fail = 0;
      for (int i = 0; i < 3; i++) for (int j = 0; j < K; j++) for (int r = 0; r < L; r++) begin
        for (int n = 0; n < K; n++) xin[n] = ext[i][nbx[i][j][r][n]][nby[i][j][r][n]][nba[i][j][r][n]];
        ref_cnu(xin, bo, par);
        if (par) fail = 1;
        for (int n = 0; n < K; n++) ext[i][nbx[i][j][r][n]][nby[i][j][r][n]][nba[i][j][r][n]] = {1'b0, bo[n]};
      end
      if (!fail) begin m_conv[f] = 1; break; end
      for (int x = 0; x < K; x++) for (int y = 0; y < K; y++) for (int a = 0; a < L; a++) begin
        for (int i = 0; i < 3; i++) y3[i] = ext[i][x][y][a][4:0];
        ref_vnu(llr[f][x][y][a], y3, xo, hd);
        for (int i = 0; i < 3; i++) ext[i][x][y][a] = xo[i];
        mdec[f][x][y][a] = hd;
      end
      it++;
      if (it == MI) begin m_conv[f] = 0; break; end
    end
    m_iters[f] = it;
  endtask

  // ---------------- mechanism counters ----------------
  int n_stop_first = 0, n_stop_iter = 0, n_stop_max = 0, n_load_busy = 0, n_read_busy = 0;
  int n_bit_err = 0;

  always @(posedge clk) begin
    if (ld_valid && phase != PH_IDLE) n_load_busy++;
  end

  // ---------------- loader ----------------
  initial begin : load_proc
    make_frames();
    wait (rst_n);
    for (int f = 0; f < NF; f++) begin
      @(negedge clk);
      while (!ld_ready) @(negedge clk);
      for (int x = 0; x < K; x++)
        for (int y = 0; y < K; y++)
          for (int a = 0; a < L; a++) begin
            ld_valid = 1;
            ld_addr  = {6'(x * K + y), 8'(a)};
            ld_data  = llr[f][x][y][a];
            ld_last  = (x == K - 1 && y == K - 1 && a == L - 1);
            @(negedge clk);
          end
      ld_valid = 0; ld_last = 0;
    end
  end

  // ---------------- decode-time measurement ----------------
  int busy_cyc = 0, start_cyc = 0;
  phase_t phase_q = PH_IDLE;
  always @(posedge clk) begin
    phase_q <= phase;
    if (phase != PH_IDLE) busy_cyc++;
    if (phase == PH_INIT && phase_q == PH_IDLE) start_cyc = busy_cyc - 1;
  end

  // ---------------- checker ----------------
  initial begin : check_proc
    int exp_cyc;
    build_h();
    check_h();
    check_4cycle();
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      ref_decode(f);
      @(negedge clk);
      while (!frame_done) @(negedge clk);
      // iteration count and stop cause
      checks += 3;
      if (int'(done_iters) != m_iters[f]) begin failures++; $display("FAIL frame %0d iters %0d exp %0d", f, done_iters, m_iters[f]); end
      if (done_converged != m_conv[f]) begin failures++; $display("FAIL frame %0d converged %0d exp %0d", f, done_converged, m_conv[f]); end
      exp_cyc = (L + 3) + m_iters[f] * (2 * L + 8) + (m_conv[f] ? L + 5 : 0) + 1;
      if (busy_cyc - start_cyc != exp_cyc) begin
        failures++;
        $display("FAIL frame %0d decode cycles %0d exp %0d", f, busy_cyc - start_cyc, exp_cyc);
      end
      if (m_conv[f] && m_iters[f] == 0) n_stop_first++;
      if (m_conv[f] && m_iters[f] > 0)  n_stop_iter++;
      if (!m_conv[f])                   n_stop_max++;
      // readout of all decisions
      for (int t = 0; t < L + K + 1; t++) begin
        if (phase != PH_IDLE) n_read_busy++;
        if (t >= K + 1) begin
          int a;
          a = t - K - 1;
          for (int x = 0; x < K; x++)
            for (int y = 0; y < K; y++) begin
              checks++;
              if (dec_out[x * K + y] !== mdec[f][x][y][a]) begin
                failures++;
                if (failures < 10) $display("FAIL frame %0d dec PE(%0d,%0d)[%0d]", f, x, y, a);
              end
              if (dec_out[x * K + y]) n_bit_err++;
            end
        end
        rd_addr = 8'(t);
        @(negedge clk);
      end
      $display("frame %0d (Eb/N0 %0.1f): %0d iterations, converged %0d, %0d decode cycles, %0d bit errors",
               f, ebn0[f], m_iters[f], m_conv[f], exp_cyc, n_bit_err);
      n_bit_err = 0;
    end
    $display("mechanisms: stop-at-first-check %0d, stop-after-iterating %0d, stop-at-limit %0d, load-during-decode %0d, readout-during-decode %0d",
             n_stop_first, n_stop_iter, n_stop_max, n_load_busy, n_read_busy);
    checks += 5;
    if (n_stop_first == 0) failures++;
    if (n_stop_iter == 0)  failures++;
    if (n_stop_max == 0)   failures++;
    if (n_load_busy == 0)  failures++;
    if (n_read_busy == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * 12000 + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
