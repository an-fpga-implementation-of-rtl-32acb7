// tb_ldpc_ctrl: phase sequencing of the central controller (L = 16, MAX_ITER = 3).
// Frames with different parity-check behaviour are run and, per frame, the number of
// read cycles of each kind, address-generator loads, the decode time, the reported
// iteration count and stop cause, and the buffer handshakes are compared with the
// cycle budget: INIT L+3, CNP L+5, VNP L+3, DONE 1.
module tb_ldpc_ctrl;
  import ldpc_pkg::*;
  localparam int L = 16, MI = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic frame_loaded = 0, ld_ready, parity_fail = 0;
  phase_t phase;
  logic ag_load, cn_rd, vn_rd, init, int_bank, dec_bank, frame_done, done_converged;
  logic [3:0] vn_addr, step;
  logic [1:0] done_iters;
  int checks = 0, failures = 0;

  ldpc_ctrl #(.L(L), .MAX_ITER(MI)) dut (.*);

  // per-frame counters
  int n_cn, n_vn, n_init, n_agl, n_cyc;
  int fail_mode;    // 0: never fail, 1: always fail, 2: fail in 1st CNP only, 3: fail outside window
  int cnp_no;
  logic cn_rd_q;
  always_ff @(posedge clk) begin
    cn_rd_q <= cn_rd;
    if (phase != PH_IDLE) n_cyc++;
    if (cn_rd) n_cn++;
    if (vn_rd) n_vn++;
    if (vn_rd && init) n_init++;
    if (ag_load) n_agl++;
    if (cn_rd && !cn_rd_q) cnp_no++;
  end
  // parity stimulus, 4 clocks after read cycles (the CNU latency) or outside them
  logic [3:0] cn_hist;
  always_ff @(posedge clk) cn_hist <= {cn_hist[2:0], cn_rd};
  always_comb begin
    case (fail_mode)
      1: parity_fail = cn_hist[3];
      2: parity_fail = cn_hist[3] && cnp_no == 1;
      3: parity_fail = !cn_hist[3];
      default: parity_fail = 1'b0;
    endcase
  end

  task automatic run_frame(int mode, int exp_iters, bit exp_conv);
    int exp_cyc;
    logic ib, db;
    fail_mode = mode;
    n_cn = 0; n_vn = 0; n_init = 0; n_agl = 0; n_cyc = 0; cnp_no = 0;
    ib = int_bank; db = dec_bank;
    @(negedge clk);
    checks++; if (!ld_ready) failures++;
    frame_loaded = 1; @(negedge clk); frame_loaded = 0;
    while (!frame_done) @(negedge clk);
    exp_cyc = (L + 3) + exp_iters * (2 * L + 8) + (exp_conv ? L + 5 : 0) + 1;
    checks += 9;
    if (n_cyc != exp_cyc) begin failures++; $display("FAIL cycles %0d exp %0d", n_cyc, exp_cyc); end
    if (n_cn != L * (exp_iters + (exp_conv ? 1 : 0))) begin failures++; $display("FAIL n_cn %0d", n_cn); end
    if (n_vn != L * (exp_iters + 1)) begin failures++; $display("FAIL n_vn %0d", n_vn); end
    if (n_init != L) failures++;
    if (n_agl != exp_iters + (exp_conv ? 1 : 0)) begin failures++; $display("FAIL n_agl %0d", n_agl); end
    if (int'(done_iters) != exp_iters) begin failures++; $display("FAIL iters %0d", done_iters); end
    if (done_converged != exp_conv) failures++;
    if (int_bank == ib) failures++;
    if (dec_bank == db) failures++;
    $display("mode %0d: %0d cycles, iterations %0d, converged %0d", mode, n_cyc, done_iters, done_converged);
  endtask

  initial begin
    fail_mode = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run_frame(1, MI, 0);   // never satisfied: stops at MAX_ITER
    run_frame(0, 0, 1);    // satisfied at the first check
    run_frame(2, 1, 1);    // satisfied after one iteration
    run_frame(3, 0, 1);    // failures outside the valid window are ignored
    // ld_ready drops while a loaded frame waits, rises when its decode starts
    @(negedge clk);
    fail_mode = 1;
    frame_loaded = 1; @(negedge clk); frame_loaded = 0;
    repeat (2) @(negedge clk);
    checks++; if (phase != PH_INIT || !ld_ready) failures++;
    frame_loaded = 1; @(negedge clk); frame_loaded = 0;
    checks++; if (ld_ready) failures++;
    while (!frame_done) @(negedge clk);
    @(negedge clk);
    checks++; if (phase != PH_INIT || !ld_ready) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
