// tb_ldpc_awgn_sweep: error-correction workload at the default size (9216-bit code,
// at most 18 iterations): the all-zero codeword sent as BPSK over AWGN at
// Eb/N0 = 1.0, 1.5, 1.75 ... 3.5 dB (the grid of the published performance curves),
// 40 frames per point, frames loaded back to back.
// Channel LLR = 2y/sigma^2, sigma^2 = 1/(2 R Eb/N0), R = 1/2, quantised to 0.25 and
// saturated to +-15. For every frame the decoder's decisions are read out and
// counted; reported per point: frames converged, average iterations, frame errors
// (FER) and bit errors (BER).
// Checks: a frame that stops early must decode to the all-zero codeword; every frame
// takes the cycle count implied by its iteration count; at 3.0 dB and above every
// frame converges; the average iteration count never rises with Eb/N0 by more than
// 0.5; and at each point it lies within 3 of the published average iteration curve
// (18, 18, 16.2, 12.8, 11.1, 9.3, 8.0, 7.0, 6.2, 5.6, read from that curve). The
// tolerance covers this design's own quantisation table and the small frame count.
module tb_ldpc_awgn_sweep;
  import ldpc_pkg::*;

  localparam int L  = 256;
  localparam int NP = 10;         // SNR points
  localparam int FP = 40;         // frames per point
  localparam int NF = NP * FP;

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
  real snr [NP] = '{1.0, 1.5, 1.75, 2.0, 2.25, 2.5, 2.75, 3.0, 3.25, 3.5};
  real ref_it [NP] = '{18.0, 18.0, 16.2, 12.8, 11.1, 9.3, 8.0, 7.0, 6.2, 5.6};

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

  // loader: frames generated on the fly
  initial begin : load_proc
    real sigma2;
    wait (rst_n);
    for (int f = 0; f < NF; f++) begin
      sigma2 = 1.0 / (2.0 * 0.5 * $pow(10.0, snr[f / FP] / 10.0));
      @(negedge clk);
      while (!ld_ready) @(negedge clk);
      for (int i = 0; i < K * K * L; i++) begin
        ld_valid = 1;
        ld_addr  = 14'(i);          // {PE index, location} in natural order
        ld_data  = quant(2.0 * (1.0 + $sqrt(sigma2) * gauss()) / sigma2);
        ld_last  = (i == K * K * L - 1);
        @(negedge clk);
      end
      ld_valid = 0; ld_last = 0;
    end
  end

  int busy_cyc = 0, start_cyc = 0;
  phase_t phase_q = PH_IDLE;
  always @(posedge clk) begin
    phase_q <= phase;
    if (phase != PH_IDLE) busy_cyc++;
    if (phase == PH_INIT && phase_q == PH_IDLE) start_cyc = busy_cyc - 1;
  end

  int conv [NP], iters [NP], errs [NP], ferr [NP];

  initial begin : check_proc
    int e, exp_cyc;
    for (int p = 0; p < NP; p++) begin conv[p] = 0; iters[p] = 0; errs[p] = 0; ferr[p] = 0; end
    repeat (5) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NF; f++) begin
      @(negedge clk);
      while (!frame_done) @(negedge clk);
      exp_cyc = (L + 3) + int'(done_iters) * (2 * L + 8) + (done_converged ? L + 5 : 0) + 1;
      checks++;
      if (busy_cyc - start_cyc != exp_cyc) failures++;
      conv[f / FP]  += int'(done_converged);
      iters[f / FP] += int'(done_iters);
      e = 0;
      for (int t = 0; t < L + K + 1; t++) begin
        if (t >= K + 1) e += $countones(dec_out);
        rd_addr = 8'(t);
        @(negedge clk);
      end
      errs[f / FP] += e;
      ferr[f / FP] += int'(e != 0);
      if (done_converged) begin
        checks++;
        if (e != 0) failures++;
      end
    end
    $display(" Eb/N0  frames  converged  avg.iter  frame err  FER       bit errors  BER");
    for (int p = 0; p < NP; p++)
      $display("  %4.2f  %4d    %4d       %5.2f     %4d     %8.2e  %6d      %8.2e", snr[p], FP,
               conv[p], real'(iters[p]) / FP, ferr[p], real'(ferr[p]) / FP, errs[p],
               real'(errs[p]) / (FP * K * K * L));
    for (int p = 0; p < NP; p++) begin
      real avg;
      avg = real'(iters[p]) / FP;
      checks++;
      if (avg > ref_it[p] + 3.0 || avg < ref_it[p] - 3.0) failures++;
      if (p > 0) begin
        checks++;
        if (avg > real'(iters[p-1]) / FP + 0.5) failures++;
      end
      if (snr[p] >= 3.0) begin
        checks++;
        if (conv[p] != FP) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NF * 11000 + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
