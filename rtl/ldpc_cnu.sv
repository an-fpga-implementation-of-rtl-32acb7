// ldpc_cnu: check node processing unit for a check node of degree K (K = 6 by default).
//
// Inputs are K hybrid words {hard decision, sign, 4-bit magnitude}; each carries a
// variable-to-check message alpha, already in the f() domain, plus the current hard
// decision of that variable. For every input i the unit produces the check-to-variable
// message beta_i = f(sum of the other K-1 magnitudes) with sign = XOR of the other
// K-1 signs, in 5-bit sign-magnitude form, and the parity check result, the XOR of
// all K hard decisions (1 = check not satisfied).
//
// Structure (after the source architecture): the first half forms prefix and suffix
// sums of the magnitudes and the XOR of all signs and all hard decisions; a pipeline
// register follows; the second half adds prefix(i-1) + suffix(i+1), saturates the
// result to 6 bits, looks it up in the f() table and fixes the sign. The second half
// ends in the output register. Latency: 2 clocks from x_in to beta_out/parity_out,
// one result per clock. The saturation to 63 and the prefix/suffix arrangement of
// the adders are this design's reading of the adder network.
module ldpc_cnu
  import ldpc_pkg::*;
#(
  parameter int DEG = K
) (
  input  logic               clk,
  input  logic               rst_n,
  input  hyb_t [DEG-1:0]     x_in,
  output msg_t [DEG-1:0]     beta_out,
  output logic               parity_out
);
  localparam int PW = MAG_W + $clog2(DEG) + 1;  // wide enough for DEG magnitudes

  // ---- first half -------------------------------------------------------------
  logic [PW-1:0] pre_c [DEG];   // pre[i] = m0 + ... + mi
  logic [PW-1:0] suf_c [DEG];   // suf[i] = mi + ... + m(DEG-1)
  logic          sgn_all_c, par_c;

  always_comb begin
    sgn_all_c = 1'b0;
    par_c     = 1'b0;
    for (int i = 0; i < DEG; i++) begin
      sgn_all_c ^= x_in[i][MSG_W-1];
      par_c     ^= x_in[i][HYB_W-1];
    end
    pre_c[0]     = PW'(x_in[0][MAG_W-1:0]);
    suf_c[DEG-1] = PW'(x_in[DEG-1][MAG_W-1:0]);
    for (int i = 1; i < DEG; i++)
      pre_c[i] = pre_c[i-1] + PW'(x_in[i][MAG_W-1:0]);
    for (int i = DEG - 2; i >= 0; i--)
      suf_c[i] = suf_c[i+1] + PW'(x_in[i][MAG_W-1:0]);
  end

  logic [PW-1:0]  pre_q [DEG];
  logic [PW-1:0]  suf_q [DEG];
  logic [DEG-1:0] sgn_q;
  logic           sgn_all_q, par_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEG; i++) begin
        pre_q[i] <= '0;
        suf_q[i] <= '0;
      end
      sgn_q     <= '0;
      sgn_all_q <= 1'b0;
      par_q     <= 1'b0;
    end else begin
      for (int i = 0; i < DEG; i++) begin
        pre_q[i] <= pre_c[i];
        suf_q[i] <= suf_c[i];
        sgn_q[i] <= x_in[i][MSG_W-1];
      end
      sgn_all_q <= sgn_all_c;
      par_q     <= par_c;
    end
  end

  // ---- second half ------------------------------------------------------------
  logic [SUM_W-1:0] sat [DEG];
  logic [MAG_W-1:0] lut_o [DEG];

  logic [PW-1:0] excl [DEG];   // sum of all magnitudes except input i

  always_comb begin
    excl[0]     = suf_q[1];
    excl[DEG-1] = pre_q[DEG-2];
    for (int i = 1; i < DEG - 1; i++)
      excl[i] = pre_q[i-1] + suf_q[i+1];
    for (int i = 0; i < DEG; i++)
      sat[i] = (excl[i] > PW'(2**SUM_W - 1)) ? SUM_W'(2**SUM_W - 1) : excl[i][SUM_W-1:0];
  end

  for (genvar i = 0; i < DEG; i++) begin : g_lut
    ldpc_flut u_lut (.mag_in(sat[i]), .mag_out(lut_o[i]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beta_out   <= '0;
      parity_out <= 1'b0;
    end else begin
      for (int i = 0; i < DEG; i++)
        beta_out[i] <= {sgn_all_q ^ sgn_q[i], lut_o[i]};
      parity_out <= par_q;
    end
  end
endmodule
