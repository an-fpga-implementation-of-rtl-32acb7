// ldpc_vnu: variable node processing unit for a variable node of degree 3.
//
// Inputs: the 5-bit sign-magnitude intrinsic message z (channel LLR gamma) and the
// three 5-bit sign-magnitude check-to-variable messages y_i (beta). Outputs: the hard
// decision, and three 6-bit hybrid words x_i = {hard decision, sign, magnitude} with
//   gamma_i = z + sum of the two other y        (two's complement, 7 bits)
//   x_i     = sign(gamma_i), f(|gamma_i|)       (f() LUT, sign(0) = +)
//   lambda  = z + y_0 + y_1 + y_2,  hard decision = 1 when lambda <= 0.
// The structure follows the source architecture: the inputs are converted from
// sign-magnitude to two's complement and pairwise sums of the y_i are formed in the
// first half; after a pipeline register, z is added, each sum is converted back to
// sign-magnitude and looked up. The second half ends in the output register, so the
// latency is 2 clocks, one variable node per clock. With all y_i = 0 the unit
// produces the initial messages sign(z) f(|z|) and the channel hard decision, which
// the decoder uses for its initialisation pass.
module ldpc_vnu
  import ldpc_pkg::*;
(
  input  logic           clk,
  input  logic           rst_n,
  input  msg_t           z_in,
  input  msg_t [2:0]     y_in,
  output hyb_t [2:0]     x_out,
  output logic           hd_out
);
  // ---- first half -------------------------------------------------------------
  logic signed [MSG_W-1:0] yt [3];
  always_comb
    for (int i = 0; i < 3; i++) yt[i] = sm2tc(y_in[i]);

  logic signed [MSG_W:0]   pair_q [3];   // pair_q[i] = sum of y except y_i
  logic signed [MSG_W+1:0] all_q;
  logic signed [MSG_W-1:0] z_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) pair_q[i] <= '0;
      all_q <= '0;
      z_q   <= '0;
    end else begin
      pair_q[0] <= (MSG_W+1)'(yt[1]) + (MSG_W+1)'(yt[2]);
      pair_q[1] <= (MSG_W+1)'(yt[0]) + (MSG_W+1)'(yt[2]);
      pair_q[2] <= (MSG_W+1)'(yt[0]) + (MSG_W+1)'(yt[1]);
      all_q     <= (MSG_W+2)'(yt[0]) + (MSG_W+2)'(yt[1]) + (MSG_W+2)'(yt[2]);
      z_q       <= sm2tc(z_in);
    end
  end

  // ---- second half ------------------------------------------------------------
  logic signed [MSG_W+1:0] gam [3];
  logic signed [MSG_W+2:0] lam;
  logic [SUM_W-1:0]        gmag [3];
  logic [MAG_W-1:0]        lut_o [3];

  always_comb begin
    lam = (MSG_W+3)'(z_q) + (MSG_W+3)'(all_q);
    for (int i = 0; i < 3; i++) begin
      gam[i]  = (MSG_W+2)'(z_q) + (MSG_W+2)'(pair_q[i]);
      gmag[i] = gam[i][MSG_W+1] ? SUM_W'(-gam[i]) : SUM_W'(gam[i]);
    end
  end

  for (genvar i = 0; i < 3; i++) begin : g_lut
    ldpc_flut u_lut (.mag_in(gmag[i]), .mag_out(lut_o[i]));
  end

  logic hd_c;
  assign hd_c = (lam <= 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_out  <= '0;
      hd_out <= 1'b0;
    end else begin
      for (int i = 0; i < 3; i++)
        x_out[i] <= {hd_c, gam[i][MSG_W+1], lut_o[i]};
      hd_out <= hd_c;
    end
  end
endmodule
