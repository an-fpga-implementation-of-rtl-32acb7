// ldpc_shuffle: the three bi-directional shuffle networks pi_1, pi_2, pi_3 between the
// k x k PE blocks and the 3k check node units, with their pipeline registers.
//
// Index convention: h_in[i][x][y] is the hybrid word read from EXT_RAM_(i+1) of
// PE(x,y); cnu_in[i][j][n] is input n of CNU(i+1,j); cnu_beta[i][j][n] is output n of
// CNU(i+1,j); beta_out[i][x][y] goes back to EXT_RAM_(i+1) of PE(x,y).
//   pi_1 (fixed): the k PE blocks of row x feed CNU(1,x), input n = column y.
//   pi_2 (fixed): the k PE blocks of column y feed CNU(2,y), input n = row x.
//   pi_3 (configurable): see ldpc_pi3; row x of its output feeds CNU(3,x).
// The backward path of each network returns every message along the route of its
// forward counterpart, on separate wires. Both directions end in a register: these
// are the "Shuffle" and "Unshuffle" stages of the five-stage check node pipeline
// (Read, Shuffle, CNU first half, CNU second half, Unshuffle; the Write follows).
// Latency: 1 clock forward, 1 clock backward. `step` is the read-cycle index of the
// cycle before fwd data arrives (see ldpc_pi3).
module ldpc_shuffle
  import ldpc_pkg::*;
#(
  parameter int L   = 256,
  localparam int AW = $clog2(L)
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic [AW-1:0]                  step,
  input  hyb_t [2:0][K-1:0][K-1:0]       h_in,
  output hyb_t [2:0][K-1:0][K-1:0]       cnu_in,
  input  msg_t [2:0][K-1:0][K-1:0]       cnu_beta,
  output msg_t [2:0][K-1:0][K-1:0]       beta_out
);
  hyb_t [K-1:0][K-1:0] p3_fwd;
  msg_t [K-1:0][K-1:0] p3_bwd;

  ldpc_pi3 #(.L(L)) u_pi3 (
    .clk, .rst_n, .step,
    .fwd_in (h_in[2]),
    .fwd_out(p3_fwd),
    .bwd_in (cnu_beta[2]),
    .bwd_out(p3_bwd)
  );

  hyb_t [2:0][K-1:0][K-1:0] fwd_c;
  msg_t [2:0][K-1:0][K-1:0] bwd_c;

  always_comb begin
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++) begin
        fwd_c[0][x][y] = h_in[0][x][y];       // pi_1: CNU(1,x) input y
        fwd_c[1][y][x] = h_in[1][x][y];       // pi_2: CNU(2,y) input x
        bwd_c[0][x][y] = cnu_beta[0][x][y];
        bwd_c[1][x][y] = cnu_beta[1][y][x];
      end
    fwd_c[2] = p3_fwd;
    bwd_c[2] = p3_bwd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnu_in   <= '0;
      beta_out <= '0;
    end else begin
      cnu_in   <= fwd_c;
      beta_out <= bwd_c;
    end
  end
endmodule
