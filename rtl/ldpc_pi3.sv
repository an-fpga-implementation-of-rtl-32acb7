// ldpc_pi3: the random-like, configurable bi-directional shuffle network pi_3.
//
// Forward path (PE blocks -> CNU(3,j)): the k x k block of hybrid words a[x][y], one
// from each PE(x,y), passes two concatenated stages:
//   Stage I  (intra-row):    b[x][y] = s_r[x] ? a[x][R_x[y]] : a[x][y]
//   Stage II (intra-column): c[x][y] = s_c[y] ? b[C_y[x]][y] : b[x][y]
// and row c[x][*] goes to CNU(3,x). R_x and C_y are fixed random permutations
// (ldpc_pkg); a control bit of 0 selects the identity pattern, as in the source
// architecture. The k-bit control words s_r and s_c change every clock: word r of
// ROM R and ROM C is used for the r-th read cycle of check node processing (r =
// 0..L-1). The backward path (CNU(3,j) -> PE blocks) carries the 5-bit
// check-to-variable messages along exactly the inverse route, on its own wires,
// with the control words delayed by three clocks to match the CNU and register
// stages between shuffle and unshuffle.
//
// Timing: `step` is the read-cycle index in the cycle the EXT_RAMs are addressed;
// the ROMs are synchronous, so the control words are valid one clock later, when
// fwd_in arrives from the RAM read registers. fwd_out and bwd_out are combinational.
// ROM contents come from ldpc_pkg::rom_word (a seeded xorshift), this design's
// stand-in for the randomly generated control words of the source design.
// With the default tables, position (5,1) is a fixed point of both R_5 and C_1, so
// that word passes straight through whatever the control bits are; its output bits
// are plain wires from the matching inputs. This is a property of the chosen
// permutations, not a fault.
module ldpc_pi3
  import ldpc_pkg::*;
#(
  parameter int L   = 256,
  localparam int AW = $clog2(L)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [AW-1:0]           step,
  input  hyb_t [K-1:0][K-1:0]     fwd_in,   // a[x][y] from PE(x,y)
  output hyb_t [K-1:0][K-1:0]     fwd_out,  // c[x][y] to CNU(3,x) input y
  input  msg_t [K-1:0][K-1:0]     bwd_in,   // from CNU(3,x) output y
  output msg_t [K-1:0][K-1:0]     bwd_out   // to PE(x,y)
);
  function automatic logic [L-1:0][K-1:0] gen_rom(int seed);
    logic [L-1:0][K-1:0] r;
    for (int i = 0; i < L; i++) r[i] = rom_word(seed, i);
    return r;
  endfunction

  localparam logic [L-1:0][K-1:0] ROM_R = gen_rom(ROM_R_SEED);
  localparam logic [L-1:0][K-1:0] ROM_C = gen_rom(ROM_C_SEED);

  logic [K-1:0] sr_f, sc_f;            // forward control words
  logic [K-1:0] sr_d [3];              // delay line for the backward path
  logic [K-1:0] sc_d [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr_f <= '0;
      sc_f <= '0;
      for (int i = 0; i < 3; i++) begin
        sr_d[i] <= '0;
        sc_d[i] <= '0;
      end
    end else begin
      sr_f    <= ROM_R[step];
      sc_f    <= ROM_C[step];
      sr_d[0] <= sr_f;
      sc_d[0] <= sc_f;
      for (int i = 1; i < 3; i++) begin
        sr_d[i] <= sr_d[i-1];
        sc_d[i] <= sc_d[i-1];
      end
    end
  end

  logic [K-1:0] sr_b, sc_b;
  assign sr_b = sr_d[2];
  assign sc_b = sc_d[2];

  // Forward path
  hyb_t [K-1:0][K-1:0] fb;
  always_comb begin
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++)
        fb[x][y] = sr_f[x] ? fwd_in[x][R_PERM[x][y]] : fwd_in[x][y];
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++)
        fwd_out[x][y] = sc_f[y] ? fb[C_PERM[y][x]][y] : fb[x][y];
  end

  // Backward path: inverse of each stage, applied in reverse order
  msg_t [K-1:0][K-1:0] bb;
  always_comb begin
    bb      = '0;
    bwd_out = '0;
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++)
        if (sc_b[y]) bb[C_PERM[y][x]][y] = bwd_in[x][y];
        else         bb[x][y]            = bwd_in[x][y];
    for (int x = 0; x < K; x++)
      for (int y = 0; y < K; y++)
        if (sr_b[x]) bwd_out[x][R_PERM[x][y]] = bb[x][y];
        else         bwd_out[x][y]            = bb[x][y];
  end
endmodule
