// ldpc_decoder_top: partly parallel decoder for a (3,k)-regular LDPC code of length
// N = L*k*k (default k = 6, L = 256: 9216 bits, rate 1/2), after the joint
// code/decoder design of the source architecture.
//
// Structure: k*k PE blocks PE(x,y), each holding the messages of L variable nodes and
// one VNU; 3k CNUs, CNU(i,j) serving check node group i; shuffle networks pi_1 and
// pi_2 (fixed, realising H1 and H2) and pi_3 (configurable, realising the random-like
// H3 together with the third address generators); a central controller.
// One iteration is a check node phase (every EXT_RAM word goes read -> shuffle ->
// CNU -> unshuffle -> write, k*k*3 messages per clock) followed by a variable node
// phase (every PE updates one variable node per clock). See ldpc_ctrl for the cycle
// counts and the early stop on satisfied parity checks.
//
// Interfaces (all synchronous to clk, active-low asynchronous reset):
//   Intrinsic load: one 5-bit sign-magnitude channel LLR per clock with ld_valid;
//     ld_addr = {PE index x*k+y, location d}; ld_last with the final word of a frame.
//     Load only while ld_ready is high. Words travel down the PE columns, one row per
//     clock, as in the source architecture's square floor plan.
//   Frame status: frame_done pulses when a frame has been decoded, with done_iters
//     (iterations run) and done_converged (1 = stopped because every parity check was
//     satisfied). Its decisions are then readable until the next frame_done.
//   Decision readout: present rd_addr = d; k+1 clocks later dec_out[x*k+y] is the hard
//     decision of node d of PE(x,y) (1 = bit value 1). The address travels along the
//     PE rows and every PE adds its bit to the row bus, as in the source architecture.
// The handshake signals, the PE numbering in ld_addr and dec_out, and the ld_ready
// hold-off until the last word has reached every row are this design's choices.
// Lint reports rst_n as both a synchronous and an asynchronous reset here; the
// synchronous use is the "disable iff" of the handshake assertions here and in
// ldpc_ctrl and makes no hardware.
module ldpc_decoder_top
  import ldpc_pkg::*;
#(
  parameter int L        = 256,
  parameter int MAX_ITER = 18,
  localparam int AW      = $clog2(L),
  localparam int SW      = $clog2(K * K),
  localparam int IW      = $clog2(MAX_ITER + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // intrinsic load
  input  logic             ld_valid,
  input  logic [SW+AW-1:0] ld_addr,
  input  msg_t             ld_data,
  input  logic             ld_last,
  output logic             ld_ready,
  // frame status
  output logic             frame_done,
  output logic [IW-1:0]    done_iters,
  output logic             done_converged,
  output phase_t           phase,
  // decision readout
  input  logic [AW-1:0]    rd_addr,
  output logic [K*K-1:0]   dec_out
);
  // ---- control ----------------------------------------------------------------------
  logic          ag_load, cn_rd, vn_rd, init, int_bank, dec_bank, parity_fail;
  logic [AW-1:0] vn_addr, step;
  logic [K-1:0]  last_d;   // ld_last delayed through the k rows of the load chain

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last_d <= '0;
    else        last_d <= {last_d[K-2:0], ld_valid && ld_last};
  end

  logic ctrl_ready;
  // ld_ready falls right after the last word of a frame, not only when the controller
  // has seen it at the end of the load chain.
  assign ld_ready = ctrl_ready && !(|last_d);

  // Load handshake: words may be offered only while ld_ready is high.
  assert property (@(posedge clk) disable iff (!rst_n) ld_valid |-> ld_ready)
    else $error("ld_valid while ld_ready is low");

  ldpc_ctrl #(.L(L), .MAX_ITER(MAX_ITER)) u_ctrl (
    .clk, .rst_n,
    .frame_loaded(last_d[K-1]),
    .ld_ready(ctrl_ready),
    .parity_fail,
    .phase,
    .ag_load, .cn_rd, .vn_rd, .init, .vn_addr, .step,
    .int_bank, .dec_bank,
    .frame_done, .done_iters, .done_converged
  );

  // ---- intrinsic load select ----------------------------------------------------------
  logic [K*K-1:0] pe_sel;
  ldpc_bin_decoder #(.N(K * K)) u_bdec (
    .valid(ld_valid), .idx(ld_addr[SW+AW-1:AW]), .sel(pe_sel)
  );

  // ---- PE array ---------------------------------------------------------------------
  hyb_t [2:0][K-1:0][K-1:0] h_all;
  msg_t [2:0][K-1:0][K-1:0] beta_all;

  logic [K-1:0]  ld_sel_w  [K+1][K];   // [row][column], row K unused
  logic [AW-1:0] ld_addr_w [K+1][K];
  msg_t          ld_data_w [K+1][K];
  logic [AW-1:0] rd_addr_w [K][K+1];   // [row][column], column K unused
  logic [K-1:0]  dec_bus_w [K][K+1];

  for (genvar y = 0; y < K; y++) begin : g_col_in
    for (genvar x = 0; x < K; x++) begin : g_sel
      assign ld_sel_w[0][y][x] = pe_sel[x*K + y];
    end
    assign ld_addr_w[0][y] = ld_addr[AW-1:0];
    assign ld_data_w[0][y] = ld_data;
  end

  for (genvar x = 0; x < K; x++) begin : g_row_in
    assign rd_addr_w[x][0] = rd_addr;
    assign dec_bus_w[x][0] = '0;
    assign dec_out[x*K +: K] = dec_bus_w[x][K];
  end

  for (genvar x = 0; x < K; x++) begin : g_x
    for (genvar y = 0; y < K; y++) begin : g_y
      hyb_t [2:0] h;
      msg_t [2:0] b;
      for (genvar i = 0; i < 3; i++) begin : g_i
        assign h_all[i][x][y] = h[i];
        assign b[i] = beta_all[i][x][y];
      end
      ldpc_pe #(.L(L), .X(x), .Y(y)) u_pe (
        .clk, .rst_n,
        .ag_load, .cn_rd, .vn_rd, .init, .vn_addr, .int_bank, .dec_bank,
        .h_out(h), .beta_in(b),
        .ld_sel_in (ld_sel_w[x][y]),  .ld_addr_in (ld_addr_w[x][y]),  .ld_data_in (ld_data_w[x][y]),
        .ld_sel_out(ld_sel_w[x+1][y]), .ld_addr_out(ld_addr_w[x+1][y]), .ld_data_out(ld_data_w[x+1][y]),
        .rd_addr_in (rd_addr_w[x][y]),   .dec_bus_in (dec_bus_w[x][y]),
        .rd_addr_out(rd_addr_w[x][y+1]), .dec_bus_out(dec_bus_w[x][y+1])
      );
    end
  end

  // ---- shuffle networks -------------------------------------------------------------
  hyb_t [2:0][K-1:0][K-1:0] cnu_in;
  msg_t [2:0][K-1:0][K-1:0] cnu_beta;

  ldpc_shuffle #(.L(L)) u_shuffle (
    .clk, .rst_n, .step,
    .h_in(h_all), .cnu_in, .cnu_beta, .beta_out(beta_all)
  );

  // ---- check node units -------------------------------------------------------------
  logic [3*K-1:0] par;
  for (genvar i = 0; i < 3; i++) begin : g_cg
    for (genvar j = 0; j < K; j++) begin : g_cnu
      ldpc_cnu #(.DEG(K)) u_cnu (
        .clk, .rst_n,
        .x_in(cnu_in[i][j]), .beta_out(cnu_beta[i][j]), .parity_out(par[i*K + j])
      );
    end
  end
  assign parity_fail = |par;
endmodule
