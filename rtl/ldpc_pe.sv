// ldpc_pe: PE block PE(x,y) of the partly parallel decoder (X = x, Y = y, 0-based).
//
// A PE block owns the L variable nodes of one variable node group and holds every
// message of those nodes: three EXT_RAMs (L x 6 bits; location d holds the message
// exchanged between node d and its neighbour in check node group i), INT_RAM
// (intrinsic messages, two banks: current frame and next frame) and DEC_RAM (hard
// decisions, two banks: current frame and previous frame). It also holds the
// variable node unit and the three address generators.
//
// Check node processing (cn_rd high for L cycles): EXT_RAM_i is read at the address
// of AG(i) and the word goes out on h_out[i] one clock later (Read stage). The
// check-to-variable message comes back on beta_in[i] four clocks after that and is
// written to the same location, using the read address delayed by five clocks.
// AG(1) starts at 0, AG(2) at ((x-1)*y) mod L (1-based x,y), AG(3) at t(x,y); all are
// loaded by ag_load the cycle before the first read.
// Variable node processing (vn_rd high for L cycles): all RAMs are read at vn_addr;
// the VNU output is written back three clocks later (Read, VNU first half, VNU second
// half), the hybrid words into the EXT_RAMs and the hard decision into DEC_RAM.
// Initialisation (init and vn_rd high): the same pass with the VNU's check-to-variable
// inputs forced to zero, so the EXT_RAMs receive sign(z) f(|z|) and DEC_RAM the
// channel hard decision. Using the VNU for this pass and recording the channel
// decision are this design's choices; the source architecture only states that
// initialisation takes L cycles.
// Intrinsic load: ld_sel_in[0] selects this block; the word is written into the
// next-frame INT_RAM bank at ld_addr_in. Data, address and the shifted select vector
// are passed registered to PE(x+1,y). The top bit of ld_sel_out is always 0 (the
// select vector shifts right by one per row), which is intended.
// Decision readout: rd_addr_in reads the previous-frame DEC_RAM bank; one clock
// later bit Y of dec_bus_in is replaced by the decision and the bus and the address
// are passed registered to PE(x,y+1).
module ldpc_pe
  import ldpc_pkg::*;
#(
  parameter int L   = 256,
  parameter int X   = 0,
  parameter int Y   = 0,
  localparam int AW = $clog2(L)
) (
  input  logic            clk,
  input  logic            rst_n,
  // decoder control
  input  logic            ag_load,
  input  logic            cn_rd,
  input  logic            vn_rd,
  input  logic            init,
  input  logic [AW-1:0]   vn_addr,
  input  logic            int_bank,   // INT_RAM bank of the frame being decoded
  input  logic            dec_bank,   // DEC_RAM bank of the frame being decoded
  // check node datapath
  output hyb_t [2:0]      h_out,
  input  msg_t [2:0]      beta_in,
  // intrinsic load chain (down the column)
  input  logic [K-1:0]    ld_sel_in,
  input  logic [AW-1:0]   ld_addr_in,
  input  msg_t            ld_data_in,
  output logic [K-1:0]    ld_sel_out,
  output logic [AW-1:0]   ld_addr_out,
  output msg_t            ld_data_out,
  // decision readout chain (along the row)
  input  logic [AW-1:0]   rd_addr_in,
  input  logic [K-1:0]    dec_bus_in,
  output logic [AW-1:0]   rd_addr_out,
  output logic [K-1:0]    dec_bus_out
);
  localparam int START [3] = '{0, ag2_start(X, Y, L), t_xy(X, Y) % L};

  // ---- address generators and write-address delay lines -------------------------
  logic [AW-1:0] ag   [3];
  logic [AW-1:0] ag_d [3][5];   // ag_d[i][4] = ag[i] five clocks ago
  logic [AW-1:0] va_d [3];      // va_d[2]    = vn_addr three clocks ago
  logic [4:0]    cn_d;          // cn_rd history
  logic [2:0]    vn_d;          // vn_rd history
  logic          init_d;

  for (genvar i = 0; i < 3; i++) begin : g_ag
    ldpc_addr_gen #(.L(L), .START(START[i])) u_ag (
      .clk, .rst_n, .load(ag_load), .en(cn_rd), .addr(ag[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 3; i++) begin
        for (int s = 0; s < 5; s++) ag_d[i][s] <= '0;
        va_d[i] <= '0;
      end
      cn_d   <= '0;
      vn_d   <= '0;
      init_d <= 1'b0;
    end else begin
      for (int i = 0; i < 3; i++) begin
        ag_d[i][0] <= ag[i];
        for (int s = 1; s < 5; s++) ag_d[i][s] <= ag_d[i][s-1];
      end
      va_d[0] <= vn_addr;
      va_d[1] <= va_d[0];
      va_d[2] <= va_d[1];
      cn_d    <= {cn_d[3:0], cn_rd};
      vn_d    <= {vn_d[1:0], vn_rd};
      init_d  <= init;
    end
  end

  logic cn_we, vn_we;
  assign cn_we = cn_d[4];
  assign vn_we = vn_d[2];

  // ---- EXT_RAM_1..3 -------------------------------------------------------------
  hyb_t [2:0] vnu_x;
  logic       vnu_hd;

  for (genvar i = 0; i < 3; i++) begin : g_ext
    logic [AW-1:0] ra, wa;
    hyb_t          wd;
    assign ra = cn_rd ? ag[i] : vn_addr;
    assign wa = cn_we ? ag_d[i][4] : va_d[2];
    assign wd = cn_we ? {1'b0, beta_in[i]} : vnu_x[i];
    ldpc_ram #(.DEPTH(L), .WIDTH(HYB_W)) u_ext (
      .clk, .raddr(ra), .rdata(h_out[i]), .we(cn_we || vn_we), .waddr(wa), .wdata(wd)
    );
  end

  // ---- INT_RAM: two banks, bank bit is the top address bit ----------------------
  msg_t z;
  ldpc_ram #(.DEPTH(2*L), .WIDTH(MSG_W)) u_int (
    .clk,
    .raddr({int_bank, vn_addr}),
    .rdata(z),
    .we   (ld_sel_in[0]),
    .waddr({~int_bank, ld_addr_in}),
    .wdata(ld_data_in)
  );

  // ---- VNU ------------------------------------------------------------------------
  msg_t [2:0] vnu_y;
  always_comb
    for (int i = 0; i < 3; i++) vnu_y[i] = init_d ? '0 : h_out[i][MSG_W-1:0];

  ldpc_vnu u_vnu (
    .clk, .rst_n, .z_in(z), .y_in(vnu_y), .x_out(vnu_x), .hd_out(vnu_hd)
  );

  // ---- DEC_RAM: two banks ---------------------------------------------------------
  logic dec_q;
  ldpc_ram #(.DEPTH(2*L), .WIDTH(1)) u_dec (
    .clk,
    .raddr({~dec_bank, rd_addr_in}),
    .rdata(dec_q),
    .we   (vn_we),
    .waddr({dec_bank, va_d[2]}),
    .wdata(vnu_hd)
  );

  // ---- load and readout chains ----------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_sel_out  <= '0;
      ld_addr_out <= '0;
      ld_data_out <= '0;
      rd_addr_out <= '0;
      dec_bus_out <= '0;
    end else begin
      ld_sel_out  <= ld_sel_in >> 1;
      ld_addr_out <= ld_addr_in;
      ld_data_out <= ld_data_in;
      rd_addr_out <= rd_addr_in;
      dec_bus_out <= dec_bus_in;
      dec_bus_out[Y] <= dec_q;
    end
  end
endmodule
