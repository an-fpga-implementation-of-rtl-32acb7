// tb_ldpc_pe: one PE block, PE(1,2), with L = 16, driven like the controller does.
//   1. intrinsic load through the load chain into the next-frame INT_RAM bank;
//   2. initialisation pass (VNU with zero check-to-variable inputs);
//   3. check node pass: h_out must show the initial hybrid words in the order of the
//      three address generators (start 0, ((x-1)*y) mod L, t(x,y) mod L); a loop that
//      stands in for shuffle + CNU returns a pseudo-random message for each word four
//      clocks later;
//   4. variable node pass, then a second check node pass: h_out must now be the VNU
//      result computed by the reference model from z and the returned messages;
//   5. decision readout through the readout chain.
// Also checks the register stages of the load and readout chains.
module tb_ldpc_pe;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  localparam int L = 16, X = 1, Y = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ag_load = 0, cn_rd = 0, vn_rd = 0, init = 0, int_bank = 0, dec_bank = 0;
  logic [3:0] vn_addr = '0;
  hyb_t [2:0] h_out;
  msg_t [2:0] beta_in;
  logic [K-1:0] ld_sel_in = '0, ld_sel_out;
  logic [3:0] ld_addr_in = '0, ld_addr_out, rd_addr_in = '0, rd_addr_out;
  msg_t ld_data_in = '0, ld_data_out;
  logic [K-1:0] dec_bus_in = '0, dec_bus_out;
  int checks = 0, failures = 0;

  ldpc_pe #(.L(L), .X(X), .Y(Y)) dut (.*);

  logic [4:0] z [L];
  logic [5:0] exp_ext [3][L];
  logic       exp_dec [L];
  int start [3];

  // loop-back model of shuffle + CNU: message returned 4 clocks after h_out
  msg_t [2:0] ret_q [4];
  msg_t [2:0] ret_c;
  logic [3:0] cn_q;
  always_ff @(posedge clk) begin
    cn_q <= {cn_q[2:0], cn_rd};
    ret_q[0] <= ret_c;
    for (int k = 1; k < 4; k++) ret_q[k] <= ret_q[k-1];
  end
  assign beta_in = ret_q[3];

  task automatic vn_pass(bit is_init);
    init = is_init;
    for (int a = 0; a < L + 3; a++) begin
      vn_rd = (a < L); vn_addr = 4'(a % L);
      @(negedge clk);
    end
    vn_rd = 0; init = 0;
  endtask

  task automatic cn_pass(bit chk_only);
    logic [5:0] got [3][L];
    ag_load = 1; @(negedge clk); ag_load = 0;
    for (int t = 0; t < L + 5; t++) begin
      cn_rd = (t < L);
      @(negedge clk);
      // h_out now holds the word read in cycle t
      if (t < L)
        for (int i = 0; i < 3; i++) begin
          int a;
          a = (start[i] + t) % L;
          checks++;
          if (h_out[i] !== exp_ext[i][a]) begin
            failures++;
            if (failures < 8) $display("FAIL cn i=%0d a=%0d got %h exp %h", i, a, h_out[i], exp_ext[i][a]);
          end
          ret_c[i] = 5'($urandom);
          exp_ext[i][a] = {1'b0, ret_c[i]};
        end
    end
    cn_rd = 0;
  endtask

  initial begin
    logic [4:0] y3 [3];
    logic [5:0] xo [3];
    logic hd;
    start[0] = 0; start[1] = (X * (Y + 1)) % L; start[2] = t_xy(X, Y) % L;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // 1. load: int_bank = 0 so the load goes to bank 1
    for (int a = 0; a < L; a++) begin
      z[a] = 5'($urandom);
      ld_sel_in = 6'b000101; ld_addr_in = 4'(a); ld_data_in = z[a];
      @(negedge clk);
      checks += 3;
      if (ld_sel_out !== 6'b000010) failures++;
      if (ld_addr_out !== 4'(a)) failures++;
      if (ld_data_out !== z[a]) failures++;
    end
    ld_sel_in = '0;
    // a load addressed to another PE must not write: try to overwrite location 0
    ld_sel_in = 6'b000010; ld_addr_in = 0; ld_data_in = ~z[0]; @(negedge clk); ld_sel_in = '0;
    int_bank = 1;
    // 2. initialisation
    for (int i = 0; i < 3; i++) y3[i] = 5'd0;
    for (int a = 0; a < L; a++) begin
      ref_vnu(z[a], y3, xo, hd);
      for (int i = 0; i < 3; i++) exp_ext[i][a] = xo[i];
    end
    vn_pass(1);
    // 3. check node pass
    cn_pass(0);
    // 4. variable node pass, second check node pass
    for (int a = 0; a < L; a++) begin
      for (int i = 0; i < 3; i++) y3[i] = exp_ext[i][a][4:0];
      ref_vnu(z[a], y3, xo, hd);
      for (int i = 0; i < 3; i++) exp_ext[i][a] = xo[i];
      exp_dec[a] = hd;
    end
    vn_pass(0);
    cn_pass(1);
    // 5. readout: decoder wrote bank 0; select bank 1 for decoding so bank 0 is read out
    dec_bank = 1;
    for (int t = 0; t < L + 2; t++) begin
      rd_addr_in = 4'(t % L);
      dec_bus_in = 6'(t * 7);
      @(negedge clk);
      checks++;
      if (rd_addr_out !== 4'(t % L)) failures++;
      if (t >= 1) begin
        // dec_bus_out now: bus of cycle t with bit Y = decision of address t-1 (the
        // bus is one clock behind the address, as it is along a PE row)
        logic [K-1:0] e;
        e = 6'(t * 7);
        e[Y] = exp_dec[t - 1];
        checks++;
        if (dec_bus_out !== e) begin
          failures++;
          if (failures < 8) $display("FAIL readout a=%0d got %b exp %b", t - 1, dec_bus_out, e);
        end
      end
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
