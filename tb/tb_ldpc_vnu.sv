// tb_ldpc_vnu: random and corner-case stimulus for the degree-3 variable node unit,
// compared with the reference variable node update; checks the 2-clock latency and
// the zero-input (initialisation) case.
module tb_ldpc_vnu;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  msg_t       z_in;
  msg_t [2:0] y_in;
  hyb_t [2:0] x_out;
  logic       hd_out;
  int checks = 0, failures = 0;

  ldpc_vnu dut (.clk, .rst_n, .z_in, .y_in, .x_out, .hd_out);

  typedef struct { logic [4:0] z; logic [4:0] y [3]; } vec_t;
  vec_t q [$];
  localparam int NVEC = 3000;

  initial begin
    vec_t v, c;
    logic [5:0] ex [3];
    logic eh;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NVEC + 2; t++) begin
      @(negedge clk);
      if (t >= 2) begin
        v = q.pop_front();
        ref_vnu(v.z, v.y, ex, eh);
        checks++;
        if (hd_out != eh) failures++;
        for (int i = 0; i < 3; i++) begin
          checks++;
          if (x_out[i] != ex[i]) begin
            failures++;
            if (failures < 10) $display("FAIL t=%0d i=%0d got %h exp %h", t, i, x_out[i], ex[i]);
          end
        end
      end
      c.z = 5'($urandom);
      for (int i = 0; i < 3; i++) c.y[i] = (t % 5 == 0) ? 5'd0 : 5'($urandom);
      if (t % 7 == 0) begin c.z = 5'd0; end            // lambda = 0 boundary cases
      z_in = c.z;
      for (int i = 0; i < 3; i++) y_in[i] = c.y[i];
      q.push_back(c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC * 2 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
