// tb_ldpc_flut: exhaustive check of the f() look-up table against real arithmetic.
module tb_ldpc_flut;
  import ldpc_ref_pkg::*;
  logic [5:0] mi;
  logic [3:0] mo;
  int checks = 0, failures = 0;

  ldpc_flut dut (.mag_in(mi), .mag_out(mo));

  initial begin
    for (int m = 0; m < 64; m++) begin
      mi = 6'(m);
      #1;
      checks++;
      if (int'(mo) != ref_f(m)) begin
        failures++;
        $display("FAIL m=%0d got %0d exp %0d", m, mo, ref_f(m));
      end
    end
    // f is decreasing: spot-check monotonicity as well
    for (int m = 1; m < 64; m++) begin
      checks++;
      if (ref_f(m) > ref_f(m - 1)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
