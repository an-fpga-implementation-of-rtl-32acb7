// ldpc_bin_decoder: binary decoder of the PE-select field of the intrinsic load address.
//
// The load address is {PE index, location}; the upper ceil(log2 k^2) bits name one
// of the k^2 PE blocks. This block turns that field into a k^2-bit one-hot select,
// gated by `valid`. Bit (x*k + y) selects PE(x,y) (0-based). PE index values of k^2
// and above select nothing. Combinational, as in the input structure of the source
// architecture; the PE numbering is this design's choice.
module ldpc_bin_decoder #(
  parameter int N   = 36,
  localparam int SW = $clog2(N)
) (
  input  logic          valid,
  input  logic [SW-1:0] idx,
  output logic [N-1:0]  sel
);
  always_comb begin
    sel = '0;
    for (int i = 0; i < N; i++)
      sel[i] = valid && (int'(idx) == i);
  end
endmodule
