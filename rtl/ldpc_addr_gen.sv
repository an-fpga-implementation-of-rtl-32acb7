// ldpc_addr_gen: address generator AG(i) of one EXT_RAM in a PE block.
//
// A ceil(log2 L)-bit binary counter that counts 0..L-1 and wraps to 0. It is loaded
// with START when `load` is high (the cycle before check node processing begins)
// and advances by one on every cycle with `en` high. With START = 0 it is AG(1), with
// START = ((x-1)*y) mod L it is AG(2), with START = t(x,y) it is AG(3), following
// the source architecture. `addr` is the registered count, so the first read of a
// check node phase uses START.
module ldpc_addr_gen #(
  parameter int L     = 256,
  parameter int START = 0,
  localparam int AW   = $clog2(L)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          en,
  output logic [AW-1:0] addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    addr <= AW'(START % L);
    else if (load) addr <= AW'(START % L);
    else if (en)   addr <= (int'(addr) == L - 1) ? '0 : addr + 1'b1;
  end
endmodule
