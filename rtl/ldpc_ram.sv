// ldpc_ram: DEPTH x WIDTH synchronous RAM with one read port and one write port.
//
// Models the on-chip RAM blocks of a PE block (EXT_RAM_1..3, each bank of INT_RAM
// and of DEC_RAM). The read data appears one clock after the read address (the
// "Read" pipeline stage). A write takes effect at the clock edge; a read of the same
// address in the same cycle returns the old contents. The source design uses
// single-port 256 x 8 block RAMs clocked at twice the decoder clock to get one read
// and one write per decoder cycle; here the two accesses are separate ports, which
// is the same behaviour at the decoder clock. Contents are not reset.
module ldpc_ram #(
  parameter int DEPTH = 256,
  parameter int WIDTH = 6,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
