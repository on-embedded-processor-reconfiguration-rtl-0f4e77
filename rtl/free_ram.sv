// free_ram: one 32 x 4 "free" RAM embedded in the FPGA array.
//
// One such RAM serves each 4 x 4 group of PLBs. It works as a single-port RAM
// (read and write at addr_a) or a dual-port RAM (write at addr_a, read at
// addr_b), each with a synchronous or an asynchronous read. Writes happen on
// a clk edge with ce and we high in every mode. A synchronous read registers
// the addressed word on a clk edge with ce high; an asynchronous read shows it
// combinationally. Size and modes follow the method; the write timing and the
// mapping of the ports are this design's own. Contents are not reset.
module free_ram #(
  parameter int unsigned AW = 5,
  parameter int unsigned DW = 4
) (
  input  logic          clk,
  input  logic          ce,
  input  logic          dp,        // 1 = dual-port (read at addr_b)
  input  logic          async_rd,  // 1 = asynchronous read
  input  logic          we,
  input  logic [AW-1:0] addr_a,
  input  logic [AW-1:0] addr_b,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [2**AW];
  logic [DW-1:0] rd_reg;
  logic [AW-1:0] raddr;

  assign raddr = dp ? addr_b : addr_a;

  always_ff @(posedge clk) begin
    if (ce) begin
      if (we) mem[addr_a] <= din;
      rd_reg <= mem[raddr];
    end
  end

  assign dout = async_rd ? mem[raddr] : rd_reg;

endmodule
