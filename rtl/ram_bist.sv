// ram_bist: BIST of all free RAMs with the test patterns supplied by the
// processor.
//
// The RAM test algorithms (March LR, March Y, a dual-port test) are too
// irregular to build as TPGs in PLBs, so the processor is the TPG: it loads
// the registered TPG (addresses, data, write enable, OEN, shift, ORA reset)
// over the bus and then gives one BIST clock. Every RAM sees the same TPG.
// Each RAM data bit has a ram_bist_ora: in single-port modes it checks the
// RAM against the expected TPG data, in dual-port mode it compares the RAM
// with the previous RAM (RAM 0 with the last one). The mode only changes the
// ORA routing, as in the method:
//   RAM_SP_SYNC   single-port, synchronous read
//   RAM_SP_ASYNC  single-port, asynchronous read
//   RAM_DP_SYNC   dual-port, synchronous read (write at waddr, read at raddr)
// The ORA flags form one scan chain, RAM 0 bit 0 first; scan_out is the flag
// of the last RAM's bit 3.
//
// Timing: with a synchronous read, read data appear one BIST clock after the
// address, so the processor compares on the second clock of a read (first
// clock with OEN high, second with OEN low). An asynchronous read compares on
// the first clock. The ring order and chain order are this design's own.
module ram_bist
  import bist_pkg::*;
#(
  parameter int unsigned NRAM = 144
) (
  input  logic      clk,
  input  logic      ce,
  input  ram_mode_e mode,
  input  ram_tpg_t  tpg,
  output logic      scan_out
);

  localparam int unsigned DW = 4;

  logic dp, async_rd;
  logic [DW-1:0] dout   [NRAM];
  logic [DW-1:0] to_ram [NRAM];
  logic [DW-1:0] flag   [NRAM];

  assign dp       = (mode == RAM_DP_SYNC);
  assign async_rd = (mode == RAM_SP_ASYNC);

  for (genvar i = 0; i < NRAM; i++) begin : g_ram
    localparam int PREV = (i == 0) ? NRAM - 1 : i - 1;

    free_ram #(.AW(5), .DW(DW)) u_ram (
      .clk      (clk),
      .ce       (ce),
      .dp       (dp),
      .async_rd (async_rd),
      .we       (tpg.we),
      .addr_a   (tpg.waddr),
      .addr_b   (tpg.raddr),
      .din      (to_ram[i]),
      .dout     (dout[i])
    );

    for (genvar j = 0; j < DW; j++) begin : g_bit
      logic sin;
      if (j > 0) begin : g_in
        assign sin = flag[i][j-1];
      end else if (i > 0) begin : g_prev
        assign sin = flag[i-1][DW-1];
      end else begin : g_first
        assign sin = 1'b0;
      end

      ram_bist_ora u_ora (
        .clk      (clk),
        .ce       (ce),
        .rst      (tpg.ora_rst),
        .dp       (dp),
        .oen      (tpg.oen),
        .tpg_d    (tpg.data[j]),
        .ram_i    (dout[i][j]),
        .ram_im1  (dout[PREV][j]),
        .shift    (tpg.shift),
        .shift_in (sin),
        .to_ram   (to_ram[i][j]),
        .q        (flag[i][j])
      );
    end
  end

  assign scan_out = flag[NRAM-1][DW-1];

endmodule
