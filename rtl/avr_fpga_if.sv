// avr_fpga_if: FPGA side of the 8-bit AVR-FPGA data bus used by the BIST.
//
// The processor reaches the FPGA through an 8-bit data bus, 16 decoded I/O
// select lines and the FPGAIOWE / FPGAIORE strobes. For BIST the bus has
// three jobs:
//   * BIST clock: a write with I/O select IOS_CLK gives a one-cycle bist_clk
//     strobe, so the processor clocks the TPGs, BUTs, ORAs and RAMs itself.
//   * RAM TPG registers: the RAM test patterns come from the processor and are
//     registered here because the bus is only 8 bits wide. Selects IOS_WADDR,
//     IOS_RADDR, IOS_DATA and IOS_CTRL load the write address, read address,
//     data and control ({ora_rst, shift, oen, we}) registers.
//   * Scan-out: a read with IOS_SCAN returns the logic BIST scan-out on data
//     line 0 and the RAM BIST scan-out on line 1; other lines read 0.
// Write data lines 7..5 carry nothing (the widest register, a RAM address,
// has 5 bits) and read lines 7..2 are always 0; lint notes both.
// Clocking the BIST from the write strobe and registering the RAM TPG follow
// the method; the select codes and line numbers are this design's own, and
// the bidirectional bus appears as separate write and read directions.
//
// Timing: registers load on the clk edge of the write cycle; bist_clk and
// drd are combinational from the strobes. rst_n (active low, synchronous)
// clears the registers; oen resets high (no read).
module avr_fpga_if
  import bist_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] iosel,
  input  logic        iowe,
  input  logic        iore,
  input  logic [7:0]  dwr,
  input  logic        logic_scan,
  input  logic        ram_scan,
  output logic [7:0]  drd,
  output logic        bist_clk,
  output ram_tpg_t    tpg
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tpg     <= '0;
      tpg.oen <= 1'b1;
    end else if (iowe) begin
      if (iosel[IOS_WADDR]) tpg.waddr <= dwr[4:0];
      if (iosel[IOS_RADDR]) tpg.raddr <= dwr[4:0];
      if (iosel[IOS_DATA])  tpg.data  <= dwr[3:0];
      if (iosel[IOS_CTRL])  {tpg.ora_rst, tpg.shift, tpg.oen, tpg.we} <= dwr[3:0];
    end
  end

  assign bist_clk = iowe && iosel[IOS_CLK];
  assign drd      = (iore && iosel[IOS_SCAN]) ? {6'b0, ram_scan, logic_scan} : 8'h00;

  // The I/O select lines are decoded from one address: at most one is active.
  a_onehot_sel: assert property (@(posedge clk) disable iff (!rst_n)
                                 (iowe || iore) |-> $onehot0(iosel))
    else $error("more than one I/O select active");
  a_no_rw: assert property (@(posedge clk) disable iff (!rst_n) !(iowe && iore))
    else $error("read and write strobes together");

endmodule
