// fpslic_bist_top: FPGA core of a processor-plus-FPGA SoC, seen as the target
// of processor-driven built-in self-test.
//
// The embedded processor (outside this module) tests the FPGA without any
// configuration download: it writes the BIST structure byte by byte into the
// configuration memory, clocks the BIST through the 8-bit processor bus, then
// reconfigures the ORAs as a scan chain and reads the results back over the
// same bus. This top connects:
//   cfg_mem            configuration memory, write-only, FPGAX/Y/Z + FPGAD
//   logic_bist_fabric  N x N PLB array built into TPG / BUT / ORA columns
//   ram_bist           the (N/4)^2 free RAMs with their ORAs
//   avr_fpga_if        BIST clock, registered RAM TPG and scan-out read-back
// The free RAMs' ORA routing (RAM BIST mode) is a global configuration byte.
//
// Interface: the configuration write port (cfg_we with fpgax/fpgay/fpgaz/
// fpgad, one byte per clk cycle) and the processor bus (iosel, iowe, iore,
// dbus_wr, dbus_rd). The bidirectional data bus appears as two directions.
// Timing: all state is on clk; rst_n resets only the bus registers, the
// configuration is cleared by the processor's own writes.
module fpslic_bist_top
  import bist_pkg::*;
#(
  parameter int unsigned N    = 48,
  parameter int unsigned NRAM = (N / 4) * (N / 4)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cfg_we,
  input  logic [7:0]  fpgax,
  input  logic [7:0]  fpgay,
  input  logic [7:0]  fpgaz,
  input  logic [7:0]  fpgad,
  input  logic [15:0] iosel,
  input  logic        iowe,
  input  logic        iore,
  input  logic [7:0]  dbus_wr,
  output logic [7:0]  dbus_rd
);

  cell_cfg_t   cfg [N][N];
  global_cfg_t gcfg;
  logic        ff_set, ff_set_d;
  logic [7:0]  ff_set_x, ff_set_y;
  logic        bist_clk, logic_scan, ram_scan;
  ram_tpg_t    tpg;

  cfg_mem #(.N(N)) u_cfg (
    .clk      (clk),
    .cfg_we   (cfg_we),
    .fpgax    (fpgax),
    .fpgay    (fpgay),
    .fpgaz    (fpgaz),
    .fpgad    (fpgad),
    .cfg      (cfg),
    .gcfg     (gcfg),
    .ff_set   (ff_set),
    .ff_set_x (ff_set_x),
    .ff_set_y (ff_set_y),
    .ff_set_d (ff_set_d)
  );

  logic_bist_fabric #(.N(N)) u_fabric (
    .clk      (clk),
    .bist_clk (bist_clk),
    .cfg      (cfg),
    .gcfg     (gcfg),
    .ff_set   (ff_set),
    .ff_set_x (ff_set_x),
    .ff_set_y (ff_set_y),
    .ff_set_d (ff_set_d),
    .scan_out (logic_scan)
  );

  ram_bist #(.NRAM(NRAM)) u_ram (
    .clk      (clk),
    .ce       (bist_clk && gcfg.clk_route),
    .mode     (gcfg.ram_mode),
    .tpg      (tpg),
    .scan_out (ram_scan)
  );

  avr_fpga_if u_if (
    .clk        (clk),
    .rst_n      (rst_n),
    .iosel      (iosel),
    .iowe       (iowe),
    .iore       (iore),
    .dwr        (dbus_wr),
    .logic_scan (logic_scan),
    .ram_scan   (ram_scan),
    .drd        (dbus_rd),
    .bist_clk   (bist_clk),
    .tpg        (tpg)
  );

endmodule
