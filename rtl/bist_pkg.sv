// bist_pkg: types and constants shared by the processor-reconfigured BIST
// fabric.
//
// The processor writes the FPGA configuration memory one byte at a time,
// addressed by column (FPGAX), row (FPGAY) and byte-within-PLB (FPGAZ).
// The device's real byte map is proprietary, so this package defines a
// compact map of its own:
//   Z = 0  LUT A truth table        (bit i = output for input value i)
//   Z = 1  LUT B truth table
//   Z = 2  control byte (ctrl_t)    role, D/X/Y multiplexer selects, clock enable
//   Z = 3  routing byte (route_t)   ORA routing scheme and side, TPG counter bit
//   Z = 4  flip-flop preset         a write loads bit 0 into the PLB flip-flop
// Bytes that belong to no single PLB (the global clock line, the scan-out
// route, the top/bottom repeaters and the RAM ORA routing) sit at
// FPGAX = FPGAY = 8'hFF, Z = 0..3.
//
// The AVR-FPGA bus has 16 decoded I/O selects; the codes used by the BIST
// are listed below as IOS_*.
package bist_pkg;

  // ---- PLB configuration bytes ----------------------------------------
  localparam logic [7:0] Z_LUTA  = 8'd0;
  localparam logic [7:0] Z_LUTB  = 8'd1;
  localparam logic [7:0] Z_CTRL  = 8'd2;
  localparam logic [7:0] Z_ROUTE = 8'd3;
  localparam logic [7:0] Z_FFSET = 8'd4;

  // ---- global configuration bytes (at X = Y = GLOBAL_XY) ---------------
  localparam logic [7:0] GLOBAL_XY = 8'hFF;
  localparam logic [7:0] G_CLK  = 8'd0;  // bit 0: FPGAIOWE drives a global clock line
  localparam logic [7:0] G_SCAN = 8'd1;  // bits 5:0 column of last ORA, bit 6 route enable
  localparam logic [7:0] G_REP  = 8'd2;  // bit 0: top/bottom repeaters pass east-to-west
  localparam logic [7:0] G_RAM  = 8'd3;  // bits 1:0 RAM ORA routing (ram_mode_e)

  // Role a PLB plays in the BIST structure.
  typedef enum logic [1:0] {
    ROLE_NONE = 2'd0,
    ROLE_TPG  = 2'd1,
    ROLE_BUT  = 2'd2,
    ROLE_ORA  = 2'd3
  } role_e;

  // Control byte, Z = 2.
  typedef struct packed {
    logic [1:0] rsv;     // unused, written 0
    logic       clk_en;  // clock routed to this PLB
    logic       ysel;    // Y-output: 0 = LUT B, 1 = flip-flop
    logic       xsel;    // X-output: 0 = LUT A, 1 = flip-flop
    logic       dsel;    // flip-flop D: 0 = LUT A, 1 = LUT B
    role_e      role;
  } ctrl_t;

  // Routing byte, Z = 3.
  typedef struct packed {
    logic [1:0] rsv;
    logic       grp;     // TPG: 0 = upper counter, 1 = lower counter
    logic [2:0] bit_idx; // TPG: counter bit this PLB holds
    logic       orient;  // ORA: 0 = Y from west BUT / X from east BUT, 1 = mirrored
    logic       scheme;  // ORA: 0 = routing scheme 1, 1 = routing scheme 2
  } route_t;

  typedef struct packed {
    logic [7:0] luta;
    logic [7:0] lutb;
    ctrl_t      ctrl;
    route_t     route;
  } cell_cfg_t;

  // RAM BIST modes (Table 5 of the method: three configurations suffice).
  typedef enum logic [1:0] {
    RAM_SP_SYNC  = 2'd0,
    RAM_SP_ASYNC = 2'd1,
    RAM_DP_SYNC  = 2'd2,
    RAM_RSV      = 2'd3
  } ram_mode_e;

  typedef struct packed {
    logic       clk_route;  // FPGAIOWE routed to the global clock
    logic       scan_en;    // scan-out path routed to the data bus
    logic [5:0] scan_col;   // column whose top ORA ends the scan chain
    logic       rep_east;   // TPG buses flow east-to-west
    ram_mode_e  ram_mode;
  } global_cfg_t;

  // ---- AVR I/O selects ---------------------------------------------------
  localparam int IOS_WADDR = 0;  // RAM TPG write address  [4:0]
  localparam int IOS_RADDR = 1;  // RAM TPG read address   [4:0]
  localparam int IOS_DATA  = 2;  // RAM TPG data           [3:0]
  localparam int IOS_CTRL  = 3;  // RAM TPG control: {ora_rst, shift, oen, we}
  localparam int IOS_CLK   = 4;  // write: one BIST clock
  localparam int IOS_SCAN  = 5;  // read: bit 0 logic scan-out, bit 1 RAM scan-out

  typedef struct packed {
    logic [4:0] waddr;
    logic [4:0] raddr;
    logic [3:0] data;
    logic       we;
    logic       oen;      // active-low read enable
    logic       shift;    // ORA shift control
    logic       ora_rst;  // clear ORA flags on the next BIST clock
  } ram_tpg_t;

  // PLB configurations used by the BIST routines.
  localparam logic [7:0] LUT_ORA_CMP  = 8'hF6;  // {q,x,y}: (x ^ y) | q
  localparam logic [7:0] LUT_PASS0    = 8'hAA;  // output = input 0
  localparam logic [7:0] LUT_TPG_SUM  = 8'h66;  // {0,cin,q}: q ^ cin
  localparam logic [7:0] LUT_TPG_CRY  = 8'h88;  // {0,cin,q}: q & cin

endpackage
