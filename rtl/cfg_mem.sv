// cfg_mem: write-only FPGA configuration memory.
//
// The embedded processor reconfigures the FPGA by writing single bytes: the
// 24-bit address is split into FPGAX (PLB column), FPGAY (PLB row) and FPGAZ
// (byte within the PLB), and each write of the FPGAD data byte is one
// configuration clock. There is no read-back path, as on the target device.
//
// Per PLB this memory keeps four bytes (LUT A, LUT B, control, routing; see
// bist_pkg). A write to Z = 4 is not stored: it is passed on as a one-cycle
// flip-flop preset (ff_set) so the processor can initialise PLB flip-flops
// without clocking the fabric. Writes to X = Y = 8'hFF go to the global
// bytes (clock route, scan-out route, repeater direction, RAM ORA routing).
// Writes to any other address outside the array are ignored.
//
// Timing: a write on cycle t is visible on cfg/gcfg from cycle t+1; ff_set is
// combinational from the write strobe. The memory has no reset: its contents
// are undefined until the processor clears it, which the BIST program does
// first. The byte map is this design's own; the address split and the
// write-only access follow the method.
module cfg_mem
  import bist_pkg::*;
#(
  parameter int unsigned N = 48
) (
  input  logic        clk,
  input  logic        cfg_we,
  input  logic [7:0]  fpgax,
  input  logic [7:0]  fpgay,
  input  logic [7:0]  fpgaz,
  input  logic [7:0]  fpgad,
  output cell_cfg_t   cfg [N][N],     // [x][y]
  output global_cfg_t gcfg,
  output logic        ff_set,
  output logic [7:0]  ff_set_x,
  output logic [7:0]  ff_set_y,
  output logic        ff_set_d
);

  logic in_array;
  logic is_global;

  assign in_array  = (32'(fpgax) < N) && (32'(fpgay) < N);
  assign is_global = (fpgax == GLOBAL_XY) && (fpgay == GLOBAL_XY);

  for (genvar gx = 0; gx < N; gx++) begin : g_x
    for (genvar gy = 0; gy < N; gy++) begin : g_y
      logic hit;
      assign hit = cfg_we && (32'(fpgax) == gx) && (32'(fpgay) == gy);
      always_ff @(posedge clk) begin
        if (hit) begin
          unique case (fpgaz)
            Z_LUTA:  cfg[gx][gy].luta  <= fpgad;
            Z_LUTB:  cfg[gx][gy].lutb  <= fpgad;
            Z_CTRL:  cfg[gx][gy].ctrl  <= ctrl_t'(fpgad);
            Z_ROUTE: cfg[gx][gy].route <= route_t'(fpgad);
            default: ;
          endcase
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (cfg_we && is_global) begin
      unique case (fpgaz)
        G_CLK:   gcfg.clk_route <= fpgad[0];
        G_SCAN:  begin
                   gcfg.scan_col <= fpgad[5:0];
                   gcfg.scan_en  <= fpgad[6];
                 end
        G_REP:   gcfg.rep_east <= fpgad[0];
        G_RAM:   gcfg.ram_mode <= ram_mode_e'(fpgad[1:0]);
        default: ;
      endcase
    end
  end

  assign ff_set   = cfg_we && in_array && (fpgaz == Z_FFSET);
  assign ff_set_x = fpgax;
  assign ff_set_y = fpgay;
  assign ff_set_d = fpgad[0];

endmodule
