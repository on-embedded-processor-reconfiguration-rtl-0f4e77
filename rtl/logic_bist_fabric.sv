// logic_bist_fabric: the N x N PLB array as the logic BIST sees it.
//
// Every PLB is a plb_cell whose role comes from the configuration memory, so
// the processor builds the whole BIST structure by configuration writes:
// a TPG column (x = 0 for the west session, x = N-1 for the east session)
// holding two 5-bit counters, alternating columns of identically configured
// BUTs, and between each pair of BUT columns a column of ORAs that compare a
// direct Y-output from one BUT with a diagonal X-output from the other.
//
// Fixed wiring provided here (standing in for the local and bus routing):
//   * each PLB sees the Y-outputs of its west and east neighbours, the
//     X-outputs of its diagonal partners in the neighbouring columns under
//     routing scheme 1 (row pairs (0,1),(2,3),...) and scheme 2 (row pairs
//     (1,2),(3,4),... inside each half of the array, the first and last row
//     of a half paired with each other), and
//     the Y-output of the PLB below (counter carry);
//   * two TPG buses per side: bit b of the upper (lower) counter is the
//     flip-flop of the TPG-role PLB in column 0 or N-1 with group 0 (1) and
//     bit index b. The top/bottom repeaters carry either the west or the east
//     bus across the array (global byte G_REP); BUTs in the upper half rows
//     (y >= N/2) receive the upper counter, the others the lower one;
//   * the ORA scan chain runs upward in each column and from the top of a
//     column to the bottom of the column two to the east; a PLB passes its
//     flag on only when it is an ORA;
//   * the scan-out route (global byte G_SCAN) brings out the flag of the top
//     ORA of the selected column.
// The BIST clock is the processor's write strobe, reaching the PLBs only when
// the global clock route is configured (G_CLK). The structure follows the
// method; the row pairing, chain order and bus layout are this design's own.
//
// Timing: all flip-flops use clk; bist_clk is a one-cycle enable. scan_out
// is combinational from the flip-flops and the configuration.
//
// Lint reports the xo/yo arrays as circular combinational logic. No BIST
// configuration closes a loop (BUT outputs depend only on the TPG bus, the
// counter carry runs upward only, ORAs read BUTs), but the fabric is
// configurable like any FPGA: a configuration that makes two ORAs read each
// other would close one, so the warning stands.
// The RAM mode field of the global configuration is not used here.
module logic_bist_fabric
  import bist_pkg::*;
#(
  parameter int unsigned N = 48
) (
  input  logic        clk,
  input  logic        bist_clk,
  input  cell_cfg_t   cfg [N][N],
  input  global_cfg_t gcfg,
  input  logic        ff_set,
  input  logic [7:0]  ff_set_x,
  input  logic [7:0]  ff_set_y,
  input  logic        ff_set_d,
  output logic        scan_out
);

  logic xo [N][N];
  logic yo [N][N];
  logic qq [N][N];

  logic [4:0] west_bus [2];
  logic [4:0] east_bus [2];
  logic [4:0] tpg_bus  [2];
  logic       bist_ce;

  assign bist_ce = bist_clk && gcfg.clk_route;

  // TPG buses collected from the two edge columns.
  always_comb begin
    for (int g = 0; g < 2; g++) begin
      west_bus[g] = '0;
      east_bus[g] = '0;
    end
    for (int y = 0; y < int'(N); y++) begin
      if (cfg[0][y].ctrl.role == ROLE_TPG && qq[0][y])
        west_bus[cfg[0][y].route.grp][cfg[0][y].route.bit_idx] = 1'b1;
      if (cfg[N-1][y].ctrl.role == ROLE_TPG && qq[N-1][y])
        east_bus[cfg[N-1][y].route.grp][cfg[N-1][y].route.bit_idx] = 1'b1;
    end
    for (int g = 0; g < 2; g++)
      tpg_bus[g] = gcfg.rep_east ? east_bus[g] : west_bus[g];
  end

  for (genvar gx = 0; gx < N; gx++) begin : g_x
    for (genvar gy = 0; gy < N; gy++) begin : g_y
      // diagonal partner rows
      localparam int P1 = ((gy ^ 1) < N) ? (gy ^ 1) : gy - 1;
      localparam int H  = (N / 2 > 0) ? N / 2 : 1;         // rows per half
      localparam int HB = (gy >= H) ? H : 0;                // first row of this half
      localparam int HR = (gy >= H) ? N - H : H;            // rows in this half
      localparam int R  = gy - HB;
      localparam int P2 = HB + ((R % 2 == 1) ? ((R + 1 < HR) ? R + 1 : 0)
                                             : ((R >= 1) ? R - 1 : HR - 1));
      localparam int HALF = (gy >= N / 2) ? 0 : 1;

      logic w_y, e_y, w_xd1, w_xd2, e_xd1, e_xd2, s_y, s_chain, scan_in;

      if (gx > 0) begin : g_w
        assign w_y   = yo[gx-1][gy];
        assign w_xd1 = xo[gx-1][P1];
        assign w_xd2 = xo[gx-1][P2];
      end else begin : g_nw
        assign w_y   = 1'b0;
        assign w_xd1 = 1'b0;
        assign w_xd2 = 1'b0;
      end

      if (gx < N - 1) begin : g_e
        assign e_y   = yo[gx+1][gy];
        assign e_xd1 = xo[gx+1][P1];
        assign e_xd2 = xo[gx+1][P2];
      end else begin : g_ne
        assign e_y   = 1'b0;
        assign e_xd1 = 1'b0;
        assign e_xd2 = 1'b0;
      end

      if (gy > 0) begin : g_s
        assign s_y     = yo[gx][gy-1];
        assign s_chain = cfg[gx][gy-1].ctrl.role == ROLE_TPG
                      && cfg[gx][gy].ctrl.role == ROLE_TPG
                      && cfg[gx][gy-1].route.grp == cfg[gx][gy].route.grp
                      && cfg[gx][gy-1].route.bit_idx + 3'd1 == cfg[gx][gy].route.bit_idx;
        assign scan_in = (cfg[gx][gy-1].ctrl.role == ROLE_ORA) && qq[gx][gy-1];
      end else begin : g_ns
        assign s_y     = 1'b0;
        assign s_chain = 1'b0;
        if (gx >= 2) begin : g_link
          assign scan_in = (cfg[gx-2][N-1].ctrl.role == ROLE_ORA) && qq[gx-2][N-1];
        end else begin : g_nolink
          assign scan_in = 1'b0;
        end
      end

      plb_cell u_cell (
        .clk      (clk),
        .bist_clk (bist_ce),
        .cfg      (cfg[gx][gy]),
        .ff_load  (ff_set && 32'(ff_set_x) == gx && 32'(ff_set_y) == gy),
        .ff_val   (ff_set_d),
        .tpg      (tpg_bus[HALF]),
        .w_y      (w_y),
        .e_y      (e_y),
        .w_xd1    (w_xd1),
        .w_xd2    (w_xd2),
        .e_xd1    (e_xd1),
        .e_xd2    (e_xd2),
        .s_y      (s_y),
        .s_chain  (s_chain),
        .scan_in  (scan_in),
        .x_out    (xo[gx][gy]),
        .y_out    (yo[gx][gy]),
        .q        (qq[gx][gy])
      );
    end
  end

  always_comb begin
    scan_out = 1'b0;
    if (gcfg.scan_en && 32'(gcfg.scan_col) < N)
      scan_out = qq[gcfg.scan_col][N-1];
  end

endmodule
