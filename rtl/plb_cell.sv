// plb_cell: one PLB of the array together with its local input routing.
//
// The logic BIST builds everything from identical PLBs; what a PLB does is set
// by its configuration bytes. The role field picks which neighbouring signals
// reach the two LUTs:
//   TPG  one bit of a ripple counter: LUT A = q ^ cin feeds the flip-flop,
//        LUT B = q & cin is the carry, sent on the Y-output to the PLB above.
//        cin is the Y-output of the PLB below when that PLB holds the next
//        lower bit of the same counter, else 1 (bit 0 counts every clock).
//   BUT  block under test: both LUTs see the same three TPG bits, bits 2..0
//        or, when the routing byte's orient bit is set, bits 4..2. An ORA
//        compares the X-output of one BUT with the Y-output of another, so a
//        test configuration gives both paths the same function (same LUT
//        table, or both outputs from the flip-flop for flip-flop tests).
//   ORA  comparison ORA: LUT A sees {q, X, Y} where Y is the direct Y-output
//        of one neighbouring BUT and X the diagonal X-output of the other, so
//        the compare table (x ^ y) | q latches any mismatch. LUT B sees the
//        scan input; switching the D select to LUT B turns the ORAs into a
//        shift register without touching the stored flags.
//   NONE all LUT inputs held at 0.
// The TPG/BUT/ORA roles and what an ORA compares follow the method; the exact
// input assignment and the ripple-carry counter wiring are this design's own.
//
// A configuration in which ORAs read each other in both directions closes a
// combinational loop, as it would on a real FPGA; the BIST configurations
// never do so.
//
// Timing: the flip-flop advances on clk when bist_clk (the BIST clock strobe,
// already gated by the global clock route) and the PLB's clock enable are
// both high; outputs are combinational.
module plb_cell
  import bist_pkg::*;
(
  input  logic       clk,
  input  logic       bist_clk,
  input  cell_cfg_t  cfg,
  input  logic       ff_load,
  input  logic       ff_val,
  input  logic [4:0] tpg,      // TPG bus of this PLB's half of the array
  input  logic       w_y,      // Y-output of the west neighbour
  input  logic       e_y,      // Y-output of the east neighbour
  input  logic       w_xd1,    // X-output of the west diagonal partner, scheme 1
  input  logic       w_xd2,    // ... scheme 2
  input  logic       e_xd1,    // X-output of the east diagonal partner, scheme 1
  input  logic       e_xd2,    // ... scheme 2
  input  logic       s_y,      // Y-output of the PLB below
  input  logic       s_chain,  // PLB below holds the next lower counter bit
  input  logic       scan_in,  // previous ORA flag in the scan chain
  output logic       x_out,
  output logic       y_out,
  output logic       q
);

  logic [2:0] a, b;
  logic       cin, ydir, xdiag;

  always_comb begin
    cin   = s_chain ? s_y : 1'b1;
    ydir  = cfg.route.orient ? e_y : w_y;
    unique case ({cfg.route.orient, cfg.route.scheme})
      2'b00:   xdiag = e_xd1;
      2'b01:   xdiag = e_xd2;
      2'b10:   xdiag = w_xd1;
      default: xdiag = w_xd2;
    endcase
    unique case (cfg.ctrl.role)
      ROLE_TPG: begin
        a = {1'b0, cin, q};
        b = {1'b0, cin, q};
      end
      ROLE_BUT: begin
        a = cfg.route.orient ? tpg[4:2] : tpg[2:0];
        b = a;
      end
      ROLE_ORA: begin
        a = {q, xdiag, ydir};
        b = {2'b00, scan_in};
      end
      default: begin
        a = 3'b000;
        b = 3'b000;
      end
    endcase
  end

  plb u_plb (
    .clk     (clk),
    .ce      (bist_clk && cfg.ctrl.clk_en),
    .luta    (cfg.luta),
    .lutb    (cfg.lutb),
    .dsel    (cfg.ctrl.dsel),
    .xsel    (cfg.ctrl.xsel),
    .ysel    (cfg.ctrl.ysel),
    .a       (a),
    .b       (b),
    .ff_load (ff_load),
    .ff_val  (ff_val),
    .x_out   (x_out),
    .y_out   (y_out),
    .q       (q)
  );

endmodule
