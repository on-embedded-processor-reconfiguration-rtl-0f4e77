// tb_plb_cell: checks the three BIST roles of a PLB cell.
//   TPG: five cells chained in a column make a 5-bit counter that steps
//        through 0..31 and wraps, one step per BIST clock.
//   BUT: both outputs follow the configured LUT over the selected TPG bits;
//        with the flip-flop selected both show the registered value.
//   ORA: the flag stays 0 while its X and Y inputs agree, latches 1 on the
//        first mismatch and holds it; in shift mode it takes the scan input.
module tb_plb_cell;
  import bist_pkg::*;

  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------- five TPG cells stacked ----------
  cell_cfg_t  tcfg [5];
  logic       tq [5], ty [5], tx [5];
  logic       tload, bclk;

  for (genvar i = 0; i < 5; i++) begin : g_tpg
    plb_cell u (
      .clk(clk), .bist_clk(bclk), .cfg(tcfg[i]), .ff_load(tload), .ff_val(1'b0),
      .tpg(5'b0), .w_y(1'b0), .e_y(1'b0), .w_xd1(1'b0), .w_xd2(1'b0), .e_xd1(1'b0), .e_xd2(1'b0),
      .s_y((i > 0) ? ty[(i > 0) ? i - 1 : 0] : 1'b0), .s_chain(i > 0), .scan_in(1'b0),
      .x_out(tx[i]), .y_out(ty[i]), .q(tq[i]));
  end

  // ---------- one BUT ----------
  cell_cfg_t  bcfg;
  logic [4:0] btpg;
  logic       bx, by, bq, bload, bval;
  plb_cell u_but (
    .clk(clk), .bist_clk(bclk), .cfg(bcfg), .ff_load(bload), .ff_val(bval),
    .tpg(btpg), .w_y(1'b0), .e_y(1'b0), .w_xd1(1'b0), .w_xd2(1'b0), .e_xd1(1'b0), .e_xd2(1'b0),
    .s_y(1'b0), .s_chain(1'b0), .scan_in(1'b0), .x_out(bx), .y_out(by), .q(bq));

  // ---------- one ORA ----------
  cell_cfg_t  ocfg;
  logic       o_wy, o_ey, o_wx1, o_wx2, o_ex1, o_ex2, o_sin, ox, oy, oq, oload;
  plb_cell u_ora (
    .clk(clk), .bist_clk(bclk), .cfg(ocfg), .ff_load(oload), .ff_val(1'b0),
    .tpg(5'b0), .w_y(o_wy), .e_y(o_ey), .w_xd1(o_wx1), .w_xd2(o_wx2), .e_xd1(o_ex1), .e_xd2(o_ex2),
    .s_y(1'b0), .s_chain(1'b0), .scan_in(o_sin), .x_out(ox), .y_out(oy), .q(oq));

  function automatic logic [4:0] count();
    return {tq[4], tq[3], tq[2], tq[1], tq[0]};
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ctrl_t k; route_t r;
    bclk = 0; tload = 1; bload = 0; bval = 0; oload = 1; btpg = 0;
    o_wy = 0; o_ey = 0; o_wx1 = 0; o_wx2 = 0; o_ex1 = 0; o_ex2 = 0; o_sin = 0;
    for (int i = 0; i < 5; i++) begin
      k = '0; k.role = ROLE_TPG; k.clk_en = 1;
      r = '0; r.bit_idx = 3'(i);
      tcfg[i] = '{luta: LUT_TPG_SUM, lutb: LUT_TPG_CRY, ctrl: k, route: r};
    end
    k = '0; k.role = ROLE_ORA; k.clk_en = 1;
    ocfg = '{luta: LUT_ORA_CMP, lutb: LUT_PASS0, ctrl: k, route: '0};
    bcfg = '0;
    @(negedge clk);
    tload = 0; oload = 0;

    // ---- TPG: 70 clocks, expect i mod 32 ----
    for (int i = 1; i <= 70; i++) begin
      @(negedge clk); bclk = 1;
      @(negedge clk); bclk = 0;
      check(count() == 5'(i), $sformatf("TPG count %0d, expected %0d", count(), i % 32));
    end
    // clock enable off: counter holds
    tcfg[0].ctrl.clk_en = 0;
    @(negedge clk); bclk = 1; @(negedge clk); bclk = 0;
    check(count() == 5'(70), "TPG holds without its clock enable");
    tcfg[0].ctrl.clk_en = 1;

    // ---- BUT: combinational paths ----
    for (int i = 0; i < 200; i++) begin
      logic [7:0] lut; logic hi; logic [2:0] idx;
      lut = 8'($urandom); hi = 1'($urandom);
      k = '0; k.role = ROLE_BUT; k.clk_en = 1;
      r = '0; r.orient = hi;
      bcfg = '{luta: lut, lutb: lut, ctrl: k, route: r};
      btpg = 5'($urandom);
      idx = hi ? btpg[4:2] : btpg[2:0];
      #1;
      check(bx == lut[idx] && by == lut[idx], $sformatf("BUT outputs, lut %h tpg %b", lut, btpg));
    end
    // BUT flip-flop test: X = Y = q, D from LUT A
    k = '0; k.role = ROLE_BUT; k.clk_en = 1; k.xsel = 1; k.ysel = 1;
    bcfg = '{luta: 8'h96, lutb: 8'h96, ctrl: k, route: '0};
    @(negedge clk); bload = 1; bval = 1; @(negedge clk); bload = 0;
    check(bx == 1 && by == 1, "BUT flip-flop preset to 1");
    btpg = 5'b00011;
    @(negedge clk); bclk = 1; @(negedge clk); bclk = 0;
    check(bq == 0 && bx == 0, "BUT flip-flop loads LUT(3) = 0");
    btpg = 5'b00001;
    @(negedge clk); bclk = 1; @(negedge clk); bclk = 0;
    check(bq == 1 && by == 1, "BUT flip-flop loads LUT(1) = 1");

    // ---- ORA ----
    for (int sch = 0; sch < 4; sch++) begin
      bit ori, s2;
      ori = sch[1]; s2 = sch[0];
      r = '0; r.orient = ori; r.scheme = s2;
      ocfg.route = r;
      ocfg.ctrl.dsel = 0;
      @(negedge clk); oload = 1; @(negedge clk); oload = 0;
      // agreeing inputs: no flag
      for (int i = 0; i < 10; i++) begin
        bit v;
        v = 1'($urandom);
        o_wy = v; o_ey = v; o_wx1 = v; o_wx2 = v; o_ex1 = v; o_ex2 = v;
        @(negedge clk); bclk = 1; @(negedge clk); bclk = 0;
      end
      check(oq == 0, $sformatf("ORA no flag while inputs agree (routing %0d)", sch));
      // mismatch only on the selected diagonal input
      o_wy = 0; o_ey = 0; o_wx1 = 0; o_wx2 = 0; o_ex1 = 0; o_ex2 = 0;
      case (sch)
        0: o_ex1 = 1;
        1: o_ex2 = 1;
        2: o_wx1 = 1;
        default: o_wx2 = 1;
      endcase
      @(negedge clk); bclk = 1; @(negedge clk); bclk = 0;
      check(oq == 1, $sformatf("ORA flags mismatch on its diagonal input (routing %0d)", sch));
      o_wy = 0; o_ey = 0; o_wx1 = 0; o_wx2 = 0; o_ex1 = 0; o_ex2 = 0;
      repeat (3) begin @(negedge clk); bclk = 1; @(negedge clk); bclk = 0; end
      check(oq == 1, "ORA flag holds");
      // a mismatch on an unselected diagonal input is ignored
      @(negedge clk); oload = 1; @(negedge clk); oload = 0;
      case (sch)
        0: o_ex2 = 1;
        1: o_ex1 = 1;
        2: o_wx2 = 1;
        default: o_wx1 = 1;
      endcase
      o_wy = 0; o_ey = 0;
      @(negedge clk); bclk = 1; @(negedge clk); bclk = 0;
      check(oq == 0, $sformatf("ORA ignores unselected input (routing %0d)", sch));
      // direct Y from the selected side
      o_wx1 = 0; o_wx2 = 0; o_ex1 = 0; o_ex2 = 0;
      if (ori) o_ey = 1; else o_wy = 1;
      @(negedge clk); bclk = 1; @(negedge clk); bclk = 0;
      check(oq == 1, $sformatf("ORA flags mismatch on its direct input (routing %0d)", sch));
    end
    // shift mode keeps nothing but the scan input
    ocfg.ctrl.dsel = 1;
    o_sin = 0;
    @(negedge clk); bclk = 1; @(negedge clk); bclk = 0;
    check(oq == 0, "ORA shift loads scan input 0");
    o_sin = 1;
    @(negedge clk); bclk = 1; @(negedge clk); bclk = 0;
    check(oq == 1, "ORA shift loads scan input 1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
