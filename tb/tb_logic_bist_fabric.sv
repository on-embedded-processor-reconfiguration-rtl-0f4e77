// tb_logic_bist_fabric: an 8 x 8 array configured directly (no configuration
// port) as the logic BIST of a west and an east session. Each session runs
// 33 BIST clocks with one BUT given a corrupted LUT A and another a corrupted
// LUT B, reconfigures the ORAs into a scan chain and shifts every flag out.
// The flags read back must match the ORAs that, by the wiring rules, observe
// a faulty output. Also checks that without the global clock route nothing
// is clocked, and that with the repeaters set the wrong way the BUTs see no
// patterns (all BUTs agree, so nothing is flagged even with a fault).
module tb_logic_bist_fabric;
  import bist_pkg::*;
  localparam int N = 8;
  localparam int WEST = 0, EAST = 1;

  logic        clk = 1'b0;
  logic        bist_clk;
  cell_cfg_t   cfg [N][N];
  global_cfg_t gcfg;
  logic        ff_set, ff_set_d;
  logic [7:0]  ff_set_x, ff_set_y;
  logic        scan_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic_bist_fabric #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int coldist(int s, int x);
    return (s == WEST) ? x : N - 1 - x;
  endfunction
  function automatic bit is_but(int s, int x);
    return coldist(s, x) % 2 == 1;
  endfunction
  function automatic bit is_ora(int s, int x);
    return coldist(s, x) >= 2 && coldist(s, x) % 2 == 0;
  endfunction
  function automatic bit scheme2(int y);
    return y < N / 2;
  endfunction
  function automatic int partner(int y);
    if (!scheme2(y)) return y ^ 1;
    begin
      int h, r;
      h = N / 2;                       // scheme 2 is used in the lower half only
      r = y;
      if (r % 2 == 1) return (r + 1 < h) ? r + 1 : 0;
      return (r >= 1) ? r - 1 : h - 1;
    end
  endfunction

  task automatic preset(int x, int y, bit v);
    @(negedge clk);
    ff_set = 1; ff_set_x = 8'(x); ff_set_y = 8'(y); ff_set_d = v;
    @(negedge clk);
    ff_set = 0;
  endtask

  task automatic clocks(int n);
    repeat (n) begin
      @(negedge clk); bist_clk = 1;
      @(negedge clk); bist_clk = 0;
    end
  endtask

  task automatic build(int s, int fx, int fy, int gx, int gy, bit rep_wrong);
    ctrl_t k; route_t r;
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        cfg[x][y] = '0;
        if (is_ora(s, x)) begin
          k = '0; k.role = ROLE_ORA; k.clk_en = 1;
          r = '0; r.scheme = scheme2(y); r.orient = (s == EAST);
          cfg[x][y] = '{luta: LUT_ORA_CMP, lutb: LUT_PASS0, ctrl: k, route: r};
        end else if (is_but(s, x)) begin
          k = '0; k.role = ROLE_BUT; k.clk_en = 1;
          cfg[x][y] = '{luta: 8'h96, lutb: 8'h96, ctrl: k, route: '0};
          if (x == fx && y == fy) cfg[x][y].luta = 8'h96 ^ 8'h40;
          if (x == gx && y == gy) cfg[x][y].lutb = 8'h96 ^ 8'h02;
        end
      end
    for (int g = 0; g < 2; g++)
      for (int b = 0; b < 3; b++) begin
        int y, x;
        y = (g == 0) ? N - 3 + b : b;
        x = (s == WEST) ? 0 : N - 1;
        k = '0; k.role = ROLE_TPG; k.clk_en = 1;
        r = '0; r.grp = 1'(g); r.bit_idx = 3'(b);
        cfg[x][y] = '{luta: LUT_TPG_SUM, lutb: LUT_TPG_CRY, ctrl: k, route: r};
      end
    for (int x = 0; x < N; x++) for (int y = 0; y < N; y++) preset(x, y, 0);
    gcfg = '0;
    gcfg.rep_east = (s == EAST) ^ rep_wrong;
  endtask

  task automatic readout(int s, output bit flags [N][N]);
    int last;
    last = (s == WEST) ? N - 2 : N - 3;
    for (int x = 0; x < N; x++) for (int y = 0; y < N; y++) flags[x][y] = 0;
    for (int x = 0; x < N; x++) if (is_ora(s, x))
      for (int y = 0; y < N; y++) cfg[x][y].ctrl.dsel = 1;
    gcfg.scan_en = 1; gcfg.scan_col = 6'(last);
    for (int k = 0; last - 2 * (k / N) >= 1 && is_ora(s, last - 2 * (k / N)); k++) begin
      #1 flags[last - 2 * (k / N)][N - 1 - (k % N)] = scan_out;
      clocks(1);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit flags [N][N];
    bit exp;
    int nflag;
    bist_clk = 0; ff_set = 0; ff_set_x = 0; ff_set_y = 0; ff_set_d = 0;
    for (int s = 0; s < 2; s++)
      for (int wrong = 0; wrong < 2; wrong++) begin
        int fx, fy, gx, gy;
        fx = (s == WEST) ? 3 : N - 4; fy = (s == WEST) ? 3 : 5;
        gx = (s == WEST) ? 5 : N - 6; gy = 1;
        build(s, fx, fy, gx, gy, wrong == 1);
        clocks(5);   // clock not routed yet: flags must stay clear
        gcfg.clk_route = 1;
        clocks(33);
        readout(s, flags);
        nflag = 0;
        for (int x = 0; x < N; x++) if (is_ora(s, x))
          for (int y = 0; y < N; y++) begin
            int xsrc, ysrc;
            xsrc = (s == WEST) ? x + 1 : x - 1;
            ysrc = (s == WEST) ? x - 1 : x + 1;
            exp = !wrong && ((xsrc == fx && partner(y) == fy) || (ysrc == gx && y == gy));
            check(flags[x][y] == exp, $sformatf("session %0d rep_wrong %0d ORA (%0d,%0d) = %0d", s, wrong, x, y, flags[x][y]));
            nflag += flags[x][y];
          end
        if (!wrong) check(nflag >= 2, "faults flagged");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
