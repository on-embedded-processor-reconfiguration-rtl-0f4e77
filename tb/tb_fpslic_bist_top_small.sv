// tb_fpslic_bist_top_small: the same end-to-end test of the processor-driven
// BIST as the full-size test, on a 12 x 12 PLB array with 9 free RAMs, so it
// builds and runs in a short time.
//
// The tasks below play the embedded processor's BIST program, in the order
// the method gives: clear the FPGA, initialise the ORAs (routing scheme 1 in
// the upper half, scheme 2 in the lower half), place and configure the BUTs,
// build the two 5-bit counter TPGs, route the BIST clock from the write
// strobe, run the BIST clock, reconfigure the ORAs as a scan chain, route the
// scan-out to the data bus and read every ORA back. This is done for the west
// session (TPG in column 0) and the east session (TPG in column N-1), each
// with four BUT test configurations run before one retrieval.
// Faults are emulated by configuring a BUT with a corrupted LUT; the test
// checks that exactly the ORAs wired to that BUT's faulty output flag it,
// and that diagnosis names that BUT.
// The free RAMs are then tested in the three RAM BIST modes: March LR with
// background data sequences (single-port synchronous), March Y (single-port
// asynchronous) and a dual-port read/write test (dual-port synchronous), with
// the processor as TPG. A deliberately wrong expected value checks that the
// RAM ORAs flag a mismatch and shift it out.
// Expected results are computed here from the wiring rules, independently
// of the RTL. Each named mechanism is counted and must occur.
module tb_fpslic_bist_top_small;
  import bist_pkg::*;

  localparam int N    = 12;
  localparam int NRAM = (N / 4) * (N / 4);
  localparam int WEST = 0, EAST = 1;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        cfg_we;
  logic [7:0]  fpgax, fpgay, fpgaz, fpgad;
  logic [15:0] iosel;
  logic        iowe, iore;
  logic [7:0]  dbus_wr, dbus_rd;

  always #5 clk = ~clk;

  fpslic_bist_top #(.N(N)) dut (.*);

  int checks = 0, failures = 0;
  longint cycles = 0;
  always @(posedge clk) cycles++;

  // mechanism counters
  int n_clear, n_ora_init, n_but_cfg, n_tpg_init, n_clk_route, n_bist_clk;
  int n_scan_cfg, n_scan_route, n_scan_bits, n_west, n_east, n_scheme1, n_scheme2;
  int n_ff_test, n_fault_det, n_diag_ok, n_multi_cfg;
  int n_ram_spsync, n_ram_spasync, n_ram_dp, n_ram_bds, n_ram_flag, n_ram_shift;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- bus primitives (one transfer per clock) -------------
  task automatic idle();
    @(negedge clk);
    cfg_we = 0; iowe = 0; iore = 0; iosel = '0;
  endtask

  task automatic cw(input int x, input int y, input logic [7:0] z, input logic [7:0] d);
    @(negedge clk);
    iowe = 0; iore = 0; iosel = '0;
    cfg_we = 1; fpgax = 8'(x); fpgay = 8'(y); fpgaz = z; fpgad = d;
  endtask

  task automatic io_wr(input int sel, input logic [7:0] d);
    @(negedge clk);
    cfg_we = 0; iore = 0;
    iosel = 16'(1) << sel; iowe = 1; dbus_wr = d;
  endtask

  task automatic io_rd(input int sel, output logic [7:0] d);
    @(negedge clk);
    cfg_we = 0; iowe = 0;
    iosel = 16'(1) << sel; iore = 1;
    #1 d = dbus_rd;
  endtask

  task automatic bist_clock();
    io_wr(IOS_CLK, 8'h00);
    n_bist_clk++;
  endtask

  // ---------------- layout of a session --------------------------------
  function automatic int tpg_col(int s);
    return (s == WEST) ? 0 : N - 1;
  endfunction
  // distance from the TPG column decides the column's job
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
    if (!scheme2(y)) return ((y ^ 1) < N) ? (y ^ 1) : y - 1;
    begin
      int h, r;
      h = N / 2;                       // scheme 2 is used in the lower half only
      r = y;
      if (r % 2 == 1) return (r + 1 < h) ? r + 1 : 0;
      return (r >= 1) ? r - 1 : h - 1;
    end
  endfunction
  function automatic int last_ora_col(int s);
    return (s == WEST) ? N - 2 : N - 3;
  endfunction
  function automatic int first_ora_col(int s);
    return (s == WEST) ? 2 : 1;
  endfunction
  function automatic int n_ora_cols(int s);
    return (last_ora_col(s) - first_ora_col(s)) / 2 + 1;
  endfunction

  // ---------------- BUT test configurations ------------------------------
  typedef struct {
    logic [7:0] lut;
    bit xs, ys, ds, hi, ff0;
  } but_cfg_t;
  but_cfg_t bcfg [4];
  initial begin
    bcfg[0] = '{lut: 8'h96, xs: 0, ys: 0, ds: 0, hi: 0, ff0: 0};  // XOR, counter bits 2..0
    bcfg[1] = '{lut: 8'hE8, xs: 0, ys: 0, ds: 0, hi: 1, ff0: 0};  // majority, bits 4..2
    bcfg[2] = '{lut: 8'h69, xs: 1, ys: 1, ds: 0, hi: 0, ff0: 1};  // flip-flop from LUT A, set to 1
    bcfg[3] = '{lut: 8'h1E, xs: 1, ys: 1, ds: 1, hi: 1, ff0: 0};  // flip-flop from LUT B, reset to 0
  end

  // ---------------- processor routines -----------------------------------
  task automatic clear_fpga();
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++)
        for (int z = 0; z <= 4; z++) cw(x, y, 8'(z), 8'h00);
    for (int z = 0; z <= 3; z++) cw(255, 255, 8'(z), 8'h00);
    n_clear++;
  endtask

  function automatic logic [7:0] ora_ctrl(bit shift);
    ctrl_t c;
    c = '0; c.role = ROLE_ORA; c.clk_en = 1; c.dsel = shift;
    return c;
  endfunction

  task automatic init_oras(int s);
    route_t r;
    for (int x = 0; x < N; x++) if (is_ora(s, x))
      for (int y = 0; y < N; y++) begin
        r = '0; r.scheme = scheme2(y); r.orient = (s == EAST);
        if (scheme2(y)) n_scheme2++; else n_scheme1++;
        cw(x, y, Z_LUTA, LUT_ORA_CMP);
        cw(x, y, Z_LUTB, LUT_PASS0);
        cw(x, y, Z_ROUTE, r);
        cw(x, y, Z_CTRL, ora_ctrl(0));
        cw(x, y, Z_FFSET, 8'h00);
      end
    n_ora_init++;
  endtask

  task automatic config_but_cell(int x, int y, but_cfg_t c, logic [7:0] luta, logic [7:0] lutb);
    ctrl_t k; route_t r;
    k = '0; k.role = ROLE_BUT; k.clk_en = 1; k.dsel = c.ds; k.xsel = c.xs; k.ysel = c.ys;
    r = '0; r.orient = c.hi;
    cw(x, y, Z_LUTA, luta);
    cw(x, y, Z_LUTB, lutb);
    cw(x, y, Z_ROUTE, r);
    cw(x, y, Z_CTRL, k);
    cw(x, y, Z_FFSET, {7'b0, c.ff0});
  endtask

  task automatic config_buts(int s, int ci);
    for (int x = 0; x < N; x++) if (is_but(s, x))
      for (int y = 0; y < N; y++) config_but_cell(x, y, bcfg[ci], bcfg[ci].lut, bcfg[ci].lut);
    if (bcfg[ci].xs) n_ff_test++;
    n_but_cfg++;
  endtask

  task automatic init_tpgs(int s);
    ctrl_t k; route_t r;
    for (int g = 0; g < 2; g++)
      for (int b = 0; b < 5; b++) begin
        int y;
        y = (g == 0) ? N - 5 + b : b;
        k = '0; k.role = ROLE_TPG; k.clk_en = 1;
        r = '0; r.grp = 1'(g); r.bit_idx = 3'(b);
        cw(tpg_col(s), y, Z_LUTA, LUT_TPG_SUM);
        cw(tpg_col(s), y, Z_LUTB, LUT_TPG_CRY);
        cw(tpg_col(s), y, Z_ROUTE, r);
        cw(tpg_col(s), y, Z_CTRL, k);
        cw(tpg_col(s), y, Z_FFSET, 8'h00);
      end
    cw(255, 255, G_REP, (s == EAST) ? 8'h01 : 8'h00);
    n_tpg_init++;
  endtask

  task automatic route_clock();
    cw(255, 255, G_CLK, 8'h01);
    n_clk_route++;
  endtask

  task automatic run_bist(int nclk);
    for (int i = 0; i < nclk; i++) bist_clock();
  endtask

  task automatic ora_scan_mode(int s);
    for (int x = 0; x < N; x++) if (is_ora(s, x))
      for (int y = 0; y < N; y++) cw(x, y, Z_CTRL, ora_ctrl(1));
    n_scan_cfg++;
  endtask

  task automatic route_scan(int s);
    cw(255, 255, G_SCAN, 8'h40 | 8'(last_ora_col(s)));
    n_scan_route++;
  endtask

  // flags[x][y] as read back from the chain
  bit flags [N][N];

  task automatic retrieve(int s);
    logic [7:0] d;
    int total;
    total = n_ora_cols(s) * N;
    for (int x = 0; x < N; x++) for (int y = 0; y < N; y++) flags[x][y] = 0;
    for (int k = 0; k < total; k++) begin
      int col, row;
      col = last_ora_col(s) - 2 * (k / N);
      row = N - 1 - (k % N);
      io_rd(IOS_SCAN, d);
      flags[col][row] = d[0];
      bist_clock();
      n_scan_bits++;
    end
  endtask

  // one session: clear, build, run all BUT configurations, retrieve once.
  // fx/fy: BUT given a corrupted LUT A (X path) in configuration 0 (-1: none)
  // gx/gy: BUT given a corrupted LUT B (Y path) in configuration 0 (-1: none)
  task automatic session(int s, int fx, int fy, int gx, int gy);
    bit exp [N][N];
    int nflag;
    clear_fpga();
    init_oras(s);
    for (int ci = 0; ci < 4; ci++) begin
      config_buts(s, ci);
      if (ci == 0 && fx >= 0) config_but_cell(fx, fy, bcfg[0], bcfg[0].lut ^ 8'h10, bcfg[0].lut);
      if (ci == 0 && gx >= 0) config_but_cell(gx, gy, bcfg[0], bcfg[0].lut, bcfg[0].lut ^ 8'h04);
      if (ci == 0) begin
        init_tpgs(s);
        route_clock();
      end else begin
        // restart the counters so every configuration sees all 32 patterns
        for (int g = 0; g < 2; g++)
          for (int b = 0; b < 5; b++) cw(tpg_col(s), (g == 0) ? N - 5 + b : b, Z_FFSET, 8'h00);
      end
      run_bist(33);
    end
    n_multi_cfg++;
    ora_scan_mode(s);
    route_scan(s);
    retrieve(s);
    // expected flags from the wiring rules
    for (int x = 0; x < N; x++) for (int y = 0; y < N; y++) exp[x][y] = 0;
    for (int x = 0; x < N; x++) if (is_ora(s, x))
      for (int y = 0; y < N; y++) begin
        int xsrc, ysrc;
        xsrc = (s == WEST) ? x + 1 : x - 1;   // diagonal X source column
        ysrc = (s == WEST) ? x - 1 : x + 1;   // direct Y source column
        if (fx >= 0 && xsrc == fx && partner(y) == fy) exp[x][y] = 1;
        if (gx >= 0 && ysrc == gx && y == gy) exp[x][y] = 1;
      end
    nflag = 0;
    for (int x = 0; x < N; x++) if (is_ora(s, x))
      for (int y = 0; y < N; y++) begin
        check(flags[x][y] == exp[x][y], $sformatf("session %0d ORA (%0d,%0d) flag %0d expected %0d",
                                                  s, x, y, flags[x][y], exp[x][y]));
        if (flags[x][y]) nflag++;
      end
    if (fx >= 0 || gx >= 0) begin
      check(nflag > 0, "injected fault detected");
      if (nflag > 0) n_fault_det++;
      // diagnosis: a flagged ORA implicates its two BUTs; a BUT implicated by
      // every flagged ORA that reads it and named by the most flags is faulty
      begin
        int cnt [N][N];
        bit ok;
        for (int x = 0; x < N; x++) for (int y = 0; y < N; y++) cnt[x][y] = 0;
        for (int x = 0; x < N; x++) if (is_ora(s, x))
          for (int y = 0; y < N; y++) if (flags[x][y]) begin
            int xsrc, ysrc;
            xsrc = (s == WEST) ? x + 1 : x - 1;
            ysrc = (s == WEST) ? x - 1 : x + 1;
            cnt[xsrc][partner(y)]++;
            cnt[ysrc][y]++;
          end
        ok = 1;
        if (fx >= 0) ok &= cnt[fx][fy] > 0;
        if (gx >= 0) ok &= cnt[gx][gy] > 0;
        check(ok, "diagnosis names the faulty BUT");
        if (ok) n_diag_ok++;
      end
    end
    if (s == WEST) n_west++; else n_east++;
  endtask

  // ---------------- RAM BIST ----------------------------------------------
  ram_mode_e rmode;
  // background data sequences for a 4-bit word: solid, alternating bits, pairs
  logic [3:0] bds [3] = '{4'h0, 4'h5, 4'h3};

  task automatic ram_ctrl(bit we, bit oen, bit shift, bit rst);
    io_wr(IOS_CTRL, {4'b0, rst, shift, oen, we});
  endtask

  task automatic ram_w(int a, logic [3:0] d);
    io_wr(IOS_WADDR, 8'(a));
    io_wr(IOS_DATA, {4'b0, d});
    ram_ctrl(1, 1, 0, 0);
    bist_clock();
  endtask

  task automatic ram_r(int a, logic [3:0] d);
    io_wr(IOS_WADDR, 8'(a));
    io_wr(IOS_DATA, {4'b0, d});
    if (rmode == RAM_SP_SYNC) begin
      ram_ctrl(0, 1, 0, 0);
      bist_clock();
    end
    ram_ctrl(0, 0, 0, 0);
    bist_clock();
    ram_ctrl(0, 1, 0, 0);
  endtask

  task automatic ram_setup(ram_mode_e m);
    rmode = m;
    cw(255, 255, G_RAM, {6'b0, m});
    route_clock();
    ram_ctrl(0, 1, 0, 1);     // reset ORA flags
    bist_clock();
    ram_ctrl(0, 1, 0, 0);
  endtask

  // shift all RAM ORA flags out; returns how many were 1
  task automatic ram_retrieve(output int ones, output int first_one);
    logic [7:0] d;
    ones = 0; first_one = -1;
    ram_ctrl(0, 1, 1, 0);
    for (int k = 0; k < NRAM * 4; k++) begin
      io_rd(IOS_SCAN, d);
      if (d[1]) begin
        ones++;
        if (first_one < 0) first_one = k;
      end
      bist_clock();
    end
    ram_ctrl(0, 1, 0, 0);
    n_ram_shift++;
  endtask

  task automatic march_y();
    for (int a = 0; a < 32; a++) ram_w(a, 4'h0);
    for (int a = 0; a < 32; a++) begin ram_r(a, 4'h0); ram_w(a, 4'hF); ram_r(a, 4'hF); end
    for (int a = 31; a >= 0; a--) begin ram_r(a, 4'hF); ram_w(a, 4'h0); ram_r(a, 4'h0); end
    for (int a = 0; a < 32; a++) ram_r(a, 4'h0);
  endtask

  task automatic march_lr(logic [3:0] bg);
    logic [3:0] z, o;
    z = bg; o = ~bg;
    for (int a = 0; a < 32; a++) ram_w(a, z);
    for (int a = 31; a >= 0; a--) begin ram_r(a, z); ram_w(a, o); end
    for (int a = 0; a < 32; a++) begin ram_r(a, o); ram_w(a, z); ram_r(a, z); ram_w(a, o); end
    for (int a = 0; a < 32; a++) begin ram_r(a, o); ram_w(a, z); end
    for (int a = 0; a < 32; a++) begin ram_r(a, z); ram_w(a, o); ram_r(a, o); ram_w(a, z); end
    for (int a = 0; a < 32; a++) ram_r(a, z);
  endtask

  // dual-port: write through port A while port B reads a neighbouring word;
  // the ORAs compare each RAM's port-B data with the previous RAM's.
  task automatic dpr_test();
    for (int a = 0; a < 32; a++) begin
      io_wr(IOS_RADDR, 8'(a)); ram_w(a, 4'(a));
    end
    ram_ctrl(0, 1, 0, 1); bist_clock(); ram_ctrl(0, 1, 0, 0);  // flags start clean once all words are defined
    for (int a = 0; a < 32; a++) begin
      io_wr(IOS_RADDR, 8'((a + 31) % 32)); ram_w(a, ~4'(a));
      bist_clock();
    end
    for (int a = 31; a >= 0; a--) begin
      io_wr(IOS_RADDR, 8'((a + 1) % 32)); ram_w(a, 4'(a) ^ 4'h5);
      bist_clock();
    end
    for (int a = 0; a < 32; a++) begin
      io_wr(IOS_RADDR, 8'(a)); bist_clock(); bist_clock();
    end
  endtask

  task automatic ram_sessions();
    int ones, first;
    // single-port synchronous: March LR with background data sequences
    ram_setup(RAM_SP_SYNC);
    foreach (bds[i]) begin march_lr(bds[i]); n_ram_bds++; end
    ram_retrieve(ones, first);
    check(ones == 0, $sformatf("SP sync March LR: %0d flags", ones));
    n_ram_spsync++;
    // single-port asynchronous: March Y, then one read with a wrong expected
    // value (bit 2) to show the ORAs latch and shift a mismatch
    ram_setup(RAM_SP_ASYNC);
    march_y();
    ram_retrieve(ones, first);
    check(ones == 0, $sformatf("SP async March Y: %0d flags", ones));
    n_ram_spasync++;
    ram_r(7, 4'h4);
    ram_retrieve(ones, first);
    check(ones == NRAM, $sformatf("wrong expected value flags every RAM bit 2: %0d", ones));
    check(first == 1, $sformatf("first flag at chain position %0d, expected 1", first));
    if (ones > 0) n_ram_flag++;
    // dual-port synchronous
    ram_setup(RAM_DP_SYNC);
    dpr_test();
    ram_retrieve(ones, first);
    check(ones == 0, $sformatf("DP sync test: %0d flags", ones));
    n_ram_dp++;
  endtask

  // ---------------- watchdog ----------------------------------------------
  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------------------------------------------
  initial begin
    longint t0;
    rst_n = 0; cfg_we = 0; iowe = 0; iore = 0; iosel = '0;
    fpgax = 0; fpgay = 0; fpgaz = 0; fpgad = 0; dbus_wr = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // fault-free west session
    t0 = cycles;
    session(WEST, -1, -1, -1, -1);
    $display("west session: %0d clock cycles", cycles - t0);
    // west session with a LUT A fault in BUT (5,10) and a LUT B fault in BUT (9,40)
    session(WEST, 5, 2, 9, 9);
    // fault-free east session, then with a fault
    session(EAST, -1, -1, -1, -1);
    session(EAST, N - 6, 7, N - 10, 3);
    // free RAMs
    t0 = cycles;
    ram_sessions();
    $display("RAM BIST: %0d clock cycles", cycles - t0);
    idle();

    check(n_clear > 0, "clear FPGA");
    check(n_ora_init > 0, "ORA initialisation");
    check(n_but_cfg >= 16, "BUT configurations");
    check(n_tpg_init > 0, "TPG initialisation");
    check(n_clk_route > 0, "BIST clock route");
    check(n_bist_clk > 0, "BIST clocks");
    check(n_scan_cfg > 0, "ORA scan chain reconfiguration");
    check(n_scan_route > 0, "scan-out route");
    check(n_scan_bits > 0, "ORA results retrieved");
    check(n_west > 0 && n_east > 0, "west and east sessions");
    check(n_scheme1 > 0 && n_scheme2 > 0, "routing schemes 1 and 2");
    check(n_ff_test > 0, "flip-flop test configurations");
    check(n_multi_cfg > 0, "retrieval after several configurations");
    check(n_fault_det >= 2, "fault detection");
    check(n_diag_ok >= 2, "fault diagnosis");
    check(n_ram_spsync > 0 && n_ram_bds >= 3, "RAM single-port synchronous with BDS");
    check(n_ram_spasync > 0, "RAM single-port asynchronous");
    check(n_ram_dp > 0, "RAM dual-port synchronous");
    check(n_ram_flag > 0, "RAM ORA mismatch latched");
    check(n_ram_shift > 0, "RAM ORA scan-out");
    $display("mechanisms: clear=%0d ora_init=%0d but_cfg=%0d tpg=%0d clk_route=%0d bist_clk=%0d scan_cfg=%0d scan_bits=%0d west=%0d east=%0d s1=%0d s2=%0d ff=%0d fault=%0d diag=%0d ram_sp=%0d ram_async=%0d ram_dp=%0d ram_flag=%0d",
             n_clear, n_ora_init, n_but_cfg, n_tpg_init, n_clk_route, n_bist_clk, n_scan_cfg, n_scan_bits,
             n_west, n_east, n_scheme1, n_scheme2, n_ff_test, n_fault_det, n_diag_ok,
             n_ram_spsync, n_ram_spasync, n_ram_dp, n_ram_flag);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
