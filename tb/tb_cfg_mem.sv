// tb_cfg_mem: writes random bytes to random PLB addresses and global bytes,
// keeps its own copy, and checks every stored byte, the flip-flop preset
// strobe and that writes outside the array change nothing.
module tb_cfg_mem;
  import bist_pkg::*;
  localparam int N = 6;

  logic        clk = 1'b0;
  logic        cfg_we;
  logic [7:0]  fpgax, fpgay, fpgaz, fpgad;
  cell_cfg_t   cfg [N][N];
  global_cfg_t gcfg;
  logic        ff_set, ff_set_d;
  logic [7:0]  ff_set_x, ff_set_y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  cfg_mem #(.N(N)) dut (.*);

  logic [7:0] model [N][N][4];
  logic [7:0] gmodel [4];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int x, input int y, input int z, input logic [7:0] d);
    @(negedge clk);
    cfg_we = 1; fpgax = 8'(x); fpgay = 8'(y); fpgaz = 8'(z); fpgad = d;
    #1;
    check(ff_set == (x < N && y < N && z == 4), "ff_set decode");
    if (ff_set) check(ff_set_x == 8'(x) && ff_set_y == 8'(y) && ff_set_d == d[0], "ff_set address and value");
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic compare_all();
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++) begin
        check(cfg[x][y].luta == model[x][y][0], $sformatf("LUT A (%0d,%0d)", x, y));
        check(cfg[x][y].lutb == model[x][y][1], $sformatf("LUT B (%0d,%0d)", x, y));
        check(cfg[x][y].ctrl == model[x][y][2], $sformatf("ctrl (%0d,%0d)", x, y));
        check(cfg[x][y].route == model[x][y][3], $sformatf("route (%0d,%0d)", x, y));
      end
    check(gcfg.clk_route == gmodel[0][0], "global clock route");
    check(gcfg.scan_col == gmodel[1][5:0] && gcfg.scan_en == gmodel[1][6], "global scan route");
    check(gcfg.rep_east == gmodel[2][0], "global repeater direction");
    check(gcfg.ram_mode == gmodel[3][1:0], "global RAM mode");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg_we = 0; fpgax = 0; fpgay = 0; fpgaz = 0; fpgad = 0;
    // clear everything first, as the processor does
    for (int x = 0; x < N; x++)
      for (int y = 0; y < N; y++)
        for (int z = 0; z < 4; z++) begin wr(x, y, z, 8'h00); model[x][y][z] = 0; end
    for (int z = 0; z < 4; z++) begin wr(255, 255, z, 8'h00); gmodel[z] = 0; end
    compare_all();
    for (int i = 0; i < 600; i++) begin
      int x, y, z; logic [7:0] d;
      d = 8'($urandom);
      case ($urandom % 4)
        0: begin x = 255; y = 255; z = $urandom % 5; end           // global
        1: begin x = N + ($urandom % 4); y = $urandom % N; z = $urandom % 4; end  // outside
        default: begin x = $urandom % N; y = $urandom % N; z = $urandom % 6; end
      endcase
      wr(x, y, z, d);
      if (x < N && y < N && z < 4) model[x][y][z] = d;
      if (x == 255 && z < 4) gmodel[z] = d;
    end
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
