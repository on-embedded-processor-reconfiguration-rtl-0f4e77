// tb_ram_bist: four free RAMs tested with the processor acting as TPG.
// Runs March Y in single-port asynchronous mode, March Y in single-port
// synchronous mode and a dual-port write/read test, each fault-free (all
// flags 0 after shifting out) and once with a stored word corrupted in one
// RAM, where exactly the flags of that RAM's corrupted bits (and, in
// dual-port mode, of the RAM after it, which compares against it) must be
// set. The scan chain order (last RAM bit 3 first) is checked through the
// positions of the flags.
module tb_ram_bist;
  import bist_pkg::*;
  localparam int NRAM = 4;

  logic      clk = 1'b0;
  logic      ce;
  ram_mode_e mode;
  ram_tpg_t  tpg;
  logic      scan_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ram_bist #(.NRAM(NRAM)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic tick();
    @(negedge clk); ce = 1;
    @(negedge clk); ce = 0;
  endtask

  task automatic w(int a, logic [3:0] d);
    tpg.waddr = 5'(a); tpg.data = d; tpg.we = 1; tpg.oen = 1;
    tick();
    tpg.we = 0;
  endtask

  task automatic r(int a, logic [3:0] d);
    tpg.waddr = 5'(a); tpg.data = d; tpg.we = 0;
    if (mode == RAM_SP_SYNC) begin tpg.oen = 1; tick(); end
    tpg.oen = 0; tick(); tpg.oen = 1;
  endtask

  task automatic ora_reset();
    tpg.ora_rst = 1; tick(); tpg.ora_rst = 0;
  endtask

  // shift out all flags; bits[k] = k-th bit out
  task automatic shift_out(output logic [4*NRAM-1:0] bits);
    tpg.shift = 1;
    for (int k = 0; k < 4 * NRAM; k++) begin
      #1 bits[k] = scan_out;
      tick();
    end
    tpg.shift = 0;
  endtask

  // flag of RAM i bit j comes out at position k
  function automatic int pos(int i, int j);
    return (NRAM - 1 - i) * 4 + (3 - j);
  endfunction

  task automatic march_y(int bad_ram, int bad_addr, logic [3:0] bad_mask);
    for (int a = 0; a < 32; a++) w(a, 4'h0);
    if (bad_ram >= 0) inject(bad_ram, bad_addr, 4'h0 ^ bad_mask);
    for (int a = 0; a < 32; a++) begin r(a, 4'h0); w(a, 4'hF); r(a, 4'hF); end
    for (int a = 31; a >= 0; a--) begin r(a, 4'hF); w(a, 4'h0); r(a, 4'h0); end
    for (int a = 0; a < 32; a++) r(a, 4'h0);
  endtask

  // corrupt one stored word (fault emulation)
  task automatic inject(int i, int a, logic [3:0] v);
    case (i)
      0: dut.g_ram[0].u_ram.mem[a] = v;
      1: dut.g_ram[1].u_ram.mem[a] = v;
      2: dut.g_ram[2].u_ram.mem[a] = v;
      default: dut.g_ram[3].u_ram.mem[a] = v;
    endcase
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4*NRAM-1:0] bits, exp;
    ce = 0; tpg = '0; tpg.oen = 1; mode = RAM_SP_ASYNC;
    for (int m = 0; m < 2; m++) begin
      mode = (m == 0) ? RAM_SP_ASYNC : RAM_SP_SYNC;
      // fault-free
      ora_reset();
      march_y(-1, 0, 0);
      shift_out(bits);
      check(bits == '0, $sformatf("mode %0d fault-free flags %b", mode, bits));
      // RAM 2, address 9, bits 1 and 3 corrupted after the initial write
      ora_reset();
      march_y(2, 9, 4'b1010);
      shift_out(bits);
      exp = '0; exp[pos(2, 1)] = 1; exp[pos(2, 3)] = 1;
      check(bits == exp, $sformatf("mode %0d fault flags %b expected %b", mode, bits, exp));
    end
    // dual-port: write through port A, then read every word through port B
    mode = RAM_DP_SYNC;
    for (int f = 0; f < 2; f++) begin
      for (int a = 0; a < 32; a++) begin tpg.raddr = 5'(a); w(a, 4'(a)); end
      tick();
      ora_reset();
      if (f == 1) inject(1, 20, 4'(20) ^ 4'b0100);
      for (int a = 0; a < 32; a++) begin tpg.raddr = 5'(a); tick(); tick(); end
      shift_out(bits);
      exp = '0;
      if (f == 1) begin exp[pos(1, 2)] = 1; exp[pos(2, 2)] = 1; end
      check(bits == exp, $sformatf("dual-port fault %0d flags %b expected %b", f, bits, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
