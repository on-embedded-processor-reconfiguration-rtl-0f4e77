// tb_ram_bist_ora: random stimulus against a reference of the RAM BIST ORA
// bit: the data line to the RAM, the sticky mismatch flag in single-port
// (TPG vs line) and dual-port (RAM i-1 vs RAM i) modes, shift and reset.
module tb_ram_bist_ora;
  logic clk = 1'b0;
  logic ce, rst, dp, oen, tpg_d, ram_i, ram_im1, shift, shift_in, to_ram, q;
  int checks = 0, failures = 0;
  int flags_set = 0;

  always #5 clk = ~clk;

  ram_bist_ora dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit eq, line, mm;
    ce = 1; rst = 1; dp = 0; oen = 1; tpg_d = 0; ram_i = 0; ram_im1 = 0; shift = 0; shift_in = 0;
    @(negedge clk);
    eq = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ce = ($urandom % 4) != 0; rst = ($urandom % 20) == 0; dp = 1'($urandom);
      oen = 1'($urandom); tpg_d = 1'($urandom); ram_i = 1'($urandom); ram_im1 = 1'($urandom);
      shift = ($urandom % 5) == 0; shift_in = 1'($urandom);
      line = (dp || oen) ? tpg_d : ram_i;
      mm   = dp ? (ram_im1 ^ ram_i) : (line ^ tpg_d);
      #1;
      check(to_ram == line, "data line to RAM");
      if (ce) begin
        if (rst) eq = 0;
        else if (shift) eq = shift_in;
        else begin
          if (mm && !eq) flags_set++;
          eq = eq | mm;
        end
      end
      @(posedge clk); #1;
      check(q == eq, $sformatf("flag iter %0d", i));
    end
    check(flags_set > 0, "mismatches latched");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
