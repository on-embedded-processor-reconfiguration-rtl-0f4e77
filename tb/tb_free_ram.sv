// tb_free_ram: random reads and writes against a reference array in all
// four port/read modes. Checks the read latency: an asynchronous read shows
// the word at once, a synchronous read one clock after the address.
module tb_free_ram;
  logic       clk = 1'b0;
  logic       ce, dp, async_rd, we;
  logic [4:0] addr_a, addr_b;
  logic [3:0] din, dout;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  free_ram #(.AW(5), .DW(4)) dut (.*);

  logic [3:0] ref_mem [32];
  logic [3:0] ref_rd;

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
    ce = 1; dp = 0; async_rd = 0; we = 1; addr_a = 0; addr_b = 0; din = 0;
    for (int a = 0; a < 32; a++) begin
      @(negedge clk); addr_a = 5'(a); din = 4'($urandom); ref_mem[a] = din;
    end
    @(negedge clk); we = 0;
    for (int mode = 0; mode < 4; mode++) begin
      dp = mode[1]; async_rd = mode[0];
      @(negedge clk);
      ref_rd = ref_mem[dp ? addr_b : addr_a];
      for (int i = 0; i < 400; i++) begin
        logic [4:0] ra;
        @(negedge clk);
        addr_a = 5'($urandom); addr_b = 5'($urandom); din = 4'($urandom);
        we = 1'($urandom); ce = ($urandom % 4) != 0;
        ra = dp ? addr_b : addr_a;
        #1;
        if (async_rd) check(dout == ref_mem[ra], $sformatf("async read mode %0d", mode));
        else          check(dout == ref_rd, $sformatf("sync read holds previous word, mode %0d", mode));
        if (ce) begin
          ref_rd = ref_mem[ra];
          if (we) ref_mem[addr_a] = din;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
