// tb_avr_fpga_if: drives random bus writes and reads. Checks that each I/O
// select loads its RAM TPG register and no other, that only select IOS_CLK
// gives a BIST clock strobe, that reads with IOS_SCAN return the two scan-out
// bits on lines 0 and 1, and the reset values.
module tb_avr_fpga_if;
  import bist_pkg::*;

  logic        clk = 1'b0;
  logic        rst_n;
  logic [15:0] iosel;
  logic        iowe, iore;
  logic [7:0]  dwr, drd;
  logic        logic_scan, ram_scan, bist_clk;
  ram_tpg_t    tpg;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  avr_fpga_if dut (.*);

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
    ram_tpg_t m;
    int nclk;
    rst_n = 0; iosel = 0; iowe = 0; iore = 0; dwr = 0; logic_scan = 0; ram_scan = 0;
    @(negedge clk); @(negedge clk);
    check(tpg.oen == 1 && tpg.we == 0 && tpg.waddr == 0 && tpg.shift == 0 && tpg.ora_rst == 0, "reset values");
    rst_n = 1;
    m = tpg;
    nclk = 0;
    for (int i = 0; i < 1000; i++) begin
      int sel;
      @(negedge clk);
      sel = $urandom % 7;     // 6: no select
      dwr = 8'($urandom);
      logic_scan = 1'($urandom); ram_scan = 1'($urandom);
      iosel = (sel < 6) ? 16'(1) << sel : 16'h0;
      if ($urandom % 3 == 0) begin
        iowe = 0; iore = 1;
        #1;
        check(drd == ((sel == IOS_SCAN) ? {6'b0, ram_scan, logic_scan} : 8'h00), "scan read data");
        check(bist_clk == 0, "no BIST clock on a read");
      end else begin
        iowe = 1; iore = 0;
        #1;
        check(bist_clk == (sel == IOS_CLK), "BIST clock only for IOS_CLK");
        check(drd == 8'h00, "read bus idle during a write");
        case (sel)
          IOS_WADDR: m.waddr = dwr[4:0];
          IOS_RADDR: m.raddr = dwr[4:0];
          IOS_DATA:  m.data  = dwr[3:0];
          IOS_CTRL:  {m.ora_rst, m.shift, m.oen, m.we} = dwr[3:0];
          IOS_CLK:   nclk++;
          default: ;
        endcase
      end
      @(posedge clk); #1;
      check(tpg == m, $sformatf("TPG registers after select %0d", sel));
    end
    @(negedge clk); iowe = 0; iore = 0; iosel = 0;
    check(nclk > 0, "BIST clock strobes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
