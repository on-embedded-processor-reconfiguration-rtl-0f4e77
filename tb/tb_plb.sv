// tb_plb: random test of the PLB. For random truth tables, selects and LUT
// inputs it checks the X/Y outputs against a table lookup done here, the
// flip-flop preset, the clock enable and the D select.
module tb_plb;
  logic       clk = 1'b0;
  logic       ce, dsel, xsel, ysel, ff_load, ff_val;
  logic [7:0] luta, lutb;
  logic [2:0] a, b;
  logic       x_out, y_out, q;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  plb dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit exp_q, ea, eb;
    ce = 0; ff_load = 1; ff_val = 0; dsel = 0; xsel = 0; ysel = 0;
    luta = 0; lutb = 0; a = 0; b = 0;
    @(negedge clk);
    exp_q = 0;
    ff_load = 0;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      luta = 8'($urandom); lutb = 8'($urandom);
      a = 3'($urandom); b = 3'($urandom);
      dsel = 1'($urandom); xsel = 1'($urandom); ysel = 1'($urandom);
      ce = 1'($urandom); ff_load = ($urandom % 8) == 0; ff_val = 1'($urandom);
      ea = (luta >> a) & 1;
      eb = (lutb >> b) & 1;
      #1;
      check(x_out == (xsel ? exp_q : ea), $sformatf("x_out iter %0d", i));
      check(y_out == (ysel ? exp_q : eb), $sformatf("y_out iter %0d", i));
      if (ff_load) exp_q = ff_val;
      else if (ce) exp_q = dsel ? eb : ea;
      @(posedge clk); #1;
      check(q == exp_q, $sformatf("q iter %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
