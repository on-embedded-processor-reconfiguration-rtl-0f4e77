// plb: programmable logic block of the fine-grain FPGA core.
//
// Two 3-input look-up tables, one D flip-flop and three multiplexers: the
// flip-flop takes LUT A or LUT B, the diagonal X-output shows LUT A or the
// flip-flop, the orthogonal Y-output shows LUT B or the flip-flop. The two
// LUTs, the flip-flop and the X/Y outputs are the block as the method
// describes it; which multiplexers exist is this design's choice.
//
// A LUT's truth table is indexed by its 3-bit input: out = lut[in].
// The flip-flop loads ff_val when ff_load is high (a configuration write);
// otherwise it takes the selected LUT output on a clock edge with ce high.
// Outputs are combinational from the inputs and the flip-flop.
module plb (
  input  logic       clk,
  input  logic       ce,
  input  logic [7:0] luta,
  input  logic [7:0] lutb,
  input  logic       dsel,
  input  logic       xsel,
  input  logic       ysel,
  input  logic [2:0] a,
  input  logic [2:0] b,
  input  logic       ff_load,
  input  logic       ff_val,
  output logic       x_out,
  output logic       y_out,
  output logic       q
);

  logic la, lb;

  assign la    = luta[a];
  assign lb    = lutb[b];
  assign x_out = xsel ? q : la;
  assign y_out = ysel ? q : lb;

  always_ff @(posedge clk) begin
    if (ff_load)  q <= ff_val;
    else if (ce)  q <= dsel ? lb : la;
  end

endmodule
