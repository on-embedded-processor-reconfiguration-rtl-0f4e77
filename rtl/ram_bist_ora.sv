// ram_bist_ora: one bit of the output response analyzer for free-RAM BIST.
//
// The same cell serves both single-port and dual-port RAM BIST, so switching
// mode only changes two selections (the cell's internal routing):
//   * Data line to the RAM: a buffer drives TPG data onto the line when OEN
//     (active-low read enable) is high in single-port mode, and always in
//     dual-port mode. With OEN low in single-port mode the line carries the
//     RAM's read data instead (the tri-state line is modelled as a select).
//   * Compare: single-port compares the line with the TPG data (the expected
//     value); when the buffer drives the line the two are equal, so writes
//     never flag. Dual-port compares the read data of this RAM with that of
//     the previous RAM, like the BUT comparison of logic BIST.
// A mismatch is ORed into the flag flip-flop, which then holds 1. With shift
// high the flip-flop takes shift_in instead, making the ORAs a scan chain.
// This structure follows the method's ORA figure; resetting synchronously
// with the BIST clock is this design's choice.
//
// Timing: q changes on clk when ce (BIST clock) is high; rst has priority
// over shift and compare. to_ram is combinational.
module ram_bist_ora (
  input  logic clk,
  input  logic ce,
  input  logic rst,
  input  logic dp,
  input  logic oen,
  input  logic tpg_d,
  input  logic ram_i,
  input  logic ram_im1,
  input  logic shift,
  input  logic shift_in,
  output logic to_ram,
  output logic q
);

  logic line, mismatch;

  assign line     = (dp || oen) ? tpg_d : ram_i;
  assign to_ram   = line;
  assign mismatch = dp ? (ram_im1 ^ ram_i) : (line ^ tpg_d);

  always_ff @(posedge clk) begin
    if (ce) begin
      if (rst)        q <= 1'b0;
      else if (shift) q <= shift_in;
      else            q <= q | mismatch;
    end
  end

endmodule
