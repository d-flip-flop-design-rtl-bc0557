// msdff_nand3: static CMOS 3-input NAND cell of the flip-flop.
//
// Used for stage X, the cross-coupled pair of the master latch. Its third
// input carries the (inverted) PRESET or CLEAR, which is how those inputs
// reach the master latch. The physical cell is folded once: P 4.05 um and
// N 6 um per finger, which RTL does not express.
//
// Interface: out_o = ~(a_i & b_i & c_i). Pin names follow the cell's A, B,
// C, out pins. Purely combinational, zero delay.
`timescale 1ns/1ps
module msdff_nand3 (
  input  logic a_i,
  input  logic b_i,
  input  logic c_i,
  output logic out_o
);
  assign out_o = ~(a_i & b_i & c_i);
endmodule
