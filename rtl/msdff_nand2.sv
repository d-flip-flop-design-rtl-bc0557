// msdff_nand2: static CMOS 2-input NAND cell of the flip-flop.
//
// Used for stage W (the two clock gates of the master latch), stage Y
// (the two clock gates of the slave latch) and stage Z (the cross-coupled
// pair that holds Q and Q_NOT). The stages share this logic function and
// differ only in sizing, which RTL does not express:
//   stage W  P 4.2 um / N 4.2 um, not folded
//   stage Y  P 9.6 um / N 9.6 um, not folded
//   stage Z  P 11.7 um / N 11.7 um per finger, folded once
//
// Interface: out_o = ~(a_i & b_i). Pin names follow the cell's A, B, out
// pins. Purely combinational, zero delay.
`timescale 1ns/1ps
module msdff_nand2 (
  input  logic a_i,
  input  logic b_i,
  output logic out_o
);
  assign out_o = ~(a_i & b_i);
endmodule
