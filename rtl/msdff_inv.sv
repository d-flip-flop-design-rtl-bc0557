// msdff_inv: static CMOS inverter cell of the flip-flop.
//
// The flip-flop uses five inverter cells. They share this logic function
// and differ only in transistor sizing, which RTL does not express:
//   stage U (data input, drives the worst path)  P 3.0 um / N 1.5 um
//   stage V (second data inverter)               P 3.0 um / N 1.5 um
//   master clock inverter (CLK -> CLK_NOT)       P 6.0 um / N 3.0 um
//   slave clock inverter  (CLK_NOT -> slave en)  P 7.8 um / N 3.9 um
//   PRESET and CLEAR input inverters             P 4.2 um / N 2.1 um
// All devices use L = 0.6 um. The sizes come from the design's
// logical-effort sizing and are listed here only for reference.
//
// Interface: in_i -> out_o = ~in_i. Purely combinational, zero delay.
`timescale 1ns/1ps
module msdff_inv (
  input  logic in_i,
  output logic out_o
);
  assign out_o = ~in_i;
endmodule
