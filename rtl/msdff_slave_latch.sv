// msdff_slave_latch: slave stage of the master-slave flip-flop.
//
// Two NAND2 clock gates (stage Y) feed a cross-coupled NAND2 pair
// (stage Z) that drives the flip-flop outputs. While en_i is high (CLK
// high) the gates pass the inverted master outputs, so q_o = mq_i and
// q_n_o = mq_n_i. While en_i is low both gate outputs are high and the
// pair holds. Gate order and pin use match the design's netlist:
//   gate_s_n = NAND2(mq_n_i, en_i)    (Y, top)
//   gate_r_n = NAND2(mq_i, en_i)      (Y, bottom)
//   q_n_o    = NAND2(gate_s_n, q_o)   (Z, top)
//   q_o      = NAND2(q_n_o, gate_r_n) (Z, bottom)
// If the master presents mq_i = mq_n_i = 1 (preset and clear both active)
// while en_i is high, both outputs go high.
//
// Inputs: mq_i / mq_n_i from the master latch, en_i from the slave clock
// inverter (the clock re-inverted from CLK_NOT).
// Timing: level-sensitive, zero-delay gates. The gates follow the original
// schematic; grouping them into this module is a choice of this RTL.
//
// The cross-coupled pair is a combinational loop on purpose: it is the
// storage element of the cell-level design.
`timescale 1ns/1ps
module msdff_slave_latch (
  input  logic mq_i,
  input  logic mq_n_i,
  input  logic en_i,
  output logic q_o,
  output logic q_n_o
);
  logic gate_s_n;
  logic gate_r_n;

  msdff_nand2 u_y_top (.a_i(mq_n_i), .b_i(en_i), .out_o(gate_s_n));
  msdff_nand2 u_y_bot (.a_i(mq_i),   .b_i(en_i), .out_o(gate_r_n));

  msdff_nand2 u_z_top (.a_i(gate_s_n), .b_i(q_o),      .out_o(q_n_o));
  msdff_nand2 u_z_bot (.a_i(q_n_o),    .b_i(gate_r_n), .out_o(q_o));
endmodule
