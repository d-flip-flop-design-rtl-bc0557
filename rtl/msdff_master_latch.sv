// msdff_master_latch: master stage of the master-slave flip-flop.
//
// Two NAND2 clock gates (stage W) feed a cross-coupled pair of NAND3 gates
// (stage X). The latch is transparent while the inverted clock clk_n_i is
// high (CLK low): then gate_s_n = D and gate_r_n = ~D, so mq_o follows D.
// When clk_n_i falls (CLK rises) both gate outputs go high and the NAND3
// pair holds the captured value. Gate order and pin use match the
// schematic netlist of the design, instance by instance:
//   gate_s_n = NAND2(d_n_i, clk_n_i)               (W, top)
//   gate_r_n = NAND2(clk_n_i, d_i)                 (W, bottom)
//   mq_n_o   = NAND3(preset_n_i, gate_s_n, mq_o)   (X, top)
//   mq_o     = NAND3(mq_n_o, gate_r_n, clear_n_i)  (X, bottom)
//
// Preset and clear: the third NAND3 inputs are active low. As wired in the
// design, preset_n_i = 0 forces mq_n_o = 1 (so mq_o goes low once the clock
// gates are closed), and clear_n_i = 0 forces mq_o = 1. Both low gives
// mq_o = mq_n_o = 1. This follows the design's netlist; the polarity is the
// reverse of the usual meaning of the two names (see the top module).
//
// Inputs: d_i and d_n_i are the true and inverted data (from the two data
// inverters), clk_n_i is the master clock inverter's output.
// Timing: level-sensitive, zero-delay gates. The gates follow the original
// schematic; grouping them into this module is a choice of this RTL.
//
// The cross-coupled pair is a combinational loop on purpose: it is the
// storage element of the cell-level design, so tools report it as a loop
// and the synthesized result is a latch built from gates.
`timescale 1ns/1ps
module msdff_master_latch (
  input  logic d_i,
  input  logic d_n_i,
  input  logic clk_n_i,
  input  logic preset_n_i,
  input  logic clear_n_i,
  output logic mq_o,
  output logic mq_n_o
);
  logic gate_s_n;
  logic gate_r_n;

  msdff_nand2 u_w_top (.a_i(d_n_i),   .b_i(clk_n_i), .out_o(gate_s_n));
  msdff_nand2 u_w_bot (.a_i(clk_n_i), .b_i(d_i),     .out_o(gate_r_n));

  msdff_nand3 u_x_top (.a_i(preset_n_i), .b_i(gate_s_n), .c_i(mq_o),
                       .out_o(mq_n_o));
  msdff_nand3 u_x_bot (.a_i(mq_n_o), .b_i(gate_r_n), .c_i(clear_n_i),
                       .out_o(mq_o));
endmodule
