// msdff_pc: positive-edge master-slave D flip-flop with PRESET and CLEAR.
//
// The flip-flop is built the way its cell-level schematic is: two data
// inverters (stages U, V), a master clock inverter producing CLK_NOT, a
// slave clock inverter re-creating CLK from CLK_NOT, one inverter on each
// of PRESET and CLEAR, a master latch (stages W, X) and a slave latch
// (stages Y, Z). Every gate is a separate cell instance, so the netlist
// below maps one to one onto the transistor schematic. The worst path,
// which set the cell sizes, is D -> U -> V -> W -> X -> Y -> Z -> Q.
//
// Operation (PRESET = CLEAR = 0):
//   CLK low : master transparent, master_q_o follows D; slave holds Q.
//   CLK high: master holds the D sampled at the rising edge; slave passes
//             it, so Q = D(rising edge) and q_n_o = ~Q.
// PRESET and CLEAR are active high at these pins and act on the master
// latch only, so they reach Q during the next CLK-high phase (they are not
// asynchronous to Q). As wired in the design, and as its simulation with
// PRESET held high shows, PRESET = 1 drives Q to 0 and CLEAR = 1 drives
// Q to 1. Both at 1 is not allowed; the gates then give Q = q_n_o = 1.
//
// Ports: clk_i, d_i, preset_i, clear_i in; q_o, q_n_o out, plus the three
// internal nets the design brings out as probe pins: clk_n_o (CLK_NOT),
// master_q_o and master_q_n_o.
// Timing: zero-delay gate model; Q changes at the rising edge of clk_i.
// There is no reset: the state is unknown until a clock-high phase with
// known D, PRESET or CLEAR.
//
// The gates, their pin use and the PRESET/CLEAR polarity follow the
// original transistor schematic. The split into master and slave modules,
// the port names and the zero-delay modelling are choices of this RTL.
//
// Lint and synthesis report two combinational loops here: they are the
// cross-coupled NAND pairs of the master and slave latches, which are the
// storage of this gate-level design and are kept as drawn.
`timescale 1ns/1ps
module msdff_pc (
  input  logic clk_i,
  input  logic d_i,
  input  logic preset_i,
  input  logic clear_i,
  output logic q_o,
  output logic q_n_o,
  output logic clk_n_o,
  output logic master_q_o,
  output logic master_q_n_o
);
  logic d_n;       // stage U output
  logic d_buf;     // stage V output
  logic slave_en;  // slave clock inverter output (CLK re-created)
  logic preset_n;  // PRESET inverter output, to the master's top NAND3
  logic clear_n;   // CLEAR inverter output, to the master's bottom NAND3

  msdff_inv u_inv_u      (.in_i(d_i),      .out_o(d_n));
  msdff_inv u_inv_v      (.in_i(d_n),      .out_o(d_buf));
  msdff_inv u_clk_master (.in_i(clk_i),    .out_o(clk_n_o));
  msdff_inv u_clk_slave  (.in_i(clk_n_o),  .out_o(slave_en));
  msdff_inv u_preset     (.in_i(preset_i), .out_o(preset_n));
  msdff_inv u_clear      (.in_i(clear_i),  .out_o(clear_n));

  msdff_master_latch u_master (
    .d_i       (d_buf),
    .d_n_i     (d_n),
    .clk_n_i   (clk_n_o),
    .preset_n_i(preset_n),
    .clear_n_i (clear_n),
    .mq_o      (master_q_o),
    .mq_n_o    (master_q_n_o)
  );

  msdff_slave_latch u_slave (
    .mq_i  (master_q_o),
    .mq_n_i(master_q_n_o),
    .en_i  (slave_en),
    .q_o   (q_o),
    .q_n_o (q_n_o)
  );
endmodule
