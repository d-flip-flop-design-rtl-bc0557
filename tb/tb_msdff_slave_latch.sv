// tb_msdff_slave_latch: self-check of the slave latch on its own.
//
// Drives the master-side inputs with the three pairs a master latch can
// present, (1,0), (0,1) and (1,1), and the enable, and compares q_o and
// q_n_o after every step with a rule-based model of a transparent-high
// latch: with en_i high q = mq and q_n = mq_n (both 1 for the pair (1,1));
// with en_i low the outputs hold. The enable is never lowered while the
// pair is (1,1), where a cross-coupled NAND pair would race.
`timescale 1ns/1ps
module tb_msdff_slave_latch;
  logic mq, mq_n, en;
  logic q, q_n;
  logic state;
  int   checks   = 0;
  int   failures = 0;
  int   n_pass = 0, n_hold = 0, n_both = 0;

  msdff_slave_latch dut (
    .mq_i(mq), .mq_n_i(mq_n), .en_i(en), .q_o(q), .q_n_o(q_n)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic nmq, input logic nmq_n, input logic nen);
    logic exp_q, exp_qn;
    mq = nmq; mq_n = nmq_n; en = nen;
    #1;
    if (en && mq && mq_n) begin
      exp_q = 1'b1; exp_qn = 1'b1; n_both++;
    end else if (en) begin
      state = mq; exp_q = mq; exp_qn = ~mq; n_pass++;
    end else begin
      exp_q = state; exp_qn = ~state; n_hold++;
    end
    checks++;
    if (q !== exp_q || q_n !== exp_qn) begin
      failures++;
      $display("FAIL t=%0t mq=%0b mq_n=%0b en=%0b : q=%0b q_n=%0b expected %0b %0b",
               $time, mq, mq_n, en, q, q_n, exp_q, exp_qn);
    end
  endtask

  initial begin
    logic nmq, nmq_n, nen;
    int   pick;
    state = 1'b0;
    step(0, 1, 1);
    step(1, 0, 1);
    step(1, 0, 0);
    step(0, 1, 0);
    step(0, 1, 1);
    step(0, 1, 0);
    step(1, 0, 0);
    step(1, 1, 0);
    step(1, 1, 1);
    step(1, 0, 1);
    step(1, 0, 0);
    for (int i = 0; i < 4000; i++) begin
      nen = en;
      pick = $urandom_range(0, 2);
      nmq   = (pick != 1);
      nmq_n = (pick != 0);
      if ($urandom_range(0, 1) == 1) nen = ~en;
      // Leave the (1,1) pair before the enable falls.
      if (mq && mq_n && en && !nen) begin
        nen = 1'b1;
      end
      if (nmq && nmq_n && en && !nen) begin
        nmq_n = 1'b0;
      end
      step(nmq, nmq_n, nen);
    end
    if (n_pass == 0 || n_hold == 0 || n_both == 0) begin
      failures++;
      $display("FAIL a mode was never exercised");
    end
    $display("modes: pass=%0d hold=%0d both=%0d", n_pass, n_hold, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
