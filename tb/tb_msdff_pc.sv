// tb_msdff_pc: end-to-end self-check of the master-slave flip-flop.
//
// The flip-flop has no parameters, so this test runs the design at its only
// size. Each 10 ns clock cycle is driven step by step:
//   +0  CLK falls; PRESET / CLEAR change here when the scenario says so
//   +1  D may change              +2  check (master open, slave holding)
//   +3  D may change again        +4  check just before the rising edge
//   +5  CLK rises                 +6  check the captured value
//   +7  D may change, or CLEAR is lifted after a PRESET+CLEAR cycle
//   +8  check that the master now holds
// The expected values come from a behavioural model of an edge-triggered
// flip-flop: Q takes D at the rising edge and holds otherwise; the master
// output follows D while CLK is low. PRESET = 1 makes the edge load 0 and
// CLEAR = 1 makes it load 1 (the polarity of the design's netlist); both
// at once give Q = Q_NOT = 1. The scenario is random: runs of normal
// cycles, PRESET, CLEAR and PRESET+CLEAR. Every mechanism is counted and a
// mechanism that never occurs is a failure.
`timescale 1ns/1ps
module tb_msdff_pc;
  localparam int unsigned Cycles = 3000;

  typedef enum logic [1:0] {ModeNormal, ModePreset, ModeClear, ModeBoth} mode_e;

  logic  clk, d, preset, clear;
  logic  q, q_n, clk_n, mq, mq_n;
  logic  exp_q;
  mode_e mode;
  int    checks   = 0;
  int    failures = 0;

  // Mechanism counters.
  int n_capture0 = 0, n_capture1 = 0, n_master_follow = 0;
  int n_master_hold = 0, n_slave_hold = 0, n_preset = 0, n_clear = 0;
  int n_both = 0, n_release = 0, n_preset_blocks_d = 0;

  msdff_pc dut (
    .clk_i(clk), .d_i(d), .preset_i(preset), .clear_i(clear),
    .q_o(q), .q_n_o(q_n), .clk_n_o(clk_n), .master_q_o(mq),
    .master_q_n_o(mq_n)
  );

  initial begin
    #(Cycles * 10 + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string what, input logic got, input logic want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 20)
        $display("FAIL t=%0t %s: got %0b expected %0b (D=%0b PRESET=%0b CLEAR=%0b)",
                 $time, what, got, want, d, preset, clear);
    end
  endtask

  // Checks made while CLK is low: slave holds, master open.
  task automatic check_low();
    check("CLK_NOT", clk_n, 1'b1);
    check("Q hold", q, exp_q);
    check("Q_NOT hold", q_n, ~exp_q);
    if (d != exp_q && mode == ModeNormal) n_slave_hold++;
    if (preset && !clear) check("MASTER_QNOT preset", mq_n, 1'b1);
    else if (clear && !preset) check("MASTER_Q clear", mq, 1'b1);
    else if (!preset && !clear) begin
      check("MASTER_Q follow", mq, d);
      check("MASTER_QNOT follow", mq_n, ~d);
    end
  endtask

  initial begin
    mode_e next_mode;
    int    run_left;
    logic  prev_mq;
    // The flip-flop has no reset: clock a 0 in before checking anything.
    clk = 1'b0; d = 1'b0; preset = 1'b0; clear = 1'b0;
    mode = ModeNormal; run_left = 4; exp_q = 1'b0;
    #5;
    clk = 1'b1;
    #5;
    for (int unsigned cyc = 0; cyc < Cycles; cyc++) begin
      // +0: falling edge, scenario change.
      clk = 1'b0;
      if (run_left == 0) begin
        next_mode = ModeNormal;
        if (mode == ModeNormal) begin
          case ($urandom_range(0, 9))
            0, 1:    next_mode = ModePreset;
            2, 3:    next_mode = ModeClear;
            4:       next_mode = ModeBoth;
            default: next_mode = ModeNormal;
          endcase
        end
        if (mode != ModeNormal && next_mode == ModeNormal) n_release++;
        mode = next_mode;
        run_left = (mode == ModeBoth) ? 1 : int'($urandom_range(1, 6));
      end
      // After a PRESET+CLEAR cycle only PRESET is left (CLEAR was lifted
      // in the high phase), so the PRESET scenario continues.
      preset = (mode == ModePreset || mode == ModeBoth);
      clear  = (mode == ModeClear  || mode == ModeBoth);
      // +1 / +2
      #1;
      if ($urandom_range(0, 1) == 1) d = ~d;
      #1;
      check_low();
      // +3 / +4
      #1;
      prev_mq = mq;
      if ($urandom_range(0, 1) == 1) d = ~d;
      #1;
      check_low();
      if (!preset && !clear && mq != prev_mq) n_master_follow++;
      // +5: rising edge; the behavioural model updates.
      #1;
      clk = 1'b1;
      case (mode)
        ModeNormal: begin
          exp_q = d;
          if (d) n_capture1++; else n_capture0++;
        end
        ModePreset: begin
          if (d) n_preset_blocks_d++;
          exp_q = 1'b0; n_preset++;
        end
        ModeClear: begin
          exp_q = 1'b1; n_clear++;
        end
        default: n_both++;
      endcase
      // +6: outputs right after the edge.
      #1;
      check("CLK_NOT high phase", clk_n, 1'b0);
      if (mode == ModeBoth) begin
        check("Q both", q, 1'b1);
        check("Q_NOT both", q_n, 1'b1);
        check("MASTER_Q both", mq, 1'b1);
        check("MASTER_QNOT both", mq_n, 1'b1);
      end else begin
        check("Q edge", q, exp_q);
        check("Q_NOT edge", q_n, ~exp_q);
        check("MASTER_Q edge", mq, exp_q);
        check("MASTER_QNOT edge", mq_n, ~exp_q);
      end
      // +7: D toggles against the closed master, or CLEAR is lifted.
      #1;
      if (mode == ModeBoth) begin
        clear = 1'b0;
        mode  = ModePreset;
        exp_q = 1'b0;
        run_left = 1;
      end else if ($urandom_range(0, 1) == 1) begin
        d = ~d;
        n_master_hold++;
      end
      // +8
      #1;
      check("Q high phase", q, exp_q);
      check("Q_NOT high phase", q_n, ~exp_q);
      check("MASTER_Q hold", mq, exp_q);
      check("MASTER_QNOT hold", mq_n, ~exp_q);
      #2;
      run_left--;
    end

    $display("captures: 0=%0d 1=%0d  master follows D=%0d  master holds=%0d  slave holds=%0d",
             n_capture0, n_capture1, n_master_follow, n_master_hold, n_slave_hold);
    $display("PRESET edges=%0d (D=1 blocked %0d)  CLEAR edges=%0d  PRESET+CLEAR=%0d  releases=%0d",
             n_preset, n_preset_blocks_d, n_clear, n_both, n_release);
    if (n_capture0 == 0 || n_capture1 == 0 || n_master_follow == 0 ||
        n_master_hold == 0 || n_slave_hold == 0 || n_preset == 0 ||
        n_preset_blocks_d == 0 || n_clear == 0 || n_both == 0 ||
        n_release == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
