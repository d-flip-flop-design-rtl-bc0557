// tb_msdff_master_latch: self-check of the master latch on its own.
//
// Drives the latch as the flip-flop does (d_n_i is always ~d_i) and
// compares both outputs after every step with a rule-based model of a
// transparent-low latch with active-low preset and clear:
//   clk_n_i = 1, no force : mq = d, mq_n = ~d
//   preset_n_i = 0 only  : mq_n = 1; mq = d while open, 0 once closed
//   clear_n_i = 0 only   : mq = 1; mq_n = ~d while open, 0 once closed
//   both forces          : mq = mq_n = 1
//   clk_n_i = 0, no force : hold the stored value
// A directed sequence is followed by random steps that change one input at
// a time (both forces are never released together, since the latch then
// races like any cross-coupled NAND pair).
`timescale 1ns/1ps
module tb_msdff_master_latch;
  logic d, clk_n, pre_n, clr_n;
  logic mq, mq_n;
  logic state;
  int   checks   = 0;
  int   failures = 0;
  int   n_transparent = 0, n_hold = 0, n_preset = 0, n_clear = 0, n_both = 0;

  msdff_master_latch dut (
    .d_i(d), .d_n_i(~d), .clk_n_i(clk_n), .preset_n_i(pre_n),
    .clear_n_i(clr_n), .mq_o(mq), .mq_n_o(mq_n)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one set of inputs, wait for the gates to settle, then compare.
  task automatic step(input logic nd, input logic nclk_n, input logic npre_n,
                      input logic nclr_n);
    logic exp_q, exp_qn;
    d = nd; clk_n = nclk_n; pre_n = npre_n; clr_n = nclr_n;
    #1;
    if (!pre_n && !clr_n) begin
      exp_q = 1'b1; exp_qn = 1'b1; n_both++;
    end else if (!pre_n) begin
      exp_qn = 1'b1; exp_q = clk_n ? d : 1'b0; state = 1'b0; n_preset++;
    end else if (!clr_n) begin
      exp_q = 1'b1; exp_qn = clk_n ? ~d : 1'b0; state = 1'b1; n_clear++;
    end else if (clk_n) begin
      state = d; exp_q = d; exp_qn = ~d; n_transparent++;
    end else begin
      exp_q = state; exp_qn = ~state; n_hold++;
    end
    checks++;
    if (mq !== exp_q || mq_n !== exp_qn) begin
      failures++;
      $display("FAIL t=%0t d=%0b clk_n=%0b pre_n=%0b clr_n=%0b : mq=%0b mq_n=%0b expected %0b %0b",
               $time, d, clk_n, pre_n, clr_n, mq, mq_n, exp_q, exp_qn);
    end
  endtask

  initial begin
    logic nd, nclk_n, npre_n, nclr_n;
    state = 1'b0;
    // Directed: open, capture 1, close, hold against D, capture 0.
    step(0, 1, 1, 1);
    step(1, 1, 1, 1);
    step(1, 0, 1, 1);
    step(0, 0, 1, 1);
    step(1, 0, 1, 1);
    step(1, 1, 1, 1);
    step(0, 1, 1, 1);
    step(0, 0, 1, 1);
    step(1, 0, 1, 1);
    // Forces while closed and while open.
    step(1, 0, 1, 0);
    step(1, 0, 1, 1);
    step(0, 0, 0, 1);
    step(0, 0, 1, 1);
    step(1, 1, 0, 1);
    step(1, 0, 0, 1);
    step(1, 0, 0, 0);
    step(1, 0, 1, 0);
    step(1, 0, 1, 1);
    // Random single-input changes.
    for (int i = 0; i < 4000; i++) begin
      nd = d; nclk_n = clk_n; npre_n = pre_n; nclr_n = clr_n;
      case ($urandom_range(0, 5))
        0, 1: nd = ~d;
        2, 3: nclk_n = ~clk_n;
        4:    if (!clr_n || $urandom_range(0, 3) == 0 || !pre_n) npre_n = ~pre_n;
        default:
              if (!pre_n || $urandom_range(0, 3) == 0 || !clr_n) nclr_n = ~clr_n;
      endcase
      // Never lift both forces in one step.
      if (!pre_n && !clr_n && npre_n && nclr_n) nclr_n = 1'b0;
      step(nd, nclk_n, npre_n, nclr_n);
    end
    if (n_transparent == 0 || n_hold == 0 || n_preset == 0 || n_clear == 0 ||
        n_both == 0) begin
      failures++;
      $display("FAIL a mode was never exercised");
    end
    $display("modes: transparent=%0d hold=%0d preset=%0d clear=%0d both=%0d",
             n_transparent, n_hold, n_preset, n_clear, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
