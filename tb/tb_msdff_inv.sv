// tb_msdff_inv: exhaustive self-check of the inverter cell.
// Drives both input values, compares the output with the inverter's truth
// table written as a constant, and prints the TB_RESULT line.
`timescale 1ns/1ps
module tb_msdff_inv;
  logic in_s;
  logic out_s;
  int   checks   = 0;
  int   failures = 0;

  // Expected output, indexed by the input value.
  localparam logic [1:0] TruthTable = 2'b01;

  msdff_inv dut (.in_i(in_s), .out_o(out_s));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 2; v++) begin
        in_s = v[0];
        #1;
        checks++;
        if (out_s !== TruthTable[v]) begin
          failures++;
          $display("FAIL in=%0d out=%0b expected %0b", v, out_s, TruthTable[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
