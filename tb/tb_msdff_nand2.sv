// tb_msdff_nand2: exhaustive self-check of the 2-input NAND cell.
// Walks all four input combinations twice, compares the output with the
// NAND truth table written as a constant, and prints the TB_RESULT line.
`timescale 1ns/1ps
module tb_msdff_nand2;
  logic a_s;
  logic b_s;
  logic out_s;
  int   checks   = 0;
  int   failures = 0;

  // Expected output, indexed by {a, b}: only 11 gives 0.
  localparam logic [3:0] TruthTable = 4'b0111;

  msdff_nand2 dut (.a_i(a_s), .b_i(b_s), .out_o(out_s));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 4; v++) begin
        {a_s, b_s} = v[1:0];
        #1;
        checks++;
        if (out_s !== TruthTable[v]) begin
          failures++;
          $display("FAIL a,b=%02b out=%0b expected %0b", v[1:0], out_s,
                   TruthTable[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
