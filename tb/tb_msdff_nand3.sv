// tb_msdff_nand3: exhaustive self-check of the 3-input NAND cell.
// Walks all eight input combinations twice, compares the output with the
// NAND truth table written as a constant, and prints the TB_RESULT line.
`timescale 1ns/1ps
module tb_msdff_nand3;
  logic a_s;
  logic b_s;
  logic c_s;
  logic out_s;
  int   checks   = 0;
  int   failures = 0;

  // Expected output, indexed by {a, b, c}: only 111 gives 0.
  localparam logic [7:0] TruthTable = 8'b0111_1111;

  msdff_nand3 dut (.a_i(a_s), .b_i(b_s), .c_i(c_s), .out_o(out_s));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {a_s, b_s, c_s} = v[2:0];
        #1;
        checks++;
        if (out_s !== TruthTable[v]) begin
          failures++;
          $display("FAIL a,b,c=%03b out=%0b expected %0b", v[2:0], out_s,
                   TruthTable[v]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
