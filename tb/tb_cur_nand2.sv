// tb_cur_nand2: exhaustive test of the two-valued current AND-NOT element in
// all four linear forms against the Boolean NAND.
`timescale 1ns/1ps
module tb_cur_nand2;
  import mvl_pkg::*;

  logic x1, x2;
  logic y [4];
  int checks = 0, failures = 0;

  for (genvar f = 0; f < 4; f++) begin : g_form
    cur_nand2 #(.FORM(cur_form_e'(f))) dut (.x1(x1), .x2(x2), .y(y[f]));
  end

  initial begin
    #1000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2; a++)
      for (int b = 0; b < 2; b++) begin
        x1 = a[0]; x2 = b[0];
        #1;
        for (int f = 0; f < 4; f++) begin
          checks++;
          if (y[f] !== ~(x1 & x2)) begin
            failures++;
            $display("FAIL form=%0d x1=%0d x2=%0d y=%0d", f, a, b, y[f]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
