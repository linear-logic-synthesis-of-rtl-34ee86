// mvl_gate_chk: exhaustive checker for one mvl_gate configuration.
//
// Drives every (x1, x2, i) below K, waits 1 ns and compares y with the plain
// integer reference. Reports its counts on its outputs when done.
module mvl_gate_chk
  import mvl_pkg::*;
  import tb_mvl_ref_pkg::*;
#(
  parameter int        K            = 3,
  parameter mvl_op_e   OP           = OP_MIN,
  parameter bit        ROT_AT_INPUT = 1'b0,
  parameter bit        ROT_NEG      = 1'b0,
  parameter mvl_form_e FORM         = FORM_DIFF
) (
  output logic done,
  output int   checks,
  output int   failures
);
  localparam int W = $clog2(K);
  logic [W-1:0] x1, x2, i, y;
  int r, exp_y;

  mvl_gate #(.K(K), .OP(OP), .ROT_AT_INPUT(ROT_AT_INPUT), .ROT_NEG(ROT_NEG), .FORM(FORM))
    dut (.x1(x1), .x2(x2), .i(i), .y(y));

  initial begin
    done = 1'b0; checks = 0; failures = 0;
    for (int a = 0; a < K; a++)
      for (int b = 0; b < K; b++)
        for (int c = 0; c < K; c++) begin
          x1 = W'(a); x2 = W'(b); i = W'(c);
          #1;
          r = ROT_NEG ? (K - c) % K : c;
          exp_y = elem(K, OP == OP_MAX, ROT_AT_INPUT, a, b, r);
          checks++;
          if (int'(y) != exp_y) begin
            failures++;
            if (failures < 10)
              $display("FAIL K=%0d OP=%0d RIN=%0d NEG=%0d FORM=%0d x1=%0d x2=%0d i=%0d y=%0d exp=%0d",
                       K, OP, ROT_AT_INPUT, ROT_NEG, FORM, a, b, c, y, exp_y);
          end
        end
    done = 1'b1;
  end
endmodule
