// tb_mvl_gate: exhaustive test of the k-valued linear logic element for
// K = 2, 3, 5, both min and max, rotation at the output and at the input,
// (+) and (-), and all three arithmetic forms (72 configurations).
// Expected values come from plain min / max / modulo arithmetic.
`timescale 1ns/1ps
module tb_mvl_gate;
  import mvl_pkg::*;

  localparam int NK = 3;
  localparam int KS [NK] = '{2, 3, 5};
  localparam int NCFG = NK * 2 * 2 * 2 * 3;

  logic done [NCFG];
  int   chk  [NCFG];
  int   fl   [NCFG];

  for (genvar a = 0; a < NK; a++)
    for (genvar o = 0; o < 2; o++)
      for (genvar ri = 0; ri < 2; ri++)
        for (genvar ng = 0; ng < 2; ng++)
          for (genvar f = 0; f < 3; f++) begin : g_cfg
            localparam int IDX = (((a * 2 + o) * 2 + ri) * 2 + ng) * 3 + f;
            mvl_gate_chk #(
              .K(KS[a]), .OP(mvl_op_e'(o)), .ROT_AT_INPUT(ri[0]), .ROT_NEG(ng[0]),
              .FORM(mvl_form_e'(f))
            ) u_chk (.done(done[IDX]), .checks(chk[IDX]), .failures(fl[IDX]));
          end

  int checks, failures;
  bit all_done;

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  initial begin
    all_done = 1'b0;
    while (!all_done) begin
      #10;
      all_done = 1'b1;
      for (int c = 0; c < NCFG; c++) if (!done[c]) all_done = 1'b0;
    end
    checks = 0; failures = 0;
    for (int c = 0; c < NCFG; c++) begin
      checks += chk[c];
      failures += fl[c];
    end
    // every configuration must have run its full sweep
    checks++;
    if (checks != 1 + 24 * (8 + 27 + 125)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
