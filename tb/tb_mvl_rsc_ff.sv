// tb_mvl_rsc_ff: k-valued synchronous single-ended RS flip-flop (K = 3,
// min realisation, K = 3 max realisation, and the K = 3 min realisation in
// the input implementation, where each element rotates before the min). With C = 0 random inputs must
// leave every node unchanged; with C = K-1 the ring must follow a step model
// of the ungated RS ring. Also checks the one-clock write latency of a write
// through S.
`timescale 1ns/1ps
module tb_mvl_rsc_ff;
  import mvl_pkg::*;
  import tb_mvl_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] i, c [3];
  logic [1:0] x [3][3];
  logic [1:0] n [3][3];
  logic [1:0] q [3];
  logic       st [3];
  vec_t model [3];
  vec_t xv, prev_n;
  int checks = 0, failures = 0;
  int locked_writes = 0;

  mvl_rsc_ff #(.K(3), .OP(OP_MIN)) d0 (.clk(clk), .rst_n(rst_n), .i(i), .c(c[0]), .x(x[0]),
                                       .n(n[0]), .q(q[0]), .settled(st[0]));
  mvl_rsc_ff #(.K(3), .OP(OP_MAX), .FORM(FORM_THRESH)) d1 (.clk(clk), .rst_n(rst_n), .i(i),
                                       .c(c[1]), .x(x[1]), .n(n[1]), .q(q[1]), .settled(st[1]));
  mvl_rsc_ff #(.K(3), .OP(OP_MIN), .ROT_AT_INPUT(1'b1)) d2 (.clk(clk), .rst_n(rst_n), .i(i),
                                       .c(c[2]), .x(x[2]), .n(n[2]), .q(q[2]), .settled(st[2]));

  task automatic step_and_check(input string what);
    @(posedge clk);
    for (int d = 0; d < 3; d++) begin
      for (int j = 0; j < 3; j++) xv[j] = (int'(c[d]) == 2) ? int'(x[d][j]) : (d == 1 ? 0 : 2);
      model[d] = ring_pass(3, d == 1, d == 2, xv, model[d], int'(i));
    end
    #1;
    for (int d = 0; d < 3; d++)
      for (int j = 0; j < 3; j++) begin
        checks++;
        if (int'(n[d][j]) != model[d][j]) begin
          failures++;
          if (failures < 20) $display("FAIL %s dut%0d node%0d got %0d exp %0d", what, d, j, n[d][j], model[d][j]);
        end
      end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    i = 2'd1;
    c[0] = 2'd0; c[1] = 2'd0; c[2] = 2'd0;
    for (int j = 0; j < 3; j++) begin x[0][j] = 2'd2; x[1][j] = 2'd0; x[2][j] = 2'd2; end
    model[0] = '{default: 0};
    model[1] = '{default: 0};
    model[2] = '{default: 0};
    @(posedge clk);
    #1 rst_n = 1'b1;
    step_and_check("reset");
    // write 0 through S with C = 2 on d0 from state 0 after moving to 2
    @(negedge clk) begin c[0] = 2'd2; x[0][1] = 2'd0; end
    step_and_check("SR write");
    @(negedge clk) begin c[0] = 2'd0; x[0][1] = 2'd2; end
    step_and_check("hold");
    checks++; if (q[0] != 2'd2) begin failures++; $display("FAIL SR write gave %0d", q[0]); end
    @(negedge clk) begin x[0][0] = 2'd0; end
    step_and_check("locked S");
    checks++; if (q[0] != 2'd2) begin failures++; $display("FAIL locked write changed Q"); end
    @(negedge clk) c[0] = 2'd2;
    step_and_check("S write");
    checks++; if (q[0] != 2'd0) begin failures++; $display("FAIL S write not seen after one clock"); end
    @(negedge clk) begin c[0] = 2'd0; x[0][0] = 2'd2; end
    step_and_check("hold");

    for (int n2 = 0; n2 < 1000; n2++) begin
      @(negedge clk);
      i = 2'(1 + $urandom % 2);
      for (int d = 0; d < 3; d++) begin
        c[d] = ($urandom % 2) ? 2'd2 : 2'd0;
        for (int j = 0; j < 3; j++) x[d][j] = 2'($urandom % 3);
        if (c[d] == 2'd0) locked_writes++;
      end
      for (int j = 0; j < 3; j++) prev_n[j] = int'(n[0][j]);
      step_and_check("random");
      if (c[0] == 2'd0 && st[0]) begin
        // a settled ring must not move while locked
        for (int j = 0; j < 3; j++) begin
          checks++;
          if (int'(n[0][j]) != prev_n[j] && model[0][j] == prev_n[j]) failures++;
        end
      end
    end
    checks++; if (locked_writes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
