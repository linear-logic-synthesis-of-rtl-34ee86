// tb_mvl_d_ff: k-valued D flip-flop. Single-ended K = 3 and K = 5 and the
// push-pull K = 3 build. For every rotation i != 0 and random D: with
// C = K-1 the single-ended flip-flop must show Q = D, with all nodes
// settled, two clocks later (the ring model's worst case), with C = 0 it
// must hold; the push-pull build must keep its old Q while C = K-1 and show
// D two clocks after C returns to 0. The OR-NOT (max) builds, single-ended
// and push-pull at K = 3, get the same stimulus and must behave the same.
`timescale 1ns/1ps
module tb_mvl_d_ff;
  import mvl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] i3, c3, d3, q3, cp, qp;
  logic [2:0] i5, c5, d5, q5;
  logic [1:0] n3 [3];
  logic [1:0] np [3];
  logic [2:0] n5 [5];
  logic       s3, s5, sp;
  logic [1:0] qm, qmp;
  logic [1:0] nm [3];
  logic [1:0] nmp [3];
  logic       sm, smp;
  int checks = 0, failures = 0;
  int exp3, exp5, expp, oldp, oldmp;

  mvl_d_ff #(.K(3)) dut3 (.clk(clk), .rst_n(rst_n), .i(i3), .c(c3), .d(d3), .n(n3), .q(q3), .settled(s3));
  mvl_d_ff #(.K(5)) dut5 (.clk(clk), .rst_n(rst_n), .i(i5), .c(c5), .d(d5), .n(n5), .q(q5), .settled(s5));
  mvl_d_ff #(.K(3), .PUSH_PULL(1'b1)) dutp (.clk(clk), .rst_n(rst_n), .i(i3), .c(cp), .d(d3),
                                            .n(np), .q(qp), .settled(sp));
  mvl_d_ff #(.K(3), .OP(OP_MAX)) dutm (.clk(clk), .rst_n(rst_n), .i(i3), .c(c3), .d(d3),
                                       .n(nm), .q(qm), .settled(sm));
  mvl_d_ff #(.K(3), .OP(OP_MAX), .PUSH_PULL(1'b1)) dutmp (.clk(clk), .rst_n(rst_n), .i(i3), .c(cp),
                                                          .d(d3), .n(nmp), .q(qmp), .settled(smp));

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    i3 = 2'd1; i5 = 3'd1; c3 = '0; c5 = '0; cp = '0; d3 = '0; d5 = '0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk);
    exp3 = 0; exp5 = 0; expp = 0;
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      i3 = 2'(1 + $urandom % 2);
      i5 = 3'(1 + $urandom % 4);
      d3 = 2'($urandom % 3);
      d5 = 3'($urandom % 5);
      c3 = ($urandom % 4 != 0) ? 2'd2 : 2'd0;
      c5 = ($urandom % 4 != 0) ? 3'd4 : 3'd0;
      cp = 2'd2;
      oldp = int'(qp);
      oldmp = int'(qmp);
      if (c3 == 2'd2) exp3 = int'(d3);
      if (c5 == 3'd4) exp5 = int'(d5);
      repeat (2) @(posedge clk);
      #1;
      chk(int'(q3), exp3, "K=3 two clocks after write/hold");
      chk(int'(q5), exp5, "K=5 two clocks after write/hold");
      chk(int'(qp), oldp, "push-pull holds while C high");
      chk(int'(qm), exp3, "OR-NOT K=3 two clocks after write/hold");
      chk(int'(qmp), oldmp, "OR-NOT push-pull holds while C high");
      checks++; if (!s3 || !s5 || !sm) begin failures++; $display("FAIL not settled"); end
      @(negedge clk) begin cp = 2'd0; c3 = 2'd0; c5 = 3'd0; end
      expp = int'(d3);
      repeat (2) @(posedge clk);
      #1;
      chk(int'(qp), expp, "push-pull two clocks after C falls");
      chk(int'(qmp), expp, "OR-NOT push-pull two clocks after C falls");
      checks++; if (!sp || !smp) begin failures++; $display("FAIL push-pull not settled"); end
      d3 = 2'($urandom % 3); d5 = 3'($urandom % 5);
      @(posedge clk) #1;
      chk(int'(q3), exp3, "K=3 hold with C = 0");
      chk(int'(q5), exp5, "K=5 hold with C = 0");
      chk(int'(qp), expp, "push-pull hold");
      chk(int'(qm), exp3, "OR-NOT K=3 hold with C = 0");
      chk(int'(qmp), expp, "OR-NOT push-pull hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
