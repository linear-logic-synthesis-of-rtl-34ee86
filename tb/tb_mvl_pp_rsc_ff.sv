// tb_mvl_pp_rsc_ff: k-valued push-pull RS flip-flop (K = 3 and K = 5 in the
// output implementation, and K = 3 in the input implementation).
// Checks that the outputs do not move while C = K-1 (master open), that
// after C returns to 0 the slave holds exactly the master's level, and that
// every clock matches a two-ring step model.
`timescale 1ns/1ps
module tb_mvl_pp_rsc_ff;
  import mvl_pkg::*;
  import tb_mvl_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] i3, c3;
  logic [1:0] x3 [3];
  logic [1:0] n3 [3];
  logic [1:0] q3;
  logic       st3, st5;
  logic [2:0] i5, c5;
  logic [2:0] x5 [5];
  logic [2:0] n5 [5];
  logic [2:0] q5;
  logic [1:0] ia, ca, qa;
  logic [1:0] xa [3];
  logic [1:0] na [3];
  logic       sta;

  int checks = 0, failures = 0, transfers = 0;
  // master and slave node models, [0]: K = 3, [1]: K = 5, [2]: K = 3 input form
  vec_t mm [3], ms [3];
  vec_t xin [3];
  int kk [3] = '{3, 5, 3};
  bit rin [3] = '{1'b0, 1'b0, 1'b1};
  int ii [3], cc [3];

  mvl_pp_rsc_ff #(.K(3)) d3 (.clk(clk), .rst_n(rst_n), .i(i3), .c(c3), .x(x3), .n(n3), .q(q3),
                             .settled(st3));
  mvl_pp_rsc_ff #(.K(5)) d5 (.clk(clk), .rst_n(rst_n), .i(i5), .c(c5), .x(x5), .n(n5), .q(q5),
                             .settled(st5));
  mvl_pp_rsc_ff #(.K(3), .ROT_AT_INPUT(1'b1)) da (.clk(clk), .rst_n(rst_n), .i(ia), .c(ca), .x(xa),
                                                 .n(na), .q(qa), .settled(sta));

  always_comb begin
    i3 = 2'(ii[0]); c3 = 2'(cc[0]);
    i5 = 3'(ii[1]); c5 = 3'(cc[1]);
    for (int j = 0; j < 3; j++) x3[j] = 2'(xin[0][j]);
    for (int j = 0; j < 5; j++) x5[j] = 3'(xin[1][j]);
    ia = 2'(ii[2]); ca = 2'(cc[2]);
    for (int j = 0; j < 3; j++) xa[j] = 2'(xin[2][j]);
  end

  function automatic int got(input int d, input int j);
    return (d == 0) ? int'(n3[j]) : (d == 1) ? int'(n5[j]) : int'(na[j]);
  endfunction

  task automatic step_and_check(input string what);
    vec_t gm, gs, om;
    int k;
    @(posedge clk);
    for (int d = 0; d < 3; d++) begin
      k = kk[d];
      om = mm[d];
      for (int j = 0; j < k; j++) begin
        gm[j] = (cc[d] == k - 1) ? xin[d][j] : k - 1;
        gs[j] = (cc[d] == 0) ? om[rin[d] ? j : (j + k - 1) % k] : k - 1;
      end
      mm[d] = ring_pass(k, 1'b0, rin[d], gm, mm[d], ii[d]);
      ms[d] = ring_pass(k, 1'b0, rin[d], gs, ms[d], ii[d]);
    end
    #1;
    for (int d = 0; d < 3; d++)
      for (int j = 0; j < kk[d]; j++) begin
        checks++;
        if (got(d, j) != ms[d][j]) begin
          failures++;
          if (failures < 20) $display("FAIL %s K=%0d node%0d got %0d exp %0d", what, kk[d], j, got(d, j), ms[d][j]);
        end
      end
  endtask

  int qbefore [3];

  initial begin
    #4000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int d = 0; d < 3; d++) begin
      ii[d] = 1; cc[d] = 0;
      xin[d] = '{default: kk[d] - 1};
      mm[d] = '{default: 0};
      ms[d] = '{default: 0};
    end
    @(posedge clk);
    #1 rst_n = 1'b1;
    step_and_check("reset");
    for (int n = 0; n < 500; n++) begin
      // phase 1: master open, one random input written (allowed combination)
      @(negedge clk);
      for (int d = 0; d < 3; d++) begin
        ii[d] = 1 + $urandom % (kk[d] - 1);
        xin[d] = '{default: kk[d] - 1};
        xin[d][$urandom % kk[d]] = $urandom % kk[d];
        cc[d] = kk[d] - 1;
        qbefore[d] = got(d, kk[d] - 1);
      end
      step_and_check("master open");
      step_and_check("master open");
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (got(d, kk[d] - 1) != qbefore[d]) begin failures++; $display("FAIL output moved while master open"); end
      end
      // phase 2: master locked, slave copies
      @(negedge clk);
      for (int d = 0; d < 3; d++) begin
        cc[d] = 0;
        xin[d][$urandom % kk[d]] = $urandom % kk[d];  // ignored while locked
      end
      step_and_check("slave copy");
      step_and_check("slave copy");
      for (int d = 0; d < 3; d++) begin
        checks++;
        if (got(d, kk[d] - 1) != mm[d][kk[d] - 1]) begin
          failures++; $display("FAIL slave %0d differs from master %0d", got(d, kk[d] - 1), mm[d][kk[d] - 1]);
        end
        if (got(d, kk[d] - 1) != qbefore[d]) transfers++;
      end
    end
    checks++; if (transfers == 0) failures++;
    $display("state transfers seen: %0d", transfers);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
