// tb_mvl_rs_ff: k-valued asynchronous RS flip-flop.
//
// Six instances: K = 3 min ring (difference form), K = 3 max ring (module
// form), K = 3 min ring with the rotation on the chained input (threshold
// form), K = 5 min ring, and the two-valued (K = 2) ring in the output and
// the input implementation. Every clock all node outputs are compared with a
// step model (one pass round the ring per clock, plain min/max/modulo).
// Directed checks for K = 3, i = 1: from state 1, S can only lead to 0 and
// SR reaches the other two states; hold inputs keep every state; a write
// through one input (the others at the hold level) settles within two
// clocks.
`timescale 1ns/1ps
module tb_mvl_rs_ff;
  import mvl_pkg::*;
  import tb_mvl_ref_pkg::*;

  localparam int ND = 6;
  localparam int KD [ND] = '{3, 3, 3, 5, 2, 2};
  localparam bit MX [ND] = '{1'b0, 1'b1, 1'b0, 1'b0, 1'b0, 1'b0};
  localparam bit RI [ND] = '{1'b0, 1'b0, 1'b1, 1'b0, 1'b0, 1'b1};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // stimulus and observed outputs, widened to 3 bits
  vec_t xs [ND];
  vec_t ns [ND];
  int   is [ND];
  logic st [ND];
  vec_t model [ND];
  int checks = 0, failures = 0;

  logic [1:0] x3 [3][3];
  logic [1:0] n3 [3][3];
  logic [1:0] i3 [3];
  logic [2:0] x5 [5];
  logic [2:0] n5 [5];
  logic [2:0] i5;
  logic [1:0] q3 [3];
  logic [2:0] q5;
  logic       x2 [2][2];
  logic       n2 [2][2];
  logic       i2 [2];
  logic       q2 [2];

  mvl_rs_ff #(.K(3), .OP(OP_MIN), .ROT_AT_INPUT(1'b0), .FORM(FORM_DIFF)) d0 (
    .clk(clk), .rst_n(rst_n), .i(i3[0]), .x(x3[0]), .n(n3[0]), .q(q3[0]), .settled(st[0]));
  mvl_rs_ff #(.K(3), .OP(OP_MAX), .ROT_AT_INPUT(1'b0), .FORM(FORM_MODULE)) d1 (
    .clk(clk), .rst_n(rst_n), .i(i3[1]), .x(x3[1]), .n(n3[1]), .q(q3[1]), .settled(st[1]));
  mvl_rs_ff #(.K(3), .OP(OP_MIN), .ROT_AT_INPUT(1'b1), .FORM(FORM_THRESH)) d2 (
    .clk(clk), .rst_n(rst_n), .i(i3[2]), .x(x3[2]), .n(n3[2]), .q(q3[2]), .settled(st[2]));
  mvl_rs_ff #(.K(5), .OP(OP_MIN), .ROT_AT_INPUT(1'b0), .FORM(FORM_DIFF)) d3 (
    .clk(clk), .rst_n(rst_n), .i(i5), .x(x5), .n(n5), .q(q5), .settled(st[3]));
  mvl_rs_ff #(.K(2), .OP(OP_MIN), .ROT_AT_INPUT(1'b0), .FORM(FORM_DIFF)) d4 (
    .clk(clk), .rst_n(rst_n), .i(i2[0]), .x(x2[0]), .n(n2[0]), .q(q2[0]), .settled(st[4]));
  mvl_rs_ff #(.K(2), .OP(OP_MIN), .ROT_AT_INPUT(1'b1), .FORM(FORM_THRESH)) d5 (
    .clk(clk), .rst_n(rst_n), .i(i2[1]), .x(x2[1]), .n(n2[1]), .q(q2[1]), .settled(st[5]));

  always_comb begin
    for (int d = 0; d < 3; d++) begin
      i3[d] = 2'(is[d]);
      for (int j = 0; j < 3; j++) begin
        x3[d][j] = 2'(xs[d][j]);
        ns[d][j] = int'(n3[d][j]);
      end
    end
    i5 = 3'(is[3]);
    for (int j = 0; j < 5; j++) begin
      x5[j] = 3'(xs[3][j]);
      ns[3][j] = int'(n5[j]);
    end
    for (int d = 0; d < 2; d++) begin
      i2[d] = is[4 + d][0];
      for (int j = 0; j < 2; j++) begin
        x2[d][j] = xs[4 + d][j][0];
        ns[4 + d][j] = int'(n2[d][j]);
      end
    end
  end

  function automatic int hold_level(input int d);
    return MX[d] ? 0 : KD[d] - 1;
  endfunction

  // advance the model by one clock and compare
  task automatic step_and_check(input string what);
    @(posedge clk);
    for (int d = 0; d < ND; d++)
      model[d] = ring_pass(KD[d], MX[d], RI[d], xs[d], model[d], is[d]);
    #1;
    for (int d = 0; d < ND; d++)
      for (int j = 0; j < KD[d]; j++) begin
        checks++;
        if (ns[d][j] != model[d][j]) begin
          failures++;
          if (failures < 20)
            $display("FAIL %s dut%0d node%0d got %0d exp %0d", what, d, j, ns[d][j], model[d][j]);
        end
      end
  endtask

  task automatic set_hold();
    for (int d = 0; d < ND; d++)
      for (int j = 0; j < 8; j++) xs[d][j] = hold_level(d);
  endtask

  // drive d0 (K = 3 min ring, i = 1) into state 1: from 0, SR = 0 gives 2;
  // from 2, R = 0 gives 1
  task automatic d0_reach1();
    for (int n = 0; n < 3 && int'(q3[0]) != 1; n++) begin
      @(negedge clk);
      set_hold();
      if (int'(q3[0]) == 0) xs[0][1] = 0;
      else                  xs[0][2] = 0;
      step_and_check("walk");
      step_and_check("walk");
      @(negedge clk) set_hold();
      step_and_check("walk hold");
    end
    checks++;
    if (int'(q3[0]) != 1) begin failures++; $display("FAIL could not reach state 1"); end
  endtask

  int got;

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    set_hold();
    for (int d = 0; d < ND; d++) begin
      is[d] = 1;
      model[d] = '{default: 0};
    end
    @(posedge clk);
    #1 rst_n = 1'b1;
    // hold inputs: consistent after one clock, then unchanged
    for (int n = 0; n < 4; n++) step_and_check("hold after reset");
    for (int d = 0; d < ND; d++) begin
      checks++;
      if (!st[d] || ns[d][KD[d]-1] != 0) begin failures++; $display("FAIL reset state dut%0d", d); end
    end

    // directed: K = 3, i = 1, state 1
    for (int v = 0; v < 3; v++) begin
      d0_reach1();
      // S = v from state 1
      @(negedge clk);
      set_hold();
      xs[0][0] = v;
      step_and_check("S from 1");
      step_and_check("S from 1");
      got = int'(q3[0]);
      checks++;
      if (got != ((v == 0) ? 0 : 1)) begin
        failures++; $display("FAIL S=%0d from state 1 gave %0d", v, got);
      end
      @(negedge clk) set_hold();
      step_and_check("hold");
    end
    // SR from state 1 reaches 0 (SR = 1) and 2 (SR = 0)
    for (int v = 0; v < 2; v++) begin
      d0_reach1();
      @(negedge clk);
      set_hold();
      xs[0][1] = v;
      step_and_check("SR from 1");
      step_and_check("SR from 1");
      got = int'(q3[0]);
      checks++;
      if (got != ((v == 0) ? 2 : 0)) begin
        failures++; $display("FAIL SR=%0d from state 1 gave %0d", v, got);
      end
      @(negedge clk) set_hold();
      step_and_check("hold");
    end

    // random one-input writes (allowed combinations): settled within two clocks
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      set_hold();
      for (int d = 0; d < ND; d++) begin
        is[d] = 1 + ($urandom % (KD[d] - 1));
        xs[d][$urandom % KD[d]] = $urandom % KD[d];
      end
      step_and_check("one-input write");
      step_and_check("one-input write");
      for (int d = 0; d < ND; d++) begin
        checks++;
        if (!st[d]) begin failures++; $display("FAIL dut%0d not settled after two clocks", d); end
      end
      @(negedge clk) set_hold();
      step_and_check("hold");
      step_and_check("hold");
    end

    // fully random inputs, any rotation: step model only
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      for (int d = 0; d < ND; d++) begin
        is[d] = $urandom % KD[d];
        for (int j = 0; j < KD[d]; j++) xs[d][j] = $urandom % KD[d];
      end
      step_and_check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
