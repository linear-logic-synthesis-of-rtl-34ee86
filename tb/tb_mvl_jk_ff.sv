// tb_mvl_jk_ff: k-valued JK flip-flop, K = 3.
// Every clock the outputs are compared with a two-ring step model (master
// fed by min(J/JK/K, slave outputs), slave fed by the master's outputs
// shifted by one place). Directed part: with J = JK = K = 2 every C pulse
// must step Q by i like the T flip-flop. Random part: random J, JK, K,
// C pulses of 2-4 clocks and i in {1, 2}.
`timescale 1ns/1ps
module tb_mvl_jk_ff;
  import mvl_pkg::*;
  import tb_mvl_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] i, c, j, jk, k, q;
  logic [1:0] n [3];
  logic       st;
  vec_t mm, ms;
  int checks = 0, failures = 0, e, writes_changed = 0;

  mvl_jk_ff #(.KV(3)) dut (.clk(clk), .rst_n(rst_n), .i(i), .c(c), .j(j), .jk(jk), .k(k),
                           .n(n), .q(q), .settled(st));

  task automatic step_and_check(input string what);
    vec_t gm, gs, om, os;
    @(posedge clk);
    om = mm; os = ms;
    gm[0] = mn(int'(j),  os[0]);
    gm[1] = mn(int'(jk), os[1]);
    gm[2] = mn(int'(k),  os[2]);
    for (int a = 0; a < 3; a++) begin
      if (int'(c) != 2) gm[a] = 2;
      gs[a] = (int'(c) == 0) ? om[(a + 2) % 3] : 2;
    end
    mm = ring_pass(3, 1'b0, 1'b0, gm, mm, int'(i));
    ms = ring_pass(3, 1'b0, 1'b0, gs, ms, int'(i));
    #1;
    for (int a = 0; a < 3; a++) begin
      checks++;
      if (int'(n[a]) != ms[a]) begin
        failures++;
        if (failures < 20) $display("FAIL %s node%0d got %0d exp %0d", what, a, n[a], ms[a]);
      end
    end
  endtask

  task automatic pulse(input int hi, input int lo);
    @(negedge clk) c = 2'd2;
    repeat (hi) step_and_check("C high");
    @(negedge clk) c = 2'd0;
    repeat (lo) step_and_check("C low");
  endtask

  int q0;

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    i = 2'd1; c = 2'd0; j = 2'd2; jk = 2'd2; k = 2'd2;
    mm = '{default: 0};
    ms = '{default: 0};
    @(posedge clk);
    #1 rst_n = 1'b1;
    step_and_check("reset");
    step_and_check("reset");
    // toggle (count) mode
    e = 0;
    for (int n2 = 0; n2 < 12; n2++) begin
      @(negedge clk) i = (n2 < 6) ? 2'd1 : 2'd2;
      step_and_check("new i");
      // a new rotation re-rotates the nodes while the slave is open, which
      // can move the stored level: count from wherever it rests
      step_and_check("new i");
      step_and_check("new i");
      e = int'(q);
      pulse(2, 2);
      e = (e + int'(i)) % 3;
      checks++;
      if (int'(q) != e) begin failures++; $display("FAIL count mode got %0d exp %0d", q, e); end
    end
    // random gate inputs
    for (int n2 = 0; n2 < 500; n2++) begin
      @(negedge clk) begin
        i  = 2'(1 + $urandom % 2);
        j  = 2'($urandom % 3);
        jk = 2'($urandom % 3);
        k  = 2'($urandom % 3);
      end
      step_and_check("new inputs");
      q0 = int'(q);
      pulse(2 + $urandom % 3, 2 + $urandom % 3);
      if (int'(q) != q0) writes_changed++;
    end
    checks++; if (writes_changed == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
