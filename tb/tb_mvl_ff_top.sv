// tb_mvl_ff_top: end-to-end test of the whole flip-flop family at the
// default valuedness (K = 3), with no parameter overrides.
//
// Runs, for rotation i = 1 and then i = 2:
//   RS      one-input writes through S, SR and R, checked against a settled
//           ring model, and the non-allowed pattern S = SR = R = 1 at i = 2,
//           which has no fixed point and must keep the ring unsettled;
//   RSC     random writes with C = 0 (must be ignored) and C = 2;
//   PP      master write with C = 2, transfer to the slave after C falls,
//           in the output and in the input implementation;
//   D       loads of random D, AND-NOT and OR-NOT forms;
//   T       counting pulses, including wrap-around, in both directions;
//   JK      count mode (J = JK = K = 2) and writes with lowered gate inputs;
//   binary  set, clear and the both-low pattern of the two-valued pair, and
//           set/clear through the two-valued push-pull flip-flop.
// Each mechanism is counted; one that never happened counts as a failure.
`timescale 1ns/1ps
module tb_mvl_ff_top;
  import mvl_pkg::*;
  import tb_mvl_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] i;
  logic [1:0] rs_x [3], rs_n [3];
  logic       rs_settled;
  logic [1:0] rsc_c, rsc_x [3], rsc_n [3];
  logic       rsc_settled;
  logic [1:0] pp_c, pp_x [3], pp_n [3];
  logic       pp_settled;
  logic [1:0] ppi_c, ppi_x [3], ppi_n [3];
  logic       ppi_settled;
  logic [1:0] dm_c, dm_d, dm_n [3], dm_q;
  logic       dm_settled;
  logic [1:0] d_c, d_d, d_n [3], d_q;
  logic       d_settled;
  logic [1:0] t_t, t_n [3], t_q;
  logic       t_settled;
  logic [1:0] jk_c, jk_j, jk_jk, jk_k, jk_n [3], jk_q;
  logic       jk_settled;
  logic       b_s_n, b_r_n, b_q, b_q_n, b_settled;
  logic       bp_c, bp_s_n, bp_r_n, bp_q, bp_q_n, bp_settled;

  mvl_ff_top dut (.*);

  int checks = 0, failures = 0;

  typedef enum int {
    M_RS_S, M_RS_SR, M_RS_R, M_RS_OSC, M_RSC_LOCK, M_RSC_PASS, M_PP_XFER, M_D_LOAD,
    M_T_COUNT, M_T_WRAP, M_T_UP, M_T_DOWN, M_JK_TOGGLE, M_JK_WRITE, M_B_SET, M_B_CLEAR,
    M_B_BOTH, M_BP_XFER, M_PPI_XFER, M_DM_LOAD, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"rs write via S", "rs write via SR", "rs write via R",
    "rs oscillation", "rsc locked", "rsc write", "push-pull transfer", "d load",
    "t count", "t wrap", "t count up", "t count down", "jk toggle", "jk write",
    "binary set", "binary clear", "binary both low", "binary push-pull transfer",
    "input-form pp transfer", "or-not d load"};

  task automatic chk(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 30) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  // level the ring settles to from a consistent state q with inputs x
  function automatic int settle(input vec_t x, input int q, input int r);
    vec_t n, nn;
    n = hold_nodes(3, q, r);
    for (int s = 0; s < 12; s++) begin
      nn = ring_pass(3, 1'b0, 1'b0, x, n, r);
      if (nn == n) break;
      n = nn;
    end
    return n[2];
  endfunction

  // the same for the input implementation (rotate, then min); its hold
  // state for level q is n[j] = q (+) (j+1)*i
  function automatic int settle_in(input vec_t x, input int q, input int r);
    vec_t n, nn;
    n = '{default: 0};
    for (int j = 0; j < 3; j++) n[j] = (q + (j + 1) * r) % 3;
    for (int s = 0; s < 12; s++) begin
      nn = ring_pass(3, 1'b0, 1'b1, x, n, r);
      if (nn == n) break;
      n = nn;
    end
    return n[2];
  endfunction

  task automatic clocks(input int n);
    repeat (n) @(posedge clk);
    #1;
  endtask

  task automatic all_hold();
    for (int j = 0; j < 3; j++) begin
      rs_x[j] = 2'd2; rsc_x[j] = 2'd2; pp_x[j] = 2'd2; ppi_x[j] = 2'd2;
    end
    rsc_c = 2'd0; pp_c = 2'd0; ppi_c = 2'd0; d_c = 2'd0; dm_c = 2'd0; t_t = 2'd0; jk_c = 2'd0;
    jk_j = 2'd2; jk_jk = 2'd2; jk_k = 2'd2;
    b_s_n = 1'b1; b_r_n = 1'b1;
    bp_c = 1'b0; bp_s_n = 1'b1; bp_r_n = 1'b1;
  endtask

  vec_t xv, gx, sn;
  int q0, e, sel, v, ri, tq;

  initial begin
    #5000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    i = 2'd1;
    d_d = 2'd0;
    dm_d = 2'd0;
    all_hold();
    clocks(2);
    rst_n = 1'b1;
    clocks(2);
    chk(int'(rs_n[2]), 0, "reset");

    for (int phase = 0; phase < 2; phase++) begin
      @(negedge clk) i = 2'(phase + 1);
      ri = phase + 1;
      clocks(3);

      // ---------------- RS: one-input writes
      for (int n = 0; n < 60; n++) begin
        @(negedge clk);
        q0 = int'(rs_n[2]);
        sel = $urandom % 3;
        v = $urandom % 3;
        xv = '{default: 2};
        xv[sel] = v;
        for (int j = 0; j < 3; j++) rs_x[j] = 2'(xv[j]);
        e = settle(xv, q0, ri);
        clocks(2);
        chk(int'(rs_n[2]), e, "rs one-input write");
        checks++; if (!rs_settled) failures++;
        if (e != q0) mech[M_RS_S + sel]++;
        @(negedge clk) all_hold();
        clocks(2);
        chk(int'(rs_n[2]), e, "rs hold");
      end
      // RS: non-allowed pattern, no fixed point at i = 2
      if (ri == 2) begin
        @(negedge clk) for (int j = 0; j < 3; j++) rs_x[j] = 2'd1;
        clocks(1);
        tq = 0;
        for (int n = 0; n < 8; n++) begin
          clocks(1);
          if (!rs_settled) tq++;
        end
        chk(tq, 8, "rs oscillates on S = SR = R = 1");
        if (tq == 8) mech[M_RS_OSC]++;
        @(negedge clk) all_hold();
        clocks(3);
      end

      // ---------------- RSC: random writes, locked or open
      for (int n = 0; n < 60; n++) begin
        @(negedge clk);
        q0 = int'(rsc_n[2]);
        xv = '{default: 2};
        xv[$urandom % 3] = $urandom % 3;
        for (int j = 0; j < 3; j++) rsc_x[j] = 2'(xv[j]);
        rsc_c = ($urandom % 2) ? 2'd2 : 2'd0;
        e = (rsc_c == 2'd2) ? settle(xv, q0, ri) : q0;
        clocks(2);
        chk(int'(rsc_n[2]), e, "rsc write/lock");
        if (rsc_c == 2'd0 && settle(xv, q0, ri) != q0) mech[M_RSC_LOCK]++;
        if (rsc_c == 2'd2 && e != q0) mech[M_RSC_PASS]++;
        @(negedge clk) all_hold();
        clocks(2);
      end

      // ---------------- push-pull RSC
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        q0 = int'(pp_n[2]);
        xv = '{default: 2};
        xv[$urandom % 3] = $urandom % 3;
        for (int j = 0; j < 3; j++) pp_x[j] = 2'(xv[j]);
        pp_c = 2'd2;
        e = settle(xv, q0, ri);
        clocks(2);
        chk(int'(pp_n[2]), q0, "pp holds while C high");
        @(negedge clk) begin pp_c = 2'd0; for (int j = 0; j < 3; j++) pp_x[j] = 2'd2; end
        clocks(2);
        chk(int'(pp_n[2]), e, "pp transfer");
        if (e != q0) mech[M_PP_XFER]++;
      end
      for (int n = 0; n < 40; n++) begin
        @(negedge clk);
        q0 = int'(ppi_n[2]);
        xv = '{default: 2};
        xv[$urandom % 3] = $urandom % 3;
        for (int j = 0; j < 3; j++) ppi_x[j] = 2'(xv[j]);
        ppi_c = 2'd2;
        e = settle_in(xv, q0, ri);
        clocks(2);
        chk(int'(ppi_n[2]), q0, "input-form pp holds while C high");
        @(negedge clk) begin ppi_c = 2'd0; for (int j = 0; j < 3; j++) ppi_x[j] = 2'd2; end
        clocks(2);
        chk(int'(ppi_n[2]), e, "input-form pp transfer");
        checks++; if (!ppi_settled) failures++;
        if (e != q0) mech[M_PPI_XFER]++;
      end

      // ---------------- D
      for (int n = 0; n < 30; n++) begin
        @(negedge clk) begin
          d_d = 2'($urandom % 3); d_c = 2'd2;
          dm_d = 2'($urandom % 3); dm_c = 2'd2;
        end
        clocks(2);
        chk(int'(d_q), int'(d_d), "d load");
        chk(int'(dm_q), int'(dm_d), "or-not d load");
        mech[M_D_LOAD]++;
        mech[M_DM_LOAD]++;
        @(negedge clk) begin
          d_c = 2'd0; e = int'(d_d); d_d = 2'($urandom % 3);
          dm_c = 2'd0; v = int'(dm_d); dm_d = 2'($urandom % 3);
        end
        clocks(2);
        chk(int'(d_q), e, "d hold");
        chk(int'(dm_q), v, "or-not d hold");
      end

      // ---------------- T (i changed above while T was low: rebase)
      e = int'(t_q);
      for (int n = 0; n < 12; n++) begin
        @(negedge clk) t_t = 2'd2;
        clocks(2);
        chk(int'(t_q), e, "t steady while T high");
        @(negedge clk) t_t = 2'd0;
        clocks(2);
        if (e + ri >= 3) mech[M_T_WRAP]++;
        e = (e + ri) % 3;
        chk(int'(t_q), e, "t count");
        mech[M_T_COUNT]++;
        mech[ri == 1 ? M_T_UP : M_T_DOWN]++;
      end

      // ---------------- JK: count mode, then lowered gate inputs
      e = int'(jk_q);
      for (int n = 0; n < 6; n++) begin
        @(negedge clk) jk_c = 2'd2;
        clocks(2);
        @(negedge clk) jk_c = 2'd0;
        clocks(2);
        e = (e + ri) % 3;
        chk(int'(jk_q), e, "jk toggle");
        mech[M_JK_TOGGLE]++;
      end
      for (int n = 0; n < 30; n++) begin
        @(negedge clk);
        q0 = int'(jk_q);
        jk_j = 2'($urandom % 3); jk_jk = 2'($urandom % 3); jk_k = 2'($urandom % 3);
        sn = hold_nodes(3, q0, ri);
        gx[0] = mn(int'(jk_j), sn[0]);
        gx[1] = mn(int'(jk_jk), sn[1]);
        gx[2] = mn(int'(jk_k), sn[2]);
        e = settle(gx, q0, ri);
        jk_c = 2'd2;
        clocks(2);
        @(negedge clk) jk_c = 2'd0;
        clocks(2);
        chk(int'(jk_q), e, "jk write");
        if (e != (q0 + ri) % 3) mech[M_JK_WRITE]++;
        @(negedge clk) begin jk_j = 2'd2; jk_jk = 2'd2; jk_k = 2'd2; end
      end
    end

    // ---------------- two-valued current RS
    @(negedge clk) b_s_n = 1'b0;
    clocks(2);
    chk(int'(b_q), 1, "binary set"); chk(int'(b_q_n), 0, "binary set q_n");
    mech[M_B_SET]++;
    @(negedge clk) b_s_n = 1'b1;
    clocks(2);
    @(negedge clk) b_r_n = 1'b0;
    clocks(2);
    chk(int'(b_q), 0, "binary clear"); chk(int'(b_q_n), 1, "binary clear q_n");
    mech[M_B_CLEAR]++;
    @(negedge clk) b_s_n = 1'b0;
    clocks(2);
    chk(int'(b_q), 1, "binary both low"); chk(int'(b_q_n), 1, "binary both low q_n");
    checks++; if (!b_settled) failures++;
    mech[M_B_BOTH]++;

    // ---------------- two-valued push-pull RS
    for (int n = 0; n < 8; n++) begin
      @(negedge clk) begin
        bp_c = 1'b1;
        e = n % 2;                   // alternate set and clear
        bp_s_n = (e == 1) ? 1'b0 : 1'b1;
        bp_r_n = (e == 1) ? 1'b1 : 1'b0;
        q0 = int'(bp_q);
      end
      clocks(2);
      chk(int'(bp_q), q0, "binary push-pull holds while C = 1");
      @(negedge clk) begin bp_c = 1'b0; bp_s_n = 1'b1; bp_r_n = 1'b1; end
      clocks(2);
      chk(int'(bp_q), e, "binary push-pull transfer");
      chk(int'(bp_q_n), 1 - e, "binary push-pull q_n");
      if (e != q0) mech[M_BP_XFER]++;
    end

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-20s %0d", mech_name[m], mech[m]);
      checks++;
      if (mech[m] == 0) begin failures++; $display("FAIL mechanism never happened: %s", mech_name[m]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
