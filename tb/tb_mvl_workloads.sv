// tb_mvl_workloads: transition completeness of the k-valued flip-flop for
// the valuednesses K = 2, 3, 4, 5 and 7.
//
// A k-valued flip-flop is complete when every level can be written from
// every level. Each valuedness gets one single-ended D flip-flop (the RSC
// ring with S = D, SR = D (+) i, R = D (+) i (+) i, ...). For every rotation
// i != 0 and every pair (start s, target t) the test loads s with i = 1,
// locks the flip-flop, switches to the rotation under test (the locked level
// must not move), then tries to load t. Every clock, every ring node is also
// compared with a plain min/modulo step model of the gated ring.
//
// Expected: when i and K share no factor (always, for prime K) every load
// takes. At K = 4 with i = 2 the rotation only cycles between two levels,
// so some loads cannot take; the test requires at least one such miss and
// reports them. This is the reason to prefer a prime valuedness.
`timescale 1ns/1ps
module tb_mvl_workloads;
  import mvl_pkg::*;
  import tb_mvl_ref_pkg::*;

  localparam int NK = 5;
  localparam int KS [NK] = '{2, 3, 4, 5, 7};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0, done = 0;

  function automatic int gcd(input int a, input int b);
    while (b != 0) begin
      int t;
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  for (genvar g = 0; g < NK; g++) begin : g_k
    localparam int K = KS[g];
    localparam int W = $clog2(K);

    logic [W-1:0] i, c, d, q;
    logic [W-1:0] n [K];
    logic         st;
    int cur_i = 1, cur_c = 0, cur_d = 0;
    int loads = 0, missing = 0;
    vec_t model;

    always_comb begin
      i = W'(cur_i);
      c = W'(cur_c);
      d = W'(cur_d);
    end

    mvl_d_ff #(.K(K)) dut (
      .clk(clk), .rst_n(rst_n), .i(i), .c(c), .d(d), .n(n), .q(q), .settled(st)
    );

    // one clock: advance the model of the gated ring and compare all nodes
    task automatic tick();
      vec_t x;
      @(posedge clk);
      for (int j = 0; j < K; j++)
        x[j] = (cur_c == K - 1) ? (cur_d + j * cur_i) % K : K - 1;
      model = ring_pass(K, 1'b0, 1'b0, x, model, cur_i);
      #1;
      for (int j = 0; j < K; j++) begin
        checks++;
        if (int'(n[j]) != model[j]) begin
          failures++;
          if (failures < 20) $display("FAIL K=%0d node%0d got %0d exp %0d", K, j, n[j], model[j]);
        end
      end
    endtask

    task automatic expect_q(input int e, input string what);
      checks++;
      if (int'(q) != e) begin
        failures++;
        if (failures < 20) $display("FAIL K=%0d %s: Q=%0d exp %0d", K, what, q, e);
      end
    endtask

    initial begin
      model = '{default: 0};
      @(posedge rst_n);
      for (int ri = 1; ri < K; ri++)
        for (int s = 0; s < K; s++)
          for (int t = 0; t < K; t++) begin
            // load s with i = 1, which reaches every level for any K
            cur_i = 1; cur_c = K - 1; cur_d = s;
            repeat (K + 1) tick();
            expect_q(s, "load with i = 1");
            checks++;
            if (!st) begin failures++; $display("FAIL K=%0d ring not settled after a load", K); end
            cur_c = 0;
            tick();
            // change the rotation while locked: the level must stay
            cur_i = ri;
            repeat (2) tick();
            expect_q(s, "locked across a change of i");
            // try to load t with the rotation under test
            cur_c = K - 1; cur_d = t;
            repeat (K + 1) tick();
            cur_c = 0;
            repeat (2) tick();
            loads++;
            if (int'(q) != t) begin
              missing++;
              $display("K=%0d i=%0d: load %0d -> %0d stays at %0d", K, ri, s, t, q);
            end
            if (gcd(ri, K) == 1) expect_q(t, "load with i coprime to K");
          end
      if (K == 4) begin
        checks++;
        if (missing == 0) begin
          failures++;
          $display("FAIL K=4: every load took, the i = 2 miss was not seen");
        end
      end
      $display("K=%0d: %0d loads tried, %0d did not take", K, loads, missing);
      done++;
    end
  end

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (done == NK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
