// tb_mvl_t_ff: k-valued T flip-flop (modulo-K counter), K = 3 and K = 5.
// Applies T pulses (T = K-1 for a random 2-4 clocks, then 0 for 2-4 clocks)
// with random rotation i != 0 and checks that Q steps by i (mod K) within
// two clocks after each falling T (the ring model's worst case), that it does not move while T is high, and that
// every level and both counting directions (K = 3) occur.
`timescale 1ns/1ps
module tb_mvl_t_ff;
  import mvl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] i3, t3, q3;
  logic [2:0] i5, t5, q5;
  logic [1:0] n3 [3];
  logic [2:0] n5 [5];
  logic       s3, s5;
  int checks = 0, failures = 0;
  int e3, e5, hi, lo;
  int seen3 [3];
  int up3 = 0, down3 = 0, wraps3 = 0;

  mvl_t_ff #(.K(3)) dut3 (.clk(clk), .rst_n(rst_n), .i(i3), .t(t3), .n(n3), .q(q3), .settled(s3));
  mvl_t_ff #(.K(5)) dut5 (.clk(clk), .rst_n(rst_n), .i(i5), .t(t5), .n(n5), .q(q5), .settled(s5));

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
    i3 = 2'd1; i5 = 3'd1; t3 = '0; t5 = '0;
    @(posedge clk);
    #1 rst_n = 1'b1;
    repeat (2) @(posedge clk);
    #1;
    e3 = 0; e5 = 0;
    chk(int'(q3), 0, "reset K=3");
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      // change i only while T is low
      if (n % 7 == 0) begin
        i3 = 2'(1 + $urandom % 2);
        i5 = 3'(1 + $urandom % 4);
      end
      t3 = 2'd2; t5 = 3'd4;
      hi = 2 + $urandom % 3;
      lo = 2 + $urandom % 3;
      repeat (hi) begin
        @(posedge clk) #1;
        chk(int'(q3), e3, "K=3 steady while T high");
        chk(int'(q5), e5, "K=5 steady while T high");
      end
      @(negedge clk) begin t3 = 2'd0; t5 = 3'd0; end
      if (int'(i3) == 1) up3++; else down3++;
      if (e3 + int'(i3) >= 3) wraps3++;
      e3 = (e3 + int'(i3)) % 3;
      e5 = (e5 + int'(i5)) % 5;
      @(posedge clk);
      repeat (lo - 1) begin
        @(posedge clk) #1;
        chk(int'(q3), e3, "K=3 step after T falls");
        chk(int'(q5), e5, "K=5 step after T falls");
      end
      seen3[e3]++;
    end
    for (int v = 0; v < 3; v++) begin checks++; if (seen3[v] == 0) failures++; end
    checks++; if (up3 == 0 || down3 == 0 || wraps3 == 0) failures++;
    $display("K=3 pulses: counting up %0d, down %0d, wraps %0d", up3, down3, wraps3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
