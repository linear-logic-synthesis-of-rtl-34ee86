// tb_cur_rs_ff2: two-valued current RS flip-flop, in the threshold and the
// comparison form. Checks reset state, set, hold, clear, the both-low
// pattern, the write latency (one clock through the first element, two
// through the second) and the settled flag, then runs
// random inputs against a NAND-pair step model.
`timescale 1ns/1ps
module tb_cur_rs_ff2;
  import mvl_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic s_n = 1'b1, r_n = 1'b1;
  logic q [2], q_n [2], settled [2];
  int checks = 0, failures = 0;
  int cycles = 0;
  logic mq, mqn;  // step model

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  cur_rs_ff2 #(.FORM(CUR_THRESH)) dut_t (.clk(clk), .rst_n(rst_n), .s_n(s_n), .r_n(r_n),
                                         .q(q[0]), .q_n(q_n[0]), .settled(settled[0]));
  cur_rs_ff2 #(.FORM(CUR_CMP))    dut_c (.clk(clk), .rst_n(rst_n), .s_n(s_n), .r_n(r_n),
                                         .q(q[1]), .q_n(q_n[1]), .settled(settled[1]));

  task automatic expect_q(input logic eq, input logic eqn, input string what);
    for (int d = 0; d < 2; d++) begin
      checks++;
      if (q[d] !== eq || q_n[d] !== eqn) begin
        failures++;
        $display("FAIL %s dut%0d q=%0d q_n=%0d exp %0d %0d", what, d, q[d], q_n[d], eq, eqn);
      end
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    expect_q(1'b0, 1'b1, "reset");
    // set: visible exactly one clock later
    @(negedge clk) s_n = 1'b0;
    #1 expect_q(1'b0, 1'b1, "before edge");
    @(posedge clk) #1 expect_q(1'b1, 1'b0, "set after one clock");
    @(negedge clk) s_n = 1'b1;
    repeat (3) @(posedge clk);
    #1 expect_q(1'b1, 1'b0, "hold 1");
    checks++; if (!settled[0] || !settled[1]) failures++;
    @(negedge clk) r_n = 1'b0;
    // the clear goes through the second element: q_n rises after one clock,
    // q falls after the second
    @(posedge clk) #1 expect_q(1'b1, 1'b1, "clear, first clock");
    @(posedge clk) #1 expect_q(1'b0, 1'b1, "clear, second clock");
    @(negedge clk) r_n = 1'b1;
    repeat (3) @(posedge clk);
    #1 expect_q(1'b0, 1'b1, "hold 0");
    @(negedge clk) begin s_n = 1'b0; r_n = 1'b0; end
    @(posedge clk) #1 expect_q(1'b1, 1'b1, "both low");
    // random inputs against the step model
    @(negedge clk) begin s_n = 1'b1; r_n = 1'b1; end
    @(posedge clk);
    #1 begin mq = q[0]; mqn = q_n[0]; end
    for (int n = 0; n < 200; n++) begin
      @(negedge clk) begin s_n = 1'($urandom); r_n = 1'($urandom); end
      @(posedge clk) begin
        mq  = ~(s_n & mqn);
        mqn = ~(r_n & mq);
      end
      #1 expect_q(mq, mqn, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
