// mvl_d_ff: k-valued synchronous D flip-flop.
//
// An RSC flip-flop whose three inputs are all derived from the one data
// input D: S = D, SR = D (+) i, R = D (+) i (+) i (generally x[j] = D (+) j*i,
// formed by a chain of K-1 rotation elements). With C = K-1 the ring then
// settles to Q = D for any rotation i != 0, whatever it held before; with
// C = 0 it holds. The input equations are the published ones.
// OP = OP_MIN gives the AND-NOT form (rotation elements min(K-1, v) (+) i,
// ring hold level K-1); OP = OP_MAX the OR-NOT form (max(0, v) (+) i, hold
// level 0), which the text calls similar without drawing it. Both store D.
// PUSH_PULL = 0 builds it on the single-ended RSC (a level-sensitive latch,
// as the text describes it); PUSH_PULL = 1 builds it on the push-pull RSC,
// so D is taken while C = K-1 and appears at Q after C returns to 0.
//
// Timing: single-ended, Q = D and all nodes settled at most two clocks after
// D is presented with C = K-1; push-pull, the same two clocks after C falls.
// Interface: levels of $clog2(K) bits; n[K-1] = q = Q.
module mvl_d_ff
  import mvl_pkg::*;
#(
  parameter int        K         = 3,
  parameter mvl_op_e   OP        = OP_MIN,
  parameter bit        PUSH_PULL = 1'b0,
  parameter mvl_form_e FORM      = FORM_DIFF,
  localparam int       W         = $clog2(K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] i,
  input  logic [W-1:0] c,
  input  logic [W-1:0] d,
  output logic [W-1:0] n [K],
  output logic [W-1:0] q,
  output logic         settled
);

  // The neutral level of the rotation elements' min/max.
  localparam logic [W-1:0] NEUTRAL = (OP == OP_MIN) ? W'(K - 1) : '0;

  logic [W-1:0] x [K];

  assign x[0] = d;
  for (genvar j = 1; j < K; j++) begin : g_rot
    // x[j] = x[j-1] (+) i, as min(K-1, x[j-1]) (+) i or max(0, x[j-1]) (+) i
    mvl_gate #(
      .K(K), .OP(OP), .ROT_AT_INPUT(1'b0), .ROT_NEG(1'b0), .FORM(FORM)
    ) u_rot (
      .x1(NEUTRAL),
      .x2(x[j-1]),
      .i (i),
      .y (x[j])
    );
  end

  if (PUSH_PULL) begin : g_pp
    mvl_pp_rsc_ff #(.K(K), .OP(OP), .FORM(FORM)) u_ff (
      .clk(clk), .rst_n(rst_n), .i(i), .c(c), .x(x), .n(n), .q(q), .settled(settled)
    );
  end else begin : g_se
    mvl_rsc_ff #(.K(K), .OP(OP), .FORM(FORM)) u_ff (
      .clk(clk), .rst_n(rst_n), .i(i), .c(c), .x(x), .n(n), .q(q), .settled(settled)
    );
  end

endmodule
