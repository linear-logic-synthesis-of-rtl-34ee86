// mvl_ff_top: the complete family of current-mode (linear logic) flip-flops,
// side by side.
//
// The family has no system around it: each flip-flop keeps its own data
// inputs and outputs, and they share only the evaluation clock, the reset
// and the k-valued rotation setting i. Included are
//   - the k-valued asynchronous RS flip-flop (ring of K elements),
//   - the synchronous single-ended RSC and push-pull RSC flip-flops,
//   - the push-pull RSC flip-flop once more in the input implementation
//     (each element rotates its fed-back signal before the min),
//   - the D flip-flop (single-ended, as described in the text), in the
//     AND-NOT (min) form and again in the OR-NOT (max) form,
//   - the T flip-flop (modulo-K counter) and the JK flip-flop,
//   - the two-valued current RS flip-flop on AND-NOT current elements,
//   - the two-valued push-pull synchronous RS flip-flop, which is the
//     push-pull RSC at K = 2 (its (K-1) - C stage is the inverter of the
//     two-valued circuit), with rotation 1 so that its elements are NANDs.
// All other k-valued parts use the min realisation (hold level K-1), the
// output implementation and the difference form of the linear elements; the two-valued pair uses the
// threshold form. Bringing them into one top is this design's own choice.
//
// Timing: every ring is registered once per clk (see mvl_rs_ff); synchronous
// active-low reset. Level signals are $clog2(K)-bit numbers below K.
module mvl_ff_top
  import mvl_pkg::*;
#(
  parameter int  K = 3,
  localparam int W = $clog2(K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] i,
  // asynchronous RS flip-flop
  input  logic [W-1:0] rs_x   [K],
  output logic [W-1:0] rs_n   [K],
  output logic         rs_settled,
  // single-ended synchronous RSC flip-flop
  input  logic [W-1:0] rsc_c,
  input  logic [W-1:0] rsc_x  [K],
  output logic [W-1:0] rsc_n  [K],
  output logic         rsc_settled,
  // push-pull RSC flip-flop
  input  logic [W-1:0] pp_c,
  input  logic [W-1:0] pp_x   [K],
  output logic [W-1:0] pp_n   [K],
  output logic         pp_settled,
  // push-pull RSC flip-flop, input implementation
  input  logic [W-1:0] ppi_c,
  input  logic [W-1:0] ppi_x  [K],
  output logic [W-1:0] ppi_n  [K],
  output logic         ppi_settled,
  // D flip-flop
  input  logic [W-1:0] d_c,
  input  logic [W-1:0] d_d,
  output logic [W-1:0] d_n    [K],
  output logic [W-1:0] d_q,
  output logic         d_settled,
  // D flip-flop, OR-NOT form
  input  logic [W-1:0] dm_c,
  input  logic [W-1:0] dm_d,
  output logic [W-1:0] dm_n   [K],
  output logic [W-1:0] dm_q,
  output logic         dm_settled,
  // T flip-flop
  input  logic [W-1:0] t_t,
  output logic [W-1:0] t_n    [K],
  output logic [W-1:0] t_q,
  output logic         t_settled,
  // JK flip-flop
  input  logic [W-1:0] jk_c,
  input  logic [W-1:0] jk_j,
  input  logic [W-1:0] jk_jk,
  input  logic [W-1:0] jk_k,
  output logic [W-1:0] jk_n   [K],
  output logic [W-1:0] jk_q,
  output logic         jk_settled,
  // two-valued current RS flip-flop
  input  logic         b_s_n,
  input  logic         b_r_n,
  output logic         b_q,
  output logic         b_q_n,
  output logic         b_settled,
  // two-valued push-pull synchronous RS flip-flop (hold level 1)
  input  logic         bp_c,
  input  logic         bp_s_n,
  input  logic         bp_r_n,
  output logic         bp_q,
  output logic         bp_q_n,
  output logic         bp_settled
);

  logic bp_x [2];
  logic bp_n [2];

  // element 0 drives Q-bar, so lowering its input clears: it takes R-bar;
  // element 1 drives Q and takes S-bar
  assign bp_x[0] = bp_r_n;
  assign bp_x[1] = bp_s_n;
  assign bp_q_n  = bp_n[0];
  assign bp_q    = bp_n[1];

  mvl_pp_rsc_ff #(.K(2)) u_bin_pp (
    .clk(clk), .rst_n(rst_n), .i(1'b1), .c(bp_c), .x(bp_x), .n(bp_n), .q(),
    .settled(bp_settled)
  );


  mvl_rs_ff #(.K(K)) u_rs (
    .clk(clk), .rst_n(rst_n), .i(i), .x(rs_x), .n(rs_n), .q(), .settled(rs_settled)
  );

  mvl_rsc_ff #(.K(K)) u_rsc (
    .clk(clk), .rst_n(rst_n), .i(i), .c(rsc_c), .x(rsc_x), .n(rsc_n), .q(),
    .settled(rsc_settled)
  );

  mvl_pp_rsc_ff #(.K(K)) u_pp (
    .clk(clk), .rst_n(rst_n), .i(i), .c(pp_c), .x(pp_x), .n(pp_n), .q(),
    .settled(pp_settled)
  );

  mvl_pp_rsc_ff #(.K(K), .ROT_AT_INPUT(1'b1)) u_ppi (
    .clk(clk), .rst_n(rst_n), .i(i), .c(ppi_c), .x(ppi_x), .n(ppi_n), .q(),
    .settled(ppi_settled)
  );

  mvl_d_ff #(.K(K)) u_d (
    .clk(clk), .rst_n(rst_n), .i(i), .c(d_c), .d(d_d), .n(d_n), .q(d_q), .settled(d_settled)
  );

  mvl_d_ff #(.K(K), .OP(OP_MAX)) u_dm (
    .clk(clk), .rst_n(rst_n), .i(i), .c(dm_c), .d(dm_d), .n(dm_n), .q(dm_q),
    .settled(dm_settled)
  );

  mvl_t_ff #(.K(K)) u_t (
    .clk(clk), .rst_n(rst_n), .i(i), .t(t_t), .n(t_n), .q(t_q), .settled(t_settled)
  );

  mvl_jk_ff #(.KV(K)) u_jk (
    .clk(clk), .rst_n(rst_n), .i(i), .c(jk_c), .j(jk_j), .jk(jk_jk), .k(jk_k),
    .n(jk_n), .q(jk_q), .settled(jk_settled)
  );

  cur_rs_ff2 u_bin (
    .clk(clk), .rst_n(rst_n), .s_n(b_s_n), .r_n(b_r_n), .q(b_q), .q_n(b_q_n),
    .settled(b_settled)
  );

endmodule
