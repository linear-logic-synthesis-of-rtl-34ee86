// mvl_t_ff: k-valued T flip-flop, a modulo-K counter.
//
// A push-pull pair of RSC flip-flops: the master is opened by T = K-1, the
// slave by (K-1) - T, and the slave's outputs are fed back to the master's
// inputs in the same order (master S = slave Q-bar, SR = slave
// Q-double-bar, R = slave Q; for K elements master x[j] = slave n[j]),
// while the master's outputs reach the slave shifted by one place as in
// mvl_pp_rsc_ff. While T = K-1 the master settles to the slave's level
// rotated by i; when T returns to 0 the slave takes it. Each T pulse
// therefore steps Q to Q (+) i, so i sets both the counting step and the
// counting direction (for K = 3: i = 1 counts 0,1,2,0..., i = 2 counts
// 0,2,1,0...). The two-RSC structure, the (K-1) - T stage and the modulo-3
// counting set by i are published; the feedback order is this design's
// reading, the one order that gives that counting.
//
// Timing: a pulse is T = K-1 held for at least two clocks followed by T = 0
// for at least two clocks; Q has stepped two clocks after T falls. i is a
// static setting: change it together with a rising T, or expect the open
// slave to be disturbed (see mvl_pp_rsc_ff).
// Interface: levels of $clog2(K) bits; n[K-1] = q = Q.
module mvl_t_ff
  import mvl_pkg::*;
#(
  parameter int        K    = 3,
  parameter mvl_form_e FORM = FORM_DIFF,
  localparam int       W    = $clog2(K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] i,
  input  logic [W-1:0] t,
  output logic [W-1:0] n [K],
  output logic [W-1:0] q,
  output logic         settled
);

  localparam logic [W-1:0] TOP = W'(K - 1);

  logic [W-1:0] t_slave;
  logic [W-1:0] nm [K];
  logic [W-1:0] xs [K];
  logic         settled_m, settled_s;

  assign t_slave = TOP - t;
  assign settled = settled_m && settled_s;

  for (genvar j = 0; j < K; j++) begin : g_link
    assign xs[j] = nm[(j + K - 1) % K];
  end

  mvl_rsc_ff #(.K(K), .OP(OP_MIN), .FORM(FORM)) u_master (
    .clk(clk), .rst_n(rst_n), .i(i), .c(t), .x(n),
    .n(nm), .q(), .settled(settled_m)
  );

  mvl_rsc_ff #(.K(K), .OP(OP_MIN), .FORM(FORM)) u_slave (
    .clk(clk), .rst_n(rst_n), .i(i), .c(t_slave), .x(xs),
    .n(n), .q(q), .settled(settled_s)
  );

endmodule
