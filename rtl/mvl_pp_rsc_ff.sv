// mvl_pp_rsc_ff: k-valued push-pull (master-slave) synchronous RS flip-flop.
//
// Two mvl_rsc_ff. The master takes S, SR, R and is opened by C = K-1; the
// slave is opened by (K-1) - C, so it copies the master while the master is
// locked. The slave's inputs are the master's outputs shifted by one place:
// slave S = master Q, slave SR = master Q-bar, slave R = master Q-double-bar
// (for K elements: slave x[j] = master n[j-1]). With that wiring the slave
// settles to exactly the master's level for any rotation i != 0. The
// master-slave structure and the (K-1) - C stage are published; the exact
// output-to-input order is this design's reading, chosen by that property.
// With ROT_AT_INPUT = 1 (the published "input implementation", where each
// element rotates its fed-back signal before the min/max) the same property
// needs the unshifted order, slave x[j] = master n[j], which is used then.
//
// Timing: with C high the master settles within two clocks; after C falls
// the slave settles on the master's level within two clocks. Hold C at each
// level for at least two clocks. The outputs n, q are the slave's. i is a
// static setting: changing it re-rotates every ring, and while the slave is
// open that can move the stored level.
//
// Interface: as mvl_rsc_ff; settled is 1 when both rings are at rest.
module mvl_pp_rsc_ff
  import mvl_pkg::*;
#(
  parameter int        K            = 3,
  parameter mvl_op_e   OP           = OP_MIN,
  parameter bit        ROT_AT_INPUT = 1'b0,
  parameter mvl_form_e FORM         = FORM_DIFF,
  localparam int       W            = $clog2(K)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] i,
  input  logic [W-1:0] c,
  input  logic [W-1:0] x [K],
  output logic [W-1:0] n [K],
  output logic [W-1:0] q,
  output logic         settled
);

  localparam logic [W-1:0] TOP = W'(K - 1);

  logic [W-1:0] c_slave;
  logic [W-1:0] nm [K];
  logic [W-1:0] xs [K];
  logic         settled_m, settled_s;

  assign c_slave = TOP - c;
  assign settled = settled_m && settled_s;

  for (genvar j = 0; j < K; j++) begin : g_link
    assign xs[j] = ROT_AT_INPUT ? nm[j] : nm[(j + K - 1) % K];
  end

  mvl_rsc_ff #(.K(K), .OP(OP), .ROT_AT_INPUT(ROT_AT_INPUT), .FORM(FORM)) u_master (
    .clk(clk), .rst_n(rst_n), .i(i), .c(c), .x(x),
    .n(nm), .q(), .settled(settled_m)
  );

  mvl_rsc_ff #(.K(K), .OP(OP), .ROT_AT_INPUT(ROT_AT_INPUT), .FORM(FORM)) u_slave (
    .clk(clk), .rst_n(rst_n), .i(i), .c(c_slave), .x(xs),
    .n(n), .q(q), .settled(settled_s)
  );

endmodule
