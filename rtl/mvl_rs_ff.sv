// mvl_rs_ff: k-valued asynchronous RS flip-flop built as a ring of K linear
// logic elements (mvl_gate), the multi-valued counterpart of the cross-coupled
// NAND (NOR) latch.
//
// Structure (as published): element j has the external input x[j] on one
// input and the previous element's output on the other; the last element's
// output Q is fed back to the first element. For K = 3 the inputs are
// x[0] = S, x[1] = SR, x[2] = R and the outputs n[0] = Q-bar,
// n[1] = Q-double-bar, n[2] = Q. Every element computes min(x, n) (+) i with
// the flip-flop's own setting i, so going once round the ring rotates by
// K*i = 0 (mod K) and the stored level is stable. With OP_MIN the hold level
// of all inputs is K-1 and lowering one input writes; with OP_MAX the hold
// level is 0. From a state, a single input moves Q to levels determined by
// its value and i; e.g. for K = 3, i = 1 and state 1, S can only take the
// flip-flop to 0 while SR can take it to 0 or 2.
//
// Loop model (this design's choice): a combinational loop cannot be
// simulated or synthesised reliably, so all K ring nodes are registered.
// On each clk edge the K elements are evaluated once in ring order, starting
// from the registered Q, and the new node values are stored. A write through
// the first element reaches all outputs one clock after the inputs change;
// a write through a later element may need a second pass round the ring,
// i.e. a second clock. settled is 1
// when one more pass would change nothing; an input pattern for which the
// ring has no fixed point keeps changing and holds settled at 0. Reset
// (rst_n low at a clk edge, synchronous) clears every node; with hold
// inputs the nodes are consistent one clock later, with Q = 0.
//
// Interface: x, n are arrays of K levels; i and q are levels; all levels are
// $clog2(K)-bit numbers below K.
module mvl_rs_ff
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
  input  logic [W-1:0] x [K],
  output logic [W-1:0] n [K],
  output logic [W-1:0] q,
  output logic         settled
);

  logic [W-1:0] n_r    [K];
  logic [W-1:0] n_next [K];
  logic [W-1:0] chain  [K+1];  // chain[0] is the registered feedback Q

  assign chain[0] = n_r[K-1];

  for (genvar j = 0; j < K; j++) begin : g_el
    mvl_gate #(
      .K(K), .OP(OP), .ROT_AT_INPUT(ROT_AT_INPUT), .ROT_NEG(1'b0), .FORM(FORM)
    ) u_el (
      .x1(x[j]),
      .x2(chain[j]),
      .i (i),
      .y (chain[j+1])
    );
    assign n_next[j] = chain[j+1];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int j = 0; j < K; j++) n_r[j] <= '0;
    end else begin
      n_r <= n_next;
    end
  end

  always_comb begin
    settled = 1'b1;
    for (int j = 0; j < K; j++) if (n_next[j] != n_r[j]) settled = 1'b0;
  end

  assign n = n_r;
  assign q = n_r[K-1];

endmodule
