// mvl_rsc_ff: k-valued synchronous single-ended RS flip-flop (RSC).
//
// An mvl_rs_ff whose inputs S, SR, R reach the ring through gates driven by
// the synchronisation input C. C is itself a k-valued level but is used only
// at 0 ("lock": the ring sees its hold level whatever the inputs do) and K-1
// ("pass": the ring sees the inputs). For the min realisation (hold level
// K-1) each gate is max(x, (K-1) - C); for the max realisation (hold level
// 0) it is min(x, C). The (K-1) - C stage and the gates-before-the-ring
// structure are the published ones; the choice of max/min for the gates
// follows the published lock/pass rule. A concurrent assertion flags any
// other level on C.
// ROT_AT_INPUT selects where each ring element rotates: 0 gives the
// "output implementation" (min/max, then rotate), 1 the "input
// implementation" (rotate the fed-back signal, then min/max); both forms
// are published.
//
// Timing: the gates are combinational, so a write with C = K-1 is on Q one
// clock later and all nodes have settled after at most two clocks (see
// mvl_rs_ff for the loop model).
//
// Interface: x[0] = S, x[1] = SR, x[K-1] = R; n[0] = Q-bar,
// n[1] = Q-double-bar, n[K-1] = Q; all levels $clog2(K) bits.
module mvl_rsc_ff
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
  localparam mvl_op_e GATE_OP = (OP == OP_MIN) ? OP_MAX : OP_MIN;

  logic [W-1:0] c_gate;
  logic [W-1:0] xg [K];

  // (K-1) - C for the min realisation, C itself for the max realisation.
  assign c_gate = (OP == OP_MIN) ? (TOP - c) : c;

  for (genvar j = 0; j < K; j++) begin : g_gate
    mvl_gate #(
      .K(K), .OP(GATE_OP), .ROT_AT_INPUT(1'b0), .ROT_NEG(1'b0), .FORM(FORM)
    ) u_gate (
      .x1(x[j]),
      .x2(c_gate),
      .i ('0),
      .y (xg[j])
    );
  end

  mvl_rs_ff #(.K(K), .OP(OP), .ROT_AT_INPUT(ROT_AT_INPUT), .FORM(FORM)) u_ring (
    .clk    (clk),
    .rst_n  (rst_n),
    .i      (i),
    .x      (xg),
    .n      (n),
    .q      (q),
    .settled(settled)
  );

  a_c_level : assert property (@(posedge clk) disable iff (!rst_n)
                               (c == '0) || (c == TOP))
    else $error("mvl_rsc_ff: C must be 0 or K-1, got %0d", c);

endmodule
