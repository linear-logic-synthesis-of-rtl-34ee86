// mvl_jk_ff: k-valued push-pull JK flip-flop.
//
// The T flip-flop structure (mvl_t_ff) with the three feedback wires passed
// through min gates whose other inputs are J, JK and K:
//   master S = min(J, slave Q-bar), SR = min(JK, slave Q-double-bar),
//   R = min(K, slave Q).
// The master is opened by C = K-1, the slave by (K-1) - C. With
// J = JK = K = K-1 (the hold level) the gates pass the feedback and each C
// pulse steps Q to Q (+) i, as in the T flip-flop; lowering a gate input
// lowers the matching master input and so writes a level chosen by the
// input values. The structure, the min gates and the (K-1) - C stage are
// published; the document gives no truth table, and the feedback order
// follows mvl_t_ff.
//
// Timing: hold C at K-1 and at 0 for at least two clocks each; Q has taken
// its new level two clocks after C falls. i is a static setting (see
// mvl_pp_rsc_ff).
// Interface: levels of $clog2(K) bits; j, jk, k are the J, JK and K inputs
// (the valuedness parameter is KV here, to keep the K input's name).
module mvl_jk_ff
  import mvl_pkg::*;
#(
  parameter int        KV   = 3,
  parameter mvl_form_e FORM = FORM_DIFF,
  localparam int       W    = $clog2(KV)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] i,
  input  logic [W-1:0] c,
  input  logic [W-1:0] j,
  input  logic [W-1:0] jk,
  input  logic [W-1:0] k,
  output logic [W-1:0] n [KV],
  output logic [W-1:0] q,
  output logic         settled
);

  localparam logic [W-1:0] TOP = W'(KV - 1);

  logic [W-1:0] c_slave;
  logic [W-1:0] gin [KV];
  logic [W-1:0] xm  [KV];
  logic [W-1:0] nm  [KV];
  logic [W-1:0] xs  [KV];
  logic         settled_m, settled_s;

  assign c_slave = TOP - c;
  assign settled = settled_m && settled_s;

  // J gates S, K gates R, JK gates every input in between.
  for (genvar g = 0; g < KV; g++) begin : g_in
    if (g == 0) begin : g_j
      assign gin[g] = j;
    end else if (g == KV - 1) begin : g_k
      assign gin[g] = k;
    end else begin : g_jk
      assign gin[g] = jk;
    end
    mvl_gate #(
      .K(KV), .OP(OP_MIN), .ROT_AT_INPUT(1'b0), .ROT_NEG(1'b0), .FORM(FORM)
    ) u_gate (
      .x1(gin[g]),
      .x2(n[g]),
      .i ('0),
      .y (xm[g])
    );
    assign xs[g] = nm[(g + KV - 1) % KV];
  end

  mvl_rsc_ff #(.K(KV), .OP(OP_MIN), .FORM(FORM)) u_master (
    .clk(clk), .rst_n(rst_n), .i(i), .c(c), .x(xm),
    .n(nm), .q(), .settled(settled_m)
  );

  mvl_rsc_ff #(.K(KV), .OP(OP_MIN), .FORM(FORM)) u_slave (
    .clk(clk), .rst_n(rst_n), .i(i), .c(c_slave), .x(xs),
    .n(n), .q(q), .settled(settled_s)
  );

endmodule
