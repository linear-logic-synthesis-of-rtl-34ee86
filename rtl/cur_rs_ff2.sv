// cur_rs_ff2: two-valued current asynchronous RS flip-flop: two AND-NOT
// current elements (cur_nand2) joined in a positive-feedback pair.
//
// q = NAND(s_n, q_n) and q_n = NAND(r_n, q). Both inputs high (1) hold the
// state; s_n = 0 sets q to 1, r_n = 0 clears it; both low gives q = q_n = 1,
// the usual forbidden pattern. FORM selects the linear form of both elements
// (the threshold form is the one of the published simple current RS
// flip-flop; the comparison form is the other published one).
//
// Loop model (this design's choice, as in mvl_rs_ff): the two nodes are
// registered and each clk edge evaluates the pair once, starting from the
// registered q_n. A set (through the first element) is visible one clock
// after the input changes; a clear changes q_n after one clock and q after
// two;
// settled is 1 when another pass would change nothing. Reset puts the pair
// in the consistent state q = 0, q_n = 1.
//
// Interface: 1-bit levels, clk, active-low synchronous rst_n.
module cur_rs_ff2
  import mvl_pkg::*;
#(
  parameter cur_form_e FORM = CUR_THRESH
) (
  input  logic clk,
  input  logic rst_n,
  input  logic s_n,
  input  logic r_n,
  output logic q,
  output logic q_n,
  output logic settled
);

  logic q_r, qn_r;
  logic q_next, qn_next;

  cur_nand2 #(.FORM(FORM)) u_set (.x1(s_n), .x2(qn_r),   .y(q_next));
  cur_nand2 #(.FORM(FORM)) u_rst (.x1(r_n), .x2(q_next), .y(qn_next));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      q_r  <= 1'b0;
      qn_r <= 1'b1;
    end else begin
      q_r  <= q_next;
      qn_r <= qn_next;
    end
  end

  assign q       = q_r;
  assign q_n     = qn_r;
  assign settled = (q_next == q_r) && (qn_next == qn_r);

endmodule
