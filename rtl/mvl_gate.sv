// mvl_gate: k-valued linear logic element, the building block of every
// multi-valued flip-flop in this design.
//
// It computes one of the "traditional" k-valued generalisations of AND-NOT
// and OR-NOT: a min (or max) followed by a cyclic rotation by i,
//   ROT_AT_INPUT = 0 : y = min(x1, x2) (+) i      (or max)
//   ROT_AT_INPUT = 1 : y = min(x1, x2 (+) i)      (or max)
// where (+) is addition modulo K. With ROT_NEG = 1 the rotation is (-)
// instead, done as (+) (K - i) mod K since x (+) i = x (-) (K - i).
// For K = 2 and i = 1 the first form is exactly a two-valued NAND (NOR).
//
// The result is formed only from sums, differences, truncated differences,
// absolute values and thresholds, as a current-mode element would form it.
// FORM selects the representation:
//   FORM_DIFF   min = x1 -. (x1 -. x2),  max = x1 + (x2 -. x1),
//               x (+) i = x + i - K*[1 -. (K -. (x + i))]
//   FORM_MODULE min/max = (x1 + x2 -/+ |x1 - x2|) / 2,
//               x (+) i = x + i - K*(1 + |x + i - (K-1)| - |x + i - K|) / 2
//   FORM_THRESH min = sum over t = 1..K-1 of [(x1 >= t) + (x2 >= t) > 1],
//               max = x1 + x2 - min,
//               x (+) i = x + i - K*[x + i >= K], the bracket written as
//               sum_t [x>=t][i>=K-t] - sum_t [x>=t+1][i>=K-t]
// The min/max and rotation formulas and their k = 3 threshold forms are the
// published ones; the threshold forms for other K are a generalisation that
// reduces to them at K = 3, and the module form's rotation (a step at
// x + i = K made of two absolute values) is this design's own. All forms give the same function; they differ only in structure.
//
// Interface: x1, x2, i and y are k-valued levels in $clog2(K) bits; inputs
// must be below K. Purely combinational.
module mvl_gate
  import mvl_pkg::*;
#(
  parameter int        K            = 3,
  parameter mvl_op_e   OP           = OP_MIN,
  parameter bit        ROT_AT_INPUT = 1'b0,
  parameter bit        ROT_NEG      = 1'b0,
  parameter mvl_form_e FORM         = FORM_DIFF,
  localparam int       W            = $clog2(K)
) (
  input  logic [W-1:0] x1,
  input  logic [W-1:0] x2,
  input  logic [W-1:0] i,
  output logic [W-1:0] y
);

  // Modular sum v (+) r in the selected representation.
  function automatic int rot(input int v, input int r);
    int s;
    int wrap;
    s = v + r;
    if (FORM == FORM_THRESH) begin
      wrap = 0;
      for (int t = 1; t <= K - 1; t++) begin
        wrap += ((v >= t) && (r >= K - t)) ? 1 : 0;
        if (t <= K - 2) wrap -= ((v >= t + 1) && (r >= K - t)) ? 1 : 0;
      end
    end else if (FORM == FORM_MODULE) begin
      wrap = (1 + absv(s - (K - 1)) - absv(s - K)) / 2;
    end else begin
      wrap = tsub(1, tsub(K, s));
    end
    return s - K * wrap;
  endfunction

  // min or max of a and b in the selected representation.
  function automatic int mm(input int a, input int b);
    int lo;
    case (FORM)
      FORM_MODULE: lo = (a + b - absv(a - b)) / 2;
      FORM_THRESH: begin
        lo = 0;
        for (int t = 1; t <= K - 1; t++) lo += gt(int'(a >= t) + int'(b >= t), 1);
      end
      default:     lo = tsub(a, tsub(a, b));
    endcase
    if (OP == OP_MIN) return lo;
    // max: difference form x1 + (x2 -. x1); module form (x1+x2+|x1-x2|)/2;
    // threshold form x1 + x2 - min.
    case (FORM)
      FORM_MODULE: return (a + b + absv(a - b)) / 2;
      FORM_THRESH: return a + b - lo;
      default:     return a + tsub(b, a);
    endcase
  endfunction

  int r_amt;

  always_comb begin
    r_amt = ROT_NEG ? ((K - int'(i)) % K) : int'(i);
    if (ROT_AT_INPUT) y = W'(mm(int'(x1), rot(int'(x2), r_amt)));
    else              y = W'(rot(mm(int'(x1), int'(x2)), r_amt));
  end

endmodule
