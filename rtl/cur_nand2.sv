// cur_nand2: two-valued current logic element computing AND-NOT of two
// input levels x1, x2 in {0, 1}, written in one of four linear forms.
//
// In a current-mode circuit the output is assembled from input currents by
// current mirrors (sums and differences), clipped mirrors (truncated
// difference -.), absolute-value stages or threshold comparators. FORM picks
// the representation:
//   CUR_DIFF   y = 1 -. [(x1 + x2) -. 1]
//   CUR_MODULE y = (2 - x1 - x2 + |x1 - x2|) / 2
//   CUR_CMP    y = 1 - x1 + (x1 > x2)           (1 - min, min = x1 - (x1 > x2))
//   CUR_THRESH y = 1 - [(x1 + x2) > 1]
// The difference and threshold forms are the published expressions. The
// published module and comparison expressions do not give a two-valued
// result as printed; here the module form is halved and the comparison form
// subtracts the minimum, so that all four forms give the same AND-NOT.
//
// Interface: 1-bit levels; combinational.
module cur_nand2
  import mvl_pkg::*;
#(
  parameter cur_form_e FORM = CUR_DIFF
) (
  input  logic x1,
  input  logic x2,
  output logic y
);

  int a, b, v;

  always_comb begin
    a = int'(x1);
    b = int'(x2);
    case (FORM)
      CUR_MODULE: v = (2 - a - b + absv(a - b)) / 2;
      CUR_CMP:    v = 1 - a + gt(a, b);
      CUR_THRESH: v = 1 - gt(a + b, 1);
      default:    v = tsub(1, tsub(a + b, 1));
    endcase
    y = (v == 1);
  end

endmodule
