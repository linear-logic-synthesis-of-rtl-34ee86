// mvl_pkg: shared types and arithmetic primitives for multi-valued (k-valued)
// linear logic.
//
// A k-valued signal is a level 0..k-1. In a current-mode circuit it is a
// current that is an integer multiple of a unit current; here it is carried
// as an unsigned binary number of $clog2(k) bits. The functions below are the
// linear operations the elements are built from: the truncated difference
// (a current mirror that cannot go negative), the threshold (comparison)
// and the absolute value. Everything else is sums and differences of these.
package mvl_pkg;

  // Which of min / max the element computes.
  typedef enum logic {
    OP_MIN = 1'b0,
    OP_MAX = 1'b1
  } mvl_op_e;

  // Arithmetic representation used inside a k-valued element.
  typedef enum logic [1:0] {
    FORM_DIFF   = 2'd0,  // truncated differences
    FORM_MODULE = 2'd1,  // sums and absolute values
    FORM_THRESH = 2'd2   // sums of threshold functions
  } mvl_form_e;

  // Arithmetic representation used inside a two-valued current element.
  typedef enum logic [1:0] {
    CUR_DIFF   = 2'd0,
    CUR_MODULE = 2'd1,
    CUR_CMP    = 2'd2,
    CUR_THRESH = 2'd3
  } cur_form_e;

  // Truncated difference a -. b: a - b when a >= b, otherwise 0.
  function automatic int tsub(input int a, input int b);
    return (a >= b) ? (a - b) : 0;
  endfunction

  // Threshold (comparison) a > b, as 0 or 1.
  function automatic int gt(input int a, input int b);
    return (a > b) ? 1 : 0;
  endfunction

  // Absolute value |a|.
  function automatic int absv(input int a);
    return (a < 0) ? -a : a;
  endfunction

endpackage
