// tb_mvl_ref_pkg: reference arithmetic for the testbenches.
//
// Plain integer min / max / modulo, written without the linear forms used in
// the RTL, and a step model of a ring of K elements that matches the RTL's
// timing: one pass per clock, starting from the last node of the previous
// pass. Vectors hold up to 8 levels.
package tb_mvl_ref_pkg;

  typedef int vec_t [8];

  function automatic int mn(input int a, input int b);
    return (a < b) ? a : b;
  endfunction

  function automatic int mx(input int a, input int b);
    return (a > b) ? a : b;
  endfunction

  // One element: min/max of a and b with rotation r, at the output or on b.
  function automatic int elem(input int k, input bit is_max, input bit rot_in,
                              input int a, input int b, input int r);
    int bb;
    bb = rot_in ? (b + r) % k : b;
    if (rot_in) return is_max ? mx(a, bb) : mn(a, bb);
    return ((is_max ? mx(a, b) : mn(a, b)) + r) % k;
  endfunction

  // One pass round the ring: element j takes x[j] and node j-1, node -1 is
  // the previous last node.
  function automatic vec_t ring_pass(input int k, input bit is_max, input bit rot_in,
                                     input vec_t x, input vec_t prev, input int r);
    vec_t n;
    int p;
    n = prev;
    p = prev[k-1];
    for (int j = 0; j < k; j++) begin
      p = elem(k, is_max, rot_in, x[j], p, r);
      n[j] = p;
    end
    return n;
  endfunction

  // Consistent node values of a ring holding level q with hold inputs.
  function automatic vec_t hold_nodes(input int k, input int q, input int r);
    vec_t n;
    int p;
    n = '{default: 0};
    p = q;
    for (int j = 0; j < k; j++) begin
      p = (p + r) % k;
      n[j] = p;
    end
    return n;
  endfunction

endpackage
