// oracle_pkg: assembly-time rules shared by the oracle designs.
//
// An oracle stage i takes the chained value f(i-1) and its input X(i) and
// produces f(i) (passed to the next stage) and g(i) (its answer bit), with
// f(-1) = alpha. For the addition oracle X(i) = {A(i), B(i)}, f is the carry
// and g the sum bit: F = f&(a|b) | a&b, G = sum of the three bits, alpha = 0.
// These functions are evaluated only at elaboration: they decide which tiles
// a string is assembled from, just as the carry shapes decide which tiles can
// join during self-assembly. Nothing here is evaluated at run time.
package oracle_pkg;

  localparam logic ADD_ALPHA = 1'b0;

  // carry out (the chained value)
  function automatic logic add_f(input logic f_prev, input logic a, input logic b);
    return (f_prev & (a | b)) | (a & b);
  endfunction

  // sum bit (the answer bit)
  function automatic logic add_g(input logic f_prev, input logic a, input logic b);
    return (~f_prev & ((~a & b) | (a & ~b))) | (f_prev & ((~a & ~b) | (a & b)));
  endfunction

  // factorial, for the number of strings of the HAM-PATH oracle
  function automatic int unsigned fact(input int unsigned n);
    int unsigned r = 1;
    for (int unsigned i = 2; i <= n; i++) r = r * i;
    return r;
  endfunction

  // Node visited at position `pos` of path number `idx` (0 <= idx < n!):
  // the permutations of 0..n-1 in lexicographic order (factorial-base digits).
  function automatic int unsigned perm_node(input int unsigned n, input int unsigned idx,
                                            input int unsigned pos);
    logic [31:0]  used;
    int unsigned  rem, f, d, node, cnt;
    used = '0;
    rem  = idx;
    node = 0;
    for (int unsigned p = 0; p <= pos; p++) begin
      f   = fact(n - 1 - p);
      d   = rem / f;
      rem = rem % f;
      cnt = 0;
      for (int unsigned k = 0; k < n; k++) begin
        if (!used[k]) begin
          if (cnt == d) node = k;
          cnt++;
        end
      end
      used[node] = 1'b1;
    end
    return node;
  endfunction

endpackage
