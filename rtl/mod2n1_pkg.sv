// mod2n1_pkg: elaboration-time helpers shared by the modulo 2^n+1 components.
//
// All functions here are evaluated on constants while the design is being
// elaborated; none of them becomes hardware by itself. They give the residue
// of a signed integer modulo 2^n+1, the shape of a Wallace-style carry-save
// reduction tree, and the number of n-bit groups a k-bit word splits into.
// The formulas follow the modulo 2^n+1 arithmetic of the components; the
// packaging into functions is this design's own choice.
package mod2n1_pkg;

  // |v|_{2^n+1}, always in [0, 2^n].
  function automatic longint unsigned mod2n1(input longint v, input int unsigned n);
    longint m;
    longint r;
    m = (longint'(1) << n) + 1;
    r = v % m;
    if (r < 0) r = r + m;
    return longint'(r);
  endfunction

  // Number of n-bit groups of a k-bit word (the last one may be incomplete).
  function automatic int unsigned num_groups(input int unsigned k, input int unsigned n);
    return (k + n - 1) / n;
  endfunction

  // Number of operands left after `level` carry-save levels, starting from m.
  // Each level turns every complete group of three into two and passes the
  // remaining one or two operands through.
  function automatic int unsigned tree_count(input int unsigned m, input int unsigned level);
    int unsigned c;
    c = m;
    for (int unsigned l = 0; l < level; l++)
      c = 2 * (c / 3) + (c % 3);
    return c;
  endfunction

  // Number of carry-save levels needed to bring m operands (m >= 2) down to two.
  function automatic int unsigned tree_levels(input int unsigned m);
    int unsigned c;
    int unsigned l;
    c = m;
    l = 0;
    while (c > 2) begin
      c = 2 * (c / 3) + (c % 3);
      l++;
    end
    return l;
  endfunction

  // Ceiling of log2, at least 1 (width of a counter that must hold v).
  function automatic int unsigned clog2_min1(input int unsigned v);
    int unsigned w;
    w = 1;
    while ((longint'(1) << w) <= longint'(v)) w++;
    return w;
  endfunction

endpackage
