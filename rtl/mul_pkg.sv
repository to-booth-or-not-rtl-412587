// mul_pkg: elaboration-time helpers shared by the multiplier designs.
//
// The functions here fix the shape of the circuits from the operand widths:
// the number of radix-4 Booth digits m' = ceil((m+1)/2), and the shape of the
// 4/2-tree (M = 2^ceil(log2 K) for K partial products, mu = log2(M/4) levels
// of 4/2-adders below the top level, and the mix of 3/2- and 4/2-adder leaves
// in the top level). Nothing here is hardware; every function is evaluated
// while parameters are resolved.
package mul_pkg;

  // Number of radix-4 Booth digits for an m-bit unsigned multiplier:
  // m' = ceil((m+1)/2), with b[m+1] = b[m] = b[-1] = 0.
  function automatic int unsigned booth_digits(int unsigned m);
    return (m + 2) / 2;
  endfunction

  // M = smallest power of two >= k.
  function automatic int unsigned tree_pow2(int unsigned k);
    return 1 << $clog2(k);
  endfunction

  // Number of top-level nodes (carry-save pairs handed to the lower tree): M/4.
  function automatic int unsigned tree_leaves(int unsigned k);
    return tree_pow2(k) / 4;
  endfunction

  // Depth of the lower, regular part of the tree: mu = log2(M/4).
  function automatic int unsigned tree_depth(int unsigned k);
    return $clog2(k) - 2;
  endfunction

  // True when 3M/4 <= k <= M: all top-level nodes are adders, 3/2-adders
  // on the left and 4/2-adders on the right.
  function automatic bit tree_full_top(int unsigned k);
    return 4 * k >= 3 * tree_pow2(k);
  endfunction

  // Number of 4/2-adder leaves (only in the full-top case): a = k - 3M/4.
  function automatic int unsigned tree_n42(int unsigned k);
    return tree_full_top(k) ? k - 3 * tree_pow2(k) / 4 : 0;
  endfunction

  // Number of 3/2-adder leaves: M/4 - a in the full-top case, otherwise
  // b = k - M/2 (the rest of the partial products go straight to the lower tree).
  function automatic int unsigned tree_n32(int unsigned k);
    return tree_full_top(k) ? tree_pow2(k) / 4 - tree_n42(k) : k - tree_pow2(k) / 2;
  endfunction

endpackage
