// segprefix_pkg: constants and helpers shared by the segmented parallel-prefix
// circuit.
//
// The tree is numbered like a binary heap: node 1 is the root, node h has the
// children 2h and 2h+1, and with N leaves the leaf for input i is node N+i.
// Nodes 1..N-1 are the internal (circle) nodes. All nodes at one depth are
// consecutive numbers, ordered left to right, so the left neighbour at the
// same depth of node h is node h-1, provided h is not the leftmost node of its
// depth (a power of two).
//
// A shortcut wire goes from node h-1 to node h whenever the two are
// neighbours at the same depth but have different parents, that is when h is
// even (a left child) and not a power of two. Only internal nodes get one:
// the leaves of a neighbouring pair are never joined directly, matching the
// 64-leaf drawing of the shortcut layout, where every shortcut starts and
// ends at a circle.
//
// In the cyclic variant the last input is followed by the first, so the
// leftmost node of each depth has the rightmost one as its left neighbour
// and gets a wrap-around shortcut from it.
package segprefix_pkg;

  // Number of leaves of the drawn 64-leaf layout.
  localparam int unsigned N_DEFAULT = 64;
  // Width of a value; the design leaves it open, 32 bits is this design's choice.
  localparam int unsigned W_DEFAULT = 32;

  // True when internal node h receives a shortcut from node h-1.
  function automatic bit has_shortcut(int unsigned h);
    return (h % 2 == 0) && ((h & (h - 1)) != 0);
  endfunction

  // Cyclic variant only: true when internal node h is the leftmost node of
  // its depth, below the root's children, and so receives a wrap-around
  // shortcut from the rightmost node of the same depth, node 2h-1.
  function automatic bit has_wrap_shortcut(int unsigned h);
    return (h >= 4) && ((h & (h - 1)) == 0);
  endfunction

endpackage
