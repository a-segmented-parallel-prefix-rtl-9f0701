// prefix_leaf: one leaf (square) of the segmented parallel-prefix tree.
//
// Towards the root it presents its input value x and its segment bit s. From
// the tree it receives y_prev, the result of the previous position (the value
// of the part of the current segment that ends just before this leaf). It
// forms its own output as one stage of the linear segmented-prefix chain:
//   y = s ? x : (prev (x) x),   prev = y_prev
// so a leaf that starts a segment ignores everything to its left.
//
// With HAS_SHORTCUT set (optional leaf-level shortcuts), the leaf also sees
// its left neighbour leaf's x and s directly on sc_val/sc_seg, and uses
//   prev = sc_seg ? sc_val : y_prev
// so a neighbour that starts a segment hands its value over without going
// through the tree. The result is the same; only the path is shorter.
// Without HAS_SHORTCUT the sc_* inputs are not read.
//
// CARRY_SAVE is handed to the operator: all W-bit values are then in
// carry-save form (see prefix_op); the tree converts at its edges.
//
// Combinational, one operator and one or two multiplexers deep. Placing this
// last MUX and operator in the leaf (rather than having the tree deliver y
// itself) is this design's reading of the node description.
module prefix_leaf #(
  parameter int unsigned W            = segprefix_pkg::W_DEFAULT,
  parameter bit          HAS_SHORTCUT = 1'b0,
  parameter bit          CARRY_SAVE   = 1'b0
) (
  input  logic [W-1:0] x,        // input value x_i
  input  logic         s,        // segment bit s_i (1 = a segment starts here)
  input  logic [W-1:0] y_prev,   // y_{i-1}, from the tree
  input  logic [W-1:0] sc_val,   // shortcut: left neighbour leaf's x
  input  logic         sc_seg,   // shortcut: left neighbour leaf's s
  output logic [W-1:0] up_val,   // value sent towards the root (x_i)
  output logic         up_seg,   // segment bit sent towards the root (s_i)
  output logic [W-1:0] y,        // output y_i
  output logic         sc_taken  // the shortcut MUX selects the shortcut
);

  logic [W-1:0] prev;
  logic [W-1:0] comb;

  always_comb begin
    sc_taken = HAS_SHORTCUT && sc_seg;
    prev     = sc_taken ? sc_val : y_prev;
  end

  prefix_op #(.W(W), .CARRY_SAVE(CARRY_SAVE)) u_op (.a(prev), .b(x), .y(comb));

  always_comb begin
    up_val = x;
    up_seg = s;
    y      = s ? x : comb;
  end

endmodule
