// prefix_node: one internal node (circle) of the segmented parallel-prefix
// tree, optionally with a shortcut input.
//
// Up the tree each subtree reports val, the (x) of its inputs from its last
// segment start (or from its first input if it holds no start) to its end,
// and seg, whether any segment starts inside it. Down the tree each subtree
// receives the value of the segment part that ends just before its first
// leaf. The node has two MUXs, two operators and an OR gate:
//   up_val = r_seg ? r_val : (l_val (x) r_val)
//   up_seg = l_seg | r_seg
//   l_dn   = in
//   r_dn   = l_seg ? l_val : (in (x) l_val)
// With HAS_SHORTCUT set, one more MUX chooses the value coming down:
//   in = sc_seg ? sc_val : p_in
// where sc_val/sc_seg are the up_val/up_seg of the neighbouring subtree on
// the left at the same depth (a cousin, not a sibling). If that subtree
// holds a segment start, its up_val already is the value needed here, so it
// need not travel up to the common ancestor and back down. The result is the
// same either way; only the path, and so the delay, is shorter. Without
// HAS_SHORTCUT the sc_* inputs are not read; they are tied off by the tree.
// CARRY_SAVE is handed to both operators: all W-bit values are then in
// carry-save form (see prefix_op).
// Combinational. sc_taken shows when the shortcut MUX picks the shortcut.
module prefix_node #(
  parameter int unsigned W            = segprefix_pkg::W_DEFAULT,
  parameter bit          HAS_SHORTCUT = 1'b0,
  parameter bit          CARRY_SAVE   = 1'b0
) (
  input  logic [W-1:0] l_val,    // from left child: value of its last segment part
  input  logic         l_seg,    // from left child: a segment starts inside it
  input  logic [W-1:0] r_val,    // from right child
  input  logic         r_seg,
  input  logic [W-1:0] p_in,     // from parent: value ending just before this subtree
  input  logic [W-1:0] sc_val,   // shortcut from left cousin (up_val)
  input  logic         sc_seg,   // shortcut from left cousin (up_seg)
  output logic [W-1:0] up_val,   // to parent
  output logic         up_seg,
  output logic [W-1:0] l_dn,     // to left child
  output logic [W-1:0] r_dn,     // to right child
  output logic         sc_taken  // the shortcut MUX selects the shortcut
);

  logic [W-1:0] in_val;
  logic [W-1:0] up_comb;
  logic [W-1:0] dn_comb;

  always_comb begin
    sc_taken = HAS_SHORTCUT && sc_seg;
    in_val   = sc_taken ? sc_val : p_in;
  end

  prefix_op #(.W(W), .CARRY_SAVE(CARRY_SAVE)) u_op_up (.a(l_val),  .b(r_val), .y(up_comb));
  prefix_op #(.W(W), .CARRY_SAVE(CARRY_SAVE)) u_op_dn (.a(in_val), .b(l_val), .y(dn_comb));

  always_comb begin
    up_val = r_seg ? r_val : up_comb;
    up_seg = l_seg | r_seg;
    l_dn   = in_val;
    r_dn   = l_seg ? l_val : dn_comb;
  end

endmodule
