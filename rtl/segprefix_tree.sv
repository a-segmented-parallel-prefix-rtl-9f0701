// segprefix_tree: N-input segmented parallel-prefix circuit with shortcuts.
//
// Computes, for every position i, y[i] = x[k] (x) x[k+1] (x) ... (x) x[i],
// where k is the last position at or before i whose segment bit s[k] is 1.
// s[0] should be 1; if it is 0, positions before the first segment start
// are summed from position 0 (the root is fed the identity, zero).
//
// CYCLIC = 1 selects the wrap-around variant: the input is a ring, and a
// segment that has not started by position 0 continues the last segment of
// the input (positions up to N-1). The root then feeds its own upward value
// back as the value "before position 0" whenever any segment bit is set
// (this is no combinational loop: upward values depend only on x and s), and
// the leftmost node of each depth takes a shortcut from the rightmost one.
// With no segment bit set at all, the variant falls back to summing from
// position 0.
//
// CARRY_SAVE = 1 carries every value through the tree in carry-save form
// (a sum and a carry word, 2W bits), so each operator is a constant-depth
// compressor instead of a carry-propagating adder; x enters with a zero
// carry word and each y, and root_val, is resolved by one W-bit adder at
// the edge of the tree. The results are the same as with CARRY_SAVE = 0.
//
// LEAF_SHORTCUTS = 1 adds the same kind of shortcut between neighbouring
// leaves that have different parents (leaf 2m-1 to leaf 2m, and in the
// cyclic variant leaf N-1 to leaf 0). By default only internal nodes get
// shortcuts, as in the drawn 64-leaf layout; the leaf-level ones are the
// finest level of the same rule and save one level for a leaf whose left
// neighbour starts a segment.
//
// Structure: a complete binary tree of prefix_node cells over N prefix_leaf
// cells, numbered like a heap (see segprefix_pkg). Each node sends up the
// value of its subtree's last segment part and whether the subtree holds a
// segment start, and sends down to each child the value of the segment part
// that ends just before that child. On top of the plain tree, every internal
// node that is the left child of its parent, and not leftmost at its depth,
// takes a shortcut from its left neighbour at the same depth (node h-1 feeds
// node h). When the neighbour holds a segment start, the value is taken from
// it directly instead of from above, so a short segment is finished by a
// path that climbs only about log2 of its length levels, whatever its
// alignment to the tree. The shortcuts change no result, only which path
// carries it.
//
// Purely combinational; there are no clocks or registers. N must be a power
// of two and at least 2. root_val/root_seg are the root's upward outputs:
// the value of the last segment part of the whole input and whether any
// segment bit is set.
//
// What follows the design: the node contents (two MUXs, two operators, an OR
// gate, plus one shortcut MUX), the shortcut rule, the 64-leaf size,
// addition as the operator of the worked example, and carry-save addition
// as the way to keep operators to constant depth. This design's own choices:
// the binary-heap wiring, the 32-bit value width, placing the final MUX and
// operator of each output in its leaf, the 4:2 compressor and the per-output
// resolving adder of the carry-save option, and the logic of the cyclic
// variant, which the design only names. Leaf shortcuts are optional because
// the drawn layout has none while the distance argument assumes them. The
// physical H-tree placement is not part of RTL.
//
// Each node's and leaf's sc_taken (its shortcut-MUX select) is left
// unconnected here; it exists so that testbenches can observe which path
// served a result, and lint reports it as unused.
module segprefix_tree #(
  parameter int unsigned N = segprefix_pkg::N_DEFAULT,
  parameter int unsigned W = segprefix_pkg::W_DEFAULT,
  parameter bit          CYCLIC = 1'b0,
  parameter bit          LEAF_SHORTCUTS = 1'b0,
  parameter bit          CARRY_SAVE = 1'b0
) (
  input  logic [W-1:0] x [N],   // input values
  input  logic [N-1:0] s,       // segment bits (1 = a segment starts here)
  output logic [W-1:0] y [N],   // segmented prefix results
  output logic [W-1:0] root_val,
  output logic         root_seg
);

  // Width of a value inside the tree: twice W in carry-save form.
  localparam int unsigned VW = CARRY_SAVE ? 2 * W : W;

  // Heap-numbered wires: index h in 1..2N-1; 1..N-1 internal, N..2N-1 leaves.
  logic [VW-1:0] up_val [1:2*N-1];
  logic          up_seg [1:2*N-1];
  logic [VW-1:0] dn_val [1:2*N-1];

  // Nothing lies before the first input: the root receives the identity. In
  // the cyclic variant the end of the input lies before it.
  assign dn_val[1] = (CYCLIC && up_seg[1]) ? up_val[1] : '0;
  assign root_seg  = up_seg[1];
  if (CARRY_SAVE) begin : g_root_cs
    assign root_val = up_val[1][W-1:0] + up_val[1][2*W-1:W];
  end else begin : g_root
    assign root_val = up_val[1];
  end

  for (genvar h = 1; h < N; h++) begin : g_node
    localparam bit SC_LIN  = segprefix_pkg::has_shortcut(h);
    localparam bit SC_WRAP = CYCLIC && segprefix_pkg::has_wrap_shortcut(h);
    localparam bit SC      = SC_LIN || SC_WRAP;
    logic [VW-1:0] sc_val;
    logic          sc_seg;
    logic          sc_taken;  // shortcut MUX select; observed by testbenches only

    if (SC_LIN) begin : g_sc
      assign sc_val = up_val[h-1];
      assign sc_seg = up_seg[h-1];
    end else if (SC_WRAP) begin : g_wrap
      assign sc_val = up_val[2*h-1];
      assign sc_seg = up_seg[2*h-1];
    end else begin : g_nosc
      assign sc_val = '0;
      assign sc_seg = 1'b0;
    end

    prefix_node #(.W(VW), .HAS_SHORTCUT(SC), .CARRY_SAVE(CARRY_SAVE)) u_node (
      .l_val   (up_val[2*h]),
      .l_seg   (up_seg[2*h]),
      .r_val   (up_val[2*h+1]),
      .r_seg   (up_seg[2*h+1]),
      .p_in    (dn_val[h]),
      .sc_val  (sc_val),
      .sc_seg  (sc_seg),
      .up_val  (up_val[h]),
      .up_seg  (up_seg[h]),
      .l_dn    (dn_val[2*h]),
      .r_dn    (dn_val[2*h+1]),
      .sc_taken(sc_taken)
    );
  end

  for (genvar i = 0; i < N; i++) begin : g_leaf
    localparam int unsigned HL  = N + i;
    localparam bit SC_LIN  = LEAF_SHORTCUTS && segprefix_pkg::has_shortcut(HL);
    localparam bit SC_WRAP = LEAF_SHORTCUTS && CYCLIC && segprefix_pkg::has_wrap_shortcut(HL);
    localparam bit SC      = SC_LIN || SC_WRAP;
    logic [VW-1:0] sc_val;
    logic          sc_seg;
    logic          sc_taken;  // shortcut MUX select; observed by testbenches only
    logic [VW-1:0] x_bus;     // x[i] in the tree's value format
    logic [VW-1:0] y_bus;     // y[i] in the tree's value format

    // Carry-save form: x enters with a zero carry half; y leaves through one
    // carry-propagate adder per output.
    if (CARRY_SAVE) begin : g_cs
      assign x_bus = {W'(0), x[i]};
      assign y[i]  = y_bus[W-1:0] + y_bus[2*W-1:W];
    end else begin : g_bin
      assign x_bus = x[i];
      assign y[i]  = y_bus;
    end

    if (SC_LIN) begin : g_sc
      assign sc_val = up_val[HL-1];
      assign sc_seg = up_seg[HL-1];
    end else if (SC_WRAP) begin : g_wrap
      assign sc_val = up_val[2*HL-1];
      assign sc_seg = up_seg[2*HL-1];
    end else begin : g_nosc
      assign sc_val = '0;
      assign sc_seg = 1'b0;
    end

    prefix_leaf #(.W(VW), .HAS_SHORTCUT(SC), .CARRY_SAVE(CARRY_SAVE)) u_leaf (
      .x       (x_bus),
      .s       (s[i]),
      .y_prev  (dn_val[HL]),
      .sc_val  (sc_val),
      .sc_seg  (sc_seg),
      .up_val  (up_val[HL]),
      .up_seg  (up_seg[HL]),
      .y       (y_bus),
      .sc_taken(sc_taken)
    );
  end

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0)
      else $fatal(1, "segprefix_tree: N must be a power of two, at least 2");
  end

endmodule
