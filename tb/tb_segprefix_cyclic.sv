// tb_segprefix_cyclic: test of the wrap-around (cyclic) variant, 64 leaves.
//
// The inputs form a ring: positions before the first segment start belong
// to the segment that starts last in the input and wraps past position N-1.
// Reference: find the last start k, run the sum from k to N-1, and carry it
// into position 0. With no segment bit set the tree sums from position 0.
// Counted mechanisms, each required at least once: an output served by the
// wrap-around (s[0] clear, some start later), a wrap-around shortcut MUX
// choosing its shortcut, and the no-start fallback. A second instance with
// leaf-level shortcuts is checked alongside; there leaf 0 takes leaf N-1's
// value directly when leaf N-1 starts a segment, which must also occur.
module tb_segprefix_cyclic;
  localparam int unsigned N = 64;
  localparam int unsigned W = 16;

  logic [W-1:0] x [N];
  logic [N-1:0] s;
  logic [W-1:0] y [N];
  logic [W-1:0] y_lf [N];
  logic [W-1:0] root_val_lf;
  logic         root_seg_lf;
  logic [W-1:0] root_val;
  logic         root_seg;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_wrap_sc = 0, n_nostart = 0, n_leaf_wrap = 0;

  segprefix_tree #(.N(N), .W(W), .CYCLIC(1'b1)) dut (
    .x(x), .s(s), .y(y), .root_val(root_val), .root_seg(root_seg));

  segprefix_tree #(.N(N), .W(W), .CYCLIC(1'b1), .LEAF_SHORTCUTS(1'b1)) dut_lf (
    .x(x), .s(s), .y(y_lf), .root_val(root_val_lf), .root_seg(root_seg_lf));

  // Leftmost node of each depth below the root's children: 4, 8, 16, 32.
  logic [3:0] wrap_taken;
  assign wrap_taken = {dut.g_node[32].sc_taken, dut.g_node[16].sc_taken,
                       dut.g_node[8].sc_taken, dut.g_node[4].sc_taken};

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [W-1:0] acc = '0;
    int last = -1;
    #1;
    for (int i = 0; i < N; i++) if (s[i]) last = i;
    if (last >= 0) begin
      for (int i = last; i < N; i++) acc = (i == last) ? x[i] : W'(acc + x[i]);
      if (!s[0]) n_wrap++;
    end else begin
      n_nostart++;
    end
    for (int i = 0; i < N; i++) begin
      acc = s[i] ? x[i] : W'(acc + x[i]);
      checks += 2;
      if (y[i] !== acc) begin
        failures++;
        if (failures < 20) $display("FAIL y[%0d]=%0d exp %0d", i, y[i], acc);
      end
      if (y_lf[i] !== acc) begin
        failures++;
        if (failures < 20) $display("FAIL (leaf shortcuts) y[%0d]=%0d exp %0d", i, y_lf[i], acc);
      end
    end
    n_wrap_sc += $countones(wrap_taken);
    if (dut_lf.g_leaf[0].sc_taken && !s[0]) n_leaf_wrap++;
  endtask

  initial begin
    for (int r = 0; r < 3000; r++) begin
      automatic int unsigned one_in = 1 + (r % 24);
      for (int i = 0; i < N; i++) begin
        x[i] = W'($urandom);
        s[i] = ($urandom % one_in == 0);
      end
      if (r % 10 == 0) s = '0;
      check();
    end
    $display("wrapped=%0d wrap_shortcuts_taken=%0d no_start=%0d leaf_wrap=%0d",
             n_wrap, n_wrap_sc, n_nostart, n_leaf_wrap);
    checks += 4;
    if (n_leaf_wrap == 0) begin failures++; $display("FAIL leaf wrap shortcut never used"); end
    if (n_wrap == 0)    begin failures++; $display("FAIL no wrapped segment"); end
    if (n_wrap_sc == 0) begin failures++; $display("FAIL no wrap-around shortcut taken"); end
    if (n_nostart == 0) begin failures++; $display("FAIL no input without starts"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
