// tb_segprefix_locality: checks the locality property of the shortcut tree
// and runs the random-addition workload, at the default size (64 leaves).
//
// Locality. For each output y[j] that does not start a segment, the value it
// needs arrives along one data path, chosen by the segment bits. Walking up
// from leaf j, the path stops at the first subtree that lies immediately to
// the left of j's ancestor at that height and holds a segment start: either
// the sibling (a right child reads its left sibling) or, via a shortcut MUX
// that the tree reports as taken, a cousin. From that subtree's root the
// value comes back down. The testbench walks this path using the tree's own
// segment flags and shortcut-MUX selects and records the height it reaches.
// With the segment starting at k, the height must not exceed
// floor(log2(j-k)) + 1: the path depends on the segment length, not on N.
// The same walk with the shortcut MUXes ignored gives the height a plain
// tree would need; the number of outputs the shortcuts bring lower, and the
// number a plain tree would serve above the bound, are counted and must both
// be non-zero.
//
// A second tree, built with leaf-level shortcuts, gets the same inputs.
// There a neighbour that starts a segment always serves directly, and the
// bound tightens to 0 for j-k = 1 and floor(log2(j-k-1)) + 1 otherwise. The
// number of outputs it serves lower than the first tree must be non-zero.
//
// Random addition. Carry look-ahead is a segmented prefix: a segment starts
// at every bit where a == b (the carry out is then fixed to a&b), the input
// value is the generate bit a&b, and the operator is addition; inside a
// segment all later generate bits are zero, so y[i] is the carry out of bit
// i. Random 64-bit operands are added this way, the sum is checked against
// a + b, and the longest carry chain and the path height are reported.
module tb_segprefix_locality;
  import segprefix_pkg::*;
  localparam int unsigned N = N_DEFAULT;
  localparam int unsigned W = W_DEFAULT;
  localparam int unsigned L = $clog2(N);

  logic [W-1:0] x [N];
  logic [N-1:0] s;
  logic [W-1:0] y [N];
  logic [W-1:0] y_lf [N];
  logic [W-1:0] root_val, root_val_lf;
  logic         root_seg, root_seg_lf;

  int checks = 0, failures = 0;
  int n_paths = 0, n_lowered = 0, n_taken = 0, n_plain_over = 0, n_leaf_lower = 0;
  int hist_sc [L+1];
  int hist_plain [L+1];

  segprefix_tree dut (.x(x), .s(s), .y(y), .root_val(root_val), .root_seg(root_seg));
  segprefix_tree #(.LEAF_SHORTCUTS(1'b1)) dut_lf (
    .x(x), .s(s), .y(y_lf), .root_val(root_val_lf), .root_seg(root_seg_lf));

  // Upward segment flags and shortcut-MUX selects of every node and leaf;
  // index 0 is the default tree, index 1 the one with leaf shortcuts.
  logic seg_of [2][1:2*N-1];
  logic taken  [2][1:2*N-1];
  for (genvar h = 1; h < 2 * N; h++) begin : g_seg
    assign seg_of[0][h] = dut.up_seg[h];
    assign seg_of[1][h] = dut_lf.up_seg[h];
  end
  for (genvar h = 1; h < N; h++) begin : g_taken
    assign taken[0][h] = dut.g_node[h].sc_taken;
    assign taken[1][h] = dut_lf.g_node[h].sc_taken;
  end
  for (genvar i = 0; i < N; i++) begin : g_taken_leaf
    assign taken[0][N+i] = dut.g_leaf[i].sc_taken;
    assign taken[1][N+i] = dut_lf.g_leaf[i].sc_taken;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned level_of(int unsigned h);
    return L - ($clog2(h + 1) - 1);
  endfunction

  // Height reached by the data path feeding leaf j in tree v. use_sc = 0
  // ignores the shortcut MUXes (plain tree).
  function automatic int unsigned path_height(int unsigned j, bit use_sc, int v = 0);
    int unsigned h = N + j;
    forever begin
      if (h % 2 == 1 && seg_of[v][h-1]) return level_of(h);
      if (use_sc && taken[v][h]) return level_of(h);
      if (h == 1) return L;
      h = h / 2;
    end
  endfunction

  function automatic int unsigned flog2(int unsigned v);
    int unsigned r = 0;
    while (v > 1) begin v >>= 1; r++; end
    return r;
  endfunction

  // Check the locality bound for every output of the current input.
  task automatic check_locality();
    int unsigned k = 0;
    for (int unsigned j = 0; j < N; j++) begin
      if (s[j]) begin
        k = j;
      end else begin
        int unsigned hs, hp, hl;
        hs = path_height(j, 1'b1);
        hp = path_height(j, 1'b0);
        hl = path_height(j, 1'b1, 1);
        if (hl < hs) n_leaf_lower++;
        checks++;
        if (hl > ((j - k == 1) ? 0 : flog2(j - k - 1) + 1)) begin
          failures++;
          if (failures < 20)
            $display("FAIL leaf-shortcut locality: y[%0d], segment from %0d, height %0d", j, k, hl);
        end
        n_paths++;
        hist_sc[hs]++;
        hist_plain[hp]++;
        if (hs < hp) n_lowered++;
        if (hp > flog2(j - k) + 1) n_plain_over++;
        checks++;
        if (hs > flog2(j - k) + 1) begin
          failures++;
          if (failures < 20)
            $display("FAIL locality: y[%0d], segment from %0d, path height %0d", j, k, hs);
        end
      end
    end
    for (int unsigned h = 1; h < N; h++) if (taken[0][h]) n_taken++;
  endtask

  task automatic check_values();
    logic [W-1:0] acc = '0;
    for (int i = 0; i < N; i++) begin
      acc = s[i] ? x[i] : W'(acc + x[i]);
      checks += 2;
      if (y[i] !== acc) begin
        failures++;
        if (failures < 20) $display("FAIL value y[%0d]=%0d exp %0d", i, y[i], acc);
      end
      if (y_lf[i] !== acc) begin
        failures++;
        if (failures < 20) $display("FAIL value (leaf shortcuts) y[%0d]=%0d exp %0d", i, y_lf[i], acc);
      end
    end
  endtask

  initial begin
    logic [N-1:0] a, b, sum, carry, gen, ref_sum;
    int unsigned chain, longest, longest_all, sum_longest, hmax_add, hplain_add;
    int unsigned one_in;

    // Part 1: random segmentations, segment starts at many densities.
    for (int r = 0; r < 3000; r++) begin
      one_in = 1 + (r % 40);
      for (int i = 0; i < N; i++) begin
        x[i] = W'($urandom);
        s[i] = ($urandom % one_in == 0);
      end
      s[0] = 1'b1;
      #1;
      check_values();
      check_locality();
    end

    // Part 2: random additions through the prefix tree.
    longest_all = 0; sum_longest = 0; hmax_add = 0; hplain_add = 0;
    for (int r = 0; r < 2000; r++) begin
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      gen = a & b;
      for (int i = 0; i < N; i++) begin
        x[i] = W'(gen[i]);
        s[i] = (i == 0) || (a[i] == b[i]);
      end
      #1;
      check_values();
      check_locality();
      for (int i = 0; i < N; i++) carry[i] = y[i][0];
      sum = a ^ b ^ {carry[N-2:0], 1'b0};
      ref_sum = a + b;
      checks++;
      if (sum !== ref_sum) begin
        failures++;
        $display("FAIL add %h + %h = %h, got %h", a, b, ref_sum, sum);
      end
      longest = 0; chain = 0;
      for (int i = 0; i < N; i++) begin
        chain = s[i] ? 1 : chain + 1;
        if (chain > longest) longest = chain;
      end
      sum_longest += longest;
      if (longest > longest_all) longest_all = longest;
      for (int unsigned j = 0; j < N; j++) if (!s[j]) begin
        if (path_height(j, 1'b1) > hmax_add) hmax_add = path_height(j, 1'b1);
        if (path_height(j, 1'b0) > hplain_add) hplain_add = path_height(j, 1'b0);
      end
    end
    $display("random addition: 2000 sums, mean longest segment x100 = %0d, max %0d",
             sum_longest / 20, longest_all);
    $display("random addition: highest path with shortcuts %0d of %0d levels, plain tree %0d",
             hmax_add, L, hplain_add);

    $display("outputs traced=%0d lowered by shortcuts=%0d shortcut MUXes taken=%0d",
             n_paths, n_lowered, n_taken);
    $display("outputs a plain tree would serve above the bound: %0d", n_plain_over);
    $display("outputs served lower with leaf shortcuts: %0d", n_leaf_lower);
    for (int h = 0; h <= L; h++)
      $display("  path height %0d: with shortcuts %0d, plain tree %0d", h, hist_sc[h], hist_plain[h]);
    checks += 4;
    if (n_leaf_lower == 0) begin failures++; $display("FAIL leaf shortcuts never lowered a path"); end
    if (n_plain_over == 0) begin failures++; $display("FAIL bound never tighter than a plain tree"); end
    if (n_lowered == 0) begin failures++; $display("FAIL shortcuts never lowered a path"); end
    if (n_taken == 0)   begin failures++; $display("FAIL no shortcut MUX was taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
