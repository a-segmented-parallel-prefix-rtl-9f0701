// tb_segprefix_carrysave: end-to-end test of the segmented parallel-prefix
// tree built with CARRY_SAVE = 1 (64 leaves, 32-bit results, values carried
// through the tree as carry-save pairs and resolved at the outputs). It runs
// the same vectors and checks as the default-configuration test.
//
// Every result is compared with a sequential reference computed here: walk
// the inputs left to right, restart the running sum wherever s is 1. Cases:
//   - the 16-element worked example (x, s and the expected sums are written
//     out below) in leaves 0..15, the rest filled with other segments;
//   - random inputs with segment starts of density 1/2, 1/4, 1/8, 1/32 and
//     with only s[0] set (one segment over the whole input);
//   - all segment bits set (every output is its own input);
//   - s[0] clear (leading positions sum from position 0).
// Each mechanism is counted and must occur at least once: a shortcut MUX
// choosing the shortcut (observed inside the tree), a segment crossing the
// middle of the input (served through the root), a leaf starting a segment,
// and a leaf joining the segment on its left.
module tb_segprefix_carrysave;
  import segprefix_pkg::*;
  localparam int unsigned N = N_DEFAULT;
  localparam int unsigned W = W_DEFAULT;

  logic [W-1:0] x [N];
  logic [N-1:0] s;
  logic [W-1:0] y [N];
  logic [W-1:0] root_val;
  logic         root_seg;

  int checks = 0, failures = 0;
  int n_shortcut = 0, n_cross_root = 0, n_start = 0, n_join = 0, n_vectors = 0;

  segprefix_tree #(.CARRY_SAVE(1'b1)) dut (.x(x), .s(s), .y(y), .root_val(root_val), .root_seg(root_seg));

  // Which shortcut MUXes currently pick the shortcut.
  logic [N-1:0] sc_now;
  for (genvar h = 1; h < N; h++) begin : g_probe
    assign sc_now[h] = dut.g_node[h].sc_taken;
  end
  assign sc_now[0] = 1'b0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply the current x/s, then compare every output with the reference.
  task automatic apply_and_check(input string tag);
    logic [W-1:0] acc;
    logic         any;
    #1;
    n_vectors++;
    acc = '0;
    any = 1'b0;
    for (int i = 0; i < N; i++) begin
      acc = s[i] ? x[i] : W'(acc + x[i]);
      any |= s[i];
      checks++;
      if (y[i] !== acc) begin
        failures++;
        if (failures < 20) $display("FAIL %s: y[%0d]=%0d exp %0d", tag, i, y[i], acc);
      end
      if (i > 0 && s[i]) n_start++;
      if (i > 0 && !s[i]) n_join++;
    end
    checks += 2;
    if (root_val !== acc) begin failures++; $display("FAIL %s: root_val", tag); end
    if (root_seg !== any) begin failures++; $display("FAIL %s: root_seg", tag); end
    if (!s[N/2]) n_cross_root++;
    n_shortcut += $countones(sc_now);
  endtask

  task automatic random_fill(input int unsigned one_in);
    for (int i = 0; i < N; i++) begin
      x[i] = W'($urandom);
      s[i] = (one_in != 0) && ($urandom % one_in == 0);
    end
    s[0] = 1'b1;
  endtask

  // The worked example: inputs, segment bits and the sums it lists.
  localparam int unsigned EX_X [16] = '{12, 4, 7, 3, 2, 1, 5, 4, 4, 1, 1, 1, 1, 1, 1, 1};
  localparam bit          EX_S [16] = '{1, 0, 0, 0, 1, 0, 1, 1, 0, 1, 0, 1, 0, 1, 0, 1};
  localparam int unsigned EX_Y [16] = '{12, 16, 23, 26, 2, 3, 5, 4, 8, 1, 2, 1, 2, 1, 2, 1};
  // Segment-start densities of the random vectors (one start in DENS; 0 = only s[0]).
  localparam int unsigned DENS [5] = '{2, 4, 8, 32, 0};

  initial begin
    // Worked example in leaves 0..15; leaves 16.. hold x=i in pairs.
    for (int i = 0; i < N; i++) begin
      x[i] = (i < 16) ? W'(EX_X[i]) : W'(i);
      s[i] = (i < 16) ? EX_S[i] : (i % 2 == 0);
    end
    apply_and_check("example");
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (y[i] !== W'(EX_Y[i])) begin
        failures++;
        $display("FAIL example: y[%0d]=%0d, worked example gives %0d", i, y[i], EX_Y[i]);
      end
    end

    // All segment bits set.
    random_fill(1);
    apply_and_check("all-starts");

    // One segment over everything.
    random_fill(0);
    apply_and_check("one-segment");

    // s[0] clear.
    random_fill(6);
    s[0] = 1'b0;
    apply_and_check("s0-clear");

    // Random segmentations of several densities.
    for (int r = 0; r < 4000; r++) begin
      random_fill(DENS[r % 5]);
      apply_and_check("random");
    end

    $display("vectors=%0d shortcut_taken=%0d cross_root=%0d seg_starts=%0d seg_joins=%0d",
             n_vectors, n_shortcut, n_cross_root, n_start, n_join);
    checks += 4;
    if (n_shortcut == 0)   begin failures++; $display("FAIL no shortcut was taken"); end
    if (n_cross_root == 0) begin failures++; $display("FAIL no segment crossed the root"); end
    if (n_start == 0)      begin failures++; $display("FAIL no segment start"); end
    if (n_join == 0)       begin failures++; $display("FAIL no segment join"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
