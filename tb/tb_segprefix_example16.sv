// tb_segprefix_example16: the 16-element worked example on a 16-leaf tree.
//
//   x = 12 4 7 3 | 2 1 | 5 | 4 4 | 1 1 | 1 1 | 1 1 | 1
//   y = 12 16 23 26 | 2 3 | 5 | 4 8 | 1 2 | 1 2 | 1 2 | 1
//
// Besides the sums it checks how the tree serves three outputs:
//   - y5: leaf 5 takes its value from its sibling leaf 4, which starts a
//     segment, so nothing above their parent is involved;
//   - y3: the value comes from the subtree of leaves 0-1, the sibling of
//     the subtree 2-3, below the root of the quarter 0-3;
//   - y8: leaf 8 is the first of its pair 8-9 and the pair 6-7 on its left
//     belongs to another half; in a plain tree the value would come down from
//     the root, but the shortcut from node (6-7) to node (8-9) is taken.
module tb_segprefix_example16;
  localparam int unsigned N = 16;
  localparam int unsigned W = 8;
  localparam int unsigned EX_X [16] = '{12, 4, 7, 3, 2, 1, 5, 4, 4, 1, 1, 1, 1, 1, 1, 1};
  localparam bit          EX_S [16] = '{1, 0, 0, 0, 1, 0, 1, 1, 0, 1, 0, 1, 0, 1, 0, 1};
  localparam int unsigned EX_Y [16] = '{12, 16, 23, 26, 2, 3, 5, 4, 8, 1, 2, 1, 2, 1, 2, 1};

  logic [W-1:0] x [N];
  logic [N-1:0] s;
  logic [W-1:0] y [N];
  logic [W-1:0] root_val;
  logic         root_seg;
  int checks = 0, failures = 0;

  segprefix_tree #(.N(N), .W(W)) dut (.x(x), .s(s), .y(y), .root_val(root_val), .root_seg(root_seg));

  // Heap numbers: leaves are 16..31, the pair (6-7) is node 11, (8-9) is node 12,
  // (0-1) is node 8, (2-3) is node 9.
  logic sc_pair89, sc_pair23, seg_pair01, seg_pair67, seg_leaf4;
  assign sc_pair89  = dut.g_node[12].sc_taken;
  assign sc_pair23  = dut.g_node[9].sc_taken;
  assign seg_pair01 = dut.up_seg[8];
  assign seg_pair67 = dut.up_seg[11];
  assign seg_leaf4  = dut.up_seg[20];

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s = %0b, expected %0b", what, got, exp); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      x[i] = W'(EX_X[i]);
      s[i] = EX_S[i];
    end
    #1;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (y[i] !== W'(EX_Y[i])) begin
        failures++;
        $display("FAIL y[%0d]=%0d expected %0d", i, y[i], EX_Y[i]);
      end
    end
    // y5 is served by its sibling leaf 4.
    expect_bit("leaf 4 starts a segment", seg_leaf4, 1'b1);
    // y8 arrives through the shortcut from the pair 6-7.
    expect_bit("pair 6-7 holds a segment start", seg_pair67, 1'b1);
    expect_bit("shortcut into pair 8-9 taken", sc_pair89, 1'b1);
    // y3: the pair 0-1 holds the start; node 9 has no shortcut at all.
    expect_bit("pair 0-1 holds a segment start", seg_pair01, 1'b1);
    expect_bit("node 9 shortcut", sc_pair23, 1'b0);
    checks += 2;
    if (root_val !== W'(1)) begin failures++; $display("FAIL root_val=%0d", root_val); end
    if (root_seg !== 1'b1)  begin failures++; $display("FAIL root_seg"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
