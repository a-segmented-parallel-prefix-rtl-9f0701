// tb_prefix_leaf: self-checking test of the leaf, without and with the
// leaf-level shortcut MUX. For random inputs it checks
//   prev = (shortcut && sc_seg) ? sc_val : y_prev
//   y    = s ? x : prev + x
// and that x and s are sent up unchanged.
module tb_prefix_leaf;
  localparam int unsigned W = 16;
  logic [W-1:0] x, y_prev, sc_val;
  logic         s, sc_seg;
  logic [W-1:0] up_val[2], y[2];
  logic         up_seg[2], sc_taken[2];
  int checks = 0, failures = 0;
  int starts = 0, joins = 0, sc_hits = 0;

  prefix_leaf #(.W(W), .HAS_SHORTCUT(1'b0)) dut_plain (
    .x(x), .s(s), .y_prev(y_prev), .sc_val(sc_val), .sc_seg(sc_seg),
    .up_val(up_val[0]), .up_seg(up_seg[0]), .y(y[0]), .sc_taken(sc_taken[0]));
  prefix_leaf #(.W(W), .HAS_SHORTCUT(1'b1)) dut_sc (
    .x(x), .s(s), .y_prev(y_prev), .sc_val(sc_val), .sc_seg(sc_seg),
    .up_val(up_val[1]), .up_seg(up_seg[1]), .y(y[1]), .sc_taken(sc_taken[1]));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp, prev;
    for (int i = 0; i < 600; i++) begin
      x = W'($urandom); y_prev = W'($urandom); sc_val = W'($urandom);
      {s, sc_seg} = 2'($urandom);
      #1;
      if (s) starts++; else joins++;
      for (int k = 0; k < 2; k++) begin
        prev = (k == 1 && sc_seg) ? sc_val : y_prev;
        exp  = s ? x : W'(prev + x);
        checks += 4;
        if (y[k] !== exp)       begin failures++; $display("FAIL y (shortcut=%0d) %h exp %h", k, y[k], exp); end
        if (up_val[k] !== x)    begin failures++; $display("FAIL up_val"); end
        if (up_seg[k] !== s)    begin failures++; $display("FAIL up_seg"); end
        if (sc_taken[k] !== (k == 1 && sc_seg)) begin failures++; $display("FAIL sc_taken"); end
      end
      if (sc_taken[1] && !s) sc_hits++;
    end
    checks++;
    if (starts == 0 || joins == 0 || sc_hits == 0) begin
      failures++;
      $display("FAIL a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
