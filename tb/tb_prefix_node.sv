// tb_prefix_node: self-checking test of the internal node, once without and
// once with the shortcut MUX. Inputs are random; the expected outputs follow
// the node equations:
//   up_val = r_seg ? r_val : l_val + r_val      up_seg = l_seg | r_seg
//   in     = (shortcut && sc_seg) ? sc_val : p_in
//   l_dn   = in                                 r_dn = l_seg ? l_val : in + l_val
module tb_prefix_node;
  localparam int unsigned W = 16;
  logic [W-1:0] l_val, r_val, p_in, sc_val;
  logic         l_seg, r_seg, sc_seg;
  logic [W-1:0] up_val[2], l_dn[2], r_dn[2];
  logic         up_seg[2], sc_taken[2];
  int checks = 0, failures = 0;
  int sc_hits = 0;

  prefix_node #(.W(W), .HAS_SHORTCUT(1'b0)) dut_plain (
    .l_val(l_val), .l_seg(l_seg), .r_val(r_val), .r_seg(r_seg), .p_in(p_in),
    .sc_val(sc_val), .sc_seg(sc_seg), .up_val(up_val[0]), .up_seg(up_seg[0]),
    .l_dn(l_dn[0]), .r_dn(r_dn[0]), .sc_taken(sc_taken[0]));

  prefix_node #(.W(W), .HAS_SHORTCUT(1'b1)) dut_sc (
    .l_val(l_val), .l_seg(l_seg), .r_val(r_val), .r_seg(r_seg), .p_in(p_in),
    .sc_val(sc_val), .sc_seg(sc_seg), .up_val(up_val[1]), .up_seg(up_seg[1]),
    .l_dn(l_dn[1]), .r_dn(r_dn[1]), .sc_taken(sc_taken[1]));

  task automatic cmp(input string what, input int k, input logic [W-1:0] got,
                     input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s (shortcut=%0d): got %h exp %h", what, k, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] in_e, exp_up;
    for (int i = 0; i < 600; i++) begin
      l_val = W'($urandom); r_val = W'($urandom);
      p_in = W'($urandom); sc_val = W'($urandom);
      {l_seg, r_seg, sc_seg} = 3'($urandom);
      #1;
      exp_up = r_seg ? r_val : W'(l_val + r_val);
      for (int k = 0; k < 2; k++) begin
        in_e = (k == 1 && sc_seg) ? sc_val : p_in;
        cmp("up_val", k, up_val[k], exp_up);
        cmp("up_seg", k, W'(up_seg[k]), W'(l_seg | r_seg));
        cmp("l_dn", k, l_dn[k], in_e);
        cmp("r_dn", k, r_dn[k], l_seg ? l_val : W'(in_e + l_val));
        cmp("sc_taken", k, W'(sc_taken[k]), W'(k == 1 && sc_seg));
      end
      if (sc_taken[1]) sc_hits++;
    end
    checks++;
    if (sc_hits == 0) begin failures++; $display("FAIL shortcut never taken"); end
    $display("shortcut taken %0d times", sc_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
