// tb_prefix_op: self-checking test of the prefix operator (addition modulo
// 2**W). Drives corner values and random operands and compares with a sum
// computed in the testbench at wider precision and truncated. A second
// instance in carry-save form (16-bit values as {carry, sum} pairs) is given
// random pairs; the value of its result, sum + carry, must equal the sum of
// the four input halves modulo 2**16.
module tb_prefix_op;
  localparam int unsigned W = 32;
  logic [W-1:0] a, b, y;
  int checks = 0, failures = 0;

  prefix_op #(.W(W)) dut (.a(a), .b(b), .y(y));

  localparam int unsigned H = 16;
  logic [2*H-1:0] ca, cb, cy;
  prefix_op #(.W(2 * H), .CARRY_SAVE(1'b1)) dut_cs (.a(ca), .b(cb), .y(cy));

  task automatic check_cs(input logic [2*H-1:0] ta, input logic [2*H-1:0] tb_);
    logic [H-1:0] exp, got;
    ca = ta; cb = tb_;
    #1;
    exp = ta[H-1:0] + ta[2*H-1:H] + tb_[H-1:0] + tb_[2*H-1:H];
    got = cy[H-1:0] + cy[2*H-1:H];
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL carry-save a=%h b=%h y=%h value %h exp %h", ta, tb_, cy, got, exp);
    end
  endtask

  task automatic check(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    logic [W:0] wide;
    a = ta; b = tb_;
    #1;
    wide = {1'b0, ta} + {1'b0, tb_};
    checks++;
    if (y !== wide[W-1:0]) begin
      failures++;
      $display("FAIL a=%h b=%h y=%h exp=%h", ta, tb_, y, wide[W-1:0]);
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
    check(0, 0);
    check(12, 4);
    check('1, 1);
    check('1, '1);
    check(32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 500; i++) check($urandom, $urandom);
    check_cs('0, '0);
    check_cs('1, '1);
    check_cs(32'h0000_ffff, 32'h0000_0001);
    for (int i = 0; i < 500; i++) check_cs($urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
