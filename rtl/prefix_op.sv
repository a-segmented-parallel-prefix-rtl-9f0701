// prefix_op: the associative operator (x) of the segmented prefix computation.
//
// The circuit works for any associative operator; this block provides
// addition modulo 2**(value width), the operator of the worked example, in
// one of two forms selected by CARRY_SAVE:
//
//   CARRY_SAVE = 0: a and b are W-bit numbers and y = a + b, a plain adder.
//   CARRY_SAVE = 1: each W-bit bus holds a number in redundant carry-save
//     form, {carry half, sum half} of W/2 bits each, whose value is
//     sum + carry. Two rows of full adders (a 4:2 compressor) reduce the four
//     halves of a and b to a new pair, so y's value is a's plus b's, modulo
//     2**(W/2), with a constant number of gate levels and no carry
//     propagation. Using carry-save addition to keep every operator a
//     constant number of gates follows the design; the compressor itself is
//     this design's choice.
//
// Purely combinational. a is the left (earlier) operand. Another associative
// operator can be dropped in here as long as it keeps this port list; the
// root of the tree feeds in the all-zero word, the identity of addition.
module prefix_op #(
  parameter int unsigned W          = segprefix_pkg::W_DEFAULT,
  parameter bit          CARRY_SAVE = 1'b0
) (
  input  logic [W-1:0] a,  // left operand (earlier inputs)
  input  logic [W-1:0] b,  // right operand (later inputs)
  output logic [W-1:0] y   // a (x) b
);

  if (CARRY_SAVE) begin : g_csa
    localparam int unsigned H = W / 2;
    logic [H-1:0] p, q, r, t, s1, c1, s2, c2;

    always_comb begin
      {q, p} = a;  // q: carry half, p: sum half
      {t, r} = b;
      // First row: p + q + r = s1 + c1.
      s1 = p ^ q ^ r;
      c1 = ((p & q) | (p & r) | (q & r)) << 1;
      // Second row: s1 + c1 + t = s2 + c2.
      s2 = s1 ^ c1 ^ t;
      c2 = ((s1 & c1) | (s1 & t) | (c1 & t)) << 1;
      y  = {c2, s2};
    end

    initial begin
      assert (W % 2 == 0) else $fatal(1, "prefix_op: carry-save width must be even");
    end
  end else begin : g_add
    always_comb y = a + b;
  end

endmodule
