// mag_comparator: W-bit unsigned magnitude comparator.
//
// Gives the three relations a<b, a==b and a>b at once.  It is built as the
// classic cascaded magnitude comparator: bit i decides the result when all
// bits above it are equal, a greater-than at bit i is a[i] & ~b[i], a
// less-than is ~a[i] & b[i], and equality is the AND of all bit XNORs.
// Purely combinational.  The encoder's controller uses it to decide the end of
// each phase from its cycle counter; the published design names this
// comparator as its improvement over a plain equality ("digital") comparator
// but does not give its gates, so the cascade is this implementation's choice.
module mag_comparator #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         a_lt_b,
  output logic         a_eq_b,
  output logic         a_gt_b
);

  always_comb begin
    logic above_eq;       // all bits above the current one are equal
    above_eq = 1'b1;
    a_lt_b   = 1'b0;
    a_gt_b   = 1'b0;
    for (int i = int'(W) - 1; i >= 0; i--) begin
      a_gt_b   = a_gt_b | (above_eq &  a[i] & ~b[i]);
      a_lt_b   = a_lt_b | (above_eq & ~a[i] &  b[i]);
      above_eq = above_eq & ~(a[i] ^ b[i]);
    end
    a_eq_b = above_eq;
  end

endmodule
