// simplified_compare_logic -- second stage of the two-stage magnitude comparator.
//
// Takes the flag vectors of the first stage, which mark the positions where
// one operand has a 1 and the other a 0, and decides which operand is larger:
//
//   g = OR over i of ( a_sig[i] AND NOT b_sig[j] for every j > i )
//   s = OR over i of ( b_sig[i] AND NOT a_sig[j] for every j > i )
//
// A flag of A wins when no flag of B sits above it, and vice versa. There is
// no separate stage that isolates the most significant flag: lower flags stay
// in place and are only masked by the other operand's higher flags, which is
// what makes this comparator smaller than a priority-based one. With no flag
// at all (equal operands) both outputs are 0; g and s are never both 1.
//
// The same logic also combines the (g, s) pairs of several narrower
// comparators into one wider result, since such pairs obey the same rule of
// never being 1 together.
//
// Interface: a_sig, b_sig (WIDTH bits) in, never both 1 in one position;
// g (A > B), s (A < B) out. Timing: purely combinational.
//
// The function follows the published design; the sum-of-products form is
// this implementation's own.
module simplified_compare_logic #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a_sig,
  input  logic [WIDTH-1:0] b_sig,
  output logic             g,
  output logic             s
);

  logic [WIDTH-1:0] a_clear;  // a_clear[i]: no flag of A above position i
  logic [WIDTH-1:0] b_clear;  // b_clear[i]: no flag of B above position i

  always_comb begin
    a_clear[WIDTH-1] = 1'b1;
    b_clear[WIDTH-1] = 1'b1;
    for (int i = WIDTH - 2; i >= 0; i--) begin
      a_clear[i] = a_clear[i+1] & ~a_sig[i+1];
      b_clear[i] = b_clear[i+1] & ~b_sig[i+1];
    end
    g = |(a_sig & b_clear);
    s = |(b_sig & a_clear);
  end

  // The first stage never flags both operands in the same position.
  always_comb begin
    assert ((a_sig & b_sig) == '0 || $isunknown(a_sig & b_sig))
      else $error("simplified_compare_logic: a_sig and b_sig overlap");
  end

endmodule
