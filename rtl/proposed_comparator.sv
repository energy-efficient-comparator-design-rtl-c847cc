// proposed_comparator -- 4-bit two-stage magnitude comparator.
//
// The comparator is the significant bit detector followed directly by the
// simplified compare logic. A priority-based comparator puts a third stage
// between these two that isolates the most significant remaining 1 of each
// operand; this design leaves that stage out, because the compare logic can
// decide from the unisolated flags (see simplified_compare_logic).
//
// Interface: a, b (WIDTH bits, unsigned) in; g = (a > b), s = (a < b) out.
// Both outputs are 0 when a == b. Timing: purely combinational, two levels of
// logic after the inputs settle.
//
// The two-block structure and the G/S outputs follow the published design;
// treating the operands as unsigned and parameterising the width are choices
// of this implementation.
module proposed_comparator #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             g,
  output logic             s
);

  logic [WIDTH-1:0] a_sig;
  logic [WIDTH-1:0] b_sig;

  significant_bit_detector #(.WIDTH(WIDTH)) u_detect (
    .a     (a),
    .b     (b),
    .a_sig (a_sig),
    .b_sig (b_sig)
  );

  simplified_compare_logic #(.WIDTH(WIDTH)) u_compare (
    .a_sig (a_sig),
    .b_sig (b_sig),
    .g     (g),
    .s     (s)
  );

endmodule
