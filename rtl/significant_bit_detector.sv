// significant_bit_detector -- first stage of the two-stage magnitude comparator.
//
// For every bit position it keeps a 1 of one operand only where the other
// operand holds a 0 there: a_sig[i] = a[i] & ~b[i], b_sig[i] = b[i] & ~a[i].
// A 1 that faces a 1 cannot decide the comparison and is dropped. The two
// flag vectors are therefore never 1 in the same position, and the most
// significant flag (if any) marks the first bit where the operands differ.
// Unlike a priority-based comparator, lower flags are not cleared here or
// anywhere else; the next stage masks them instead.
//
// Interface: a, b (WIDTH bits, unsigned) in; a_sig, b_sig (WIDTH bits) out.
// Timing: purely combinational, no clock.
//
// The per-bit rule follows the published design; the WIDTH parameter is an
// addition of this implementation (the published comparator is 4 bits wide).
module significant_bit_detector #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] a_sig,
  output logic [WIDTH-1:0] b_sig
);

  always_comb begin
    a_sig = a & ~b;
    b_sig = b & ~a;
  end

endmodule
