// tb_comparator16 -- end-to-end check of the 16-bit comparator at its
// default size (16 bits, four 4-bit slices).
//
// Stimulus: corner values, one-bit differences at every position, and random
// pairs whose first differing bit is drawn uniformly over all positions (pure
// random pairs almost always differ in the top bit), plus fully random pairs.
// Expected g, s and eq come from the language's relational operators.
//
// Besides the outcomes it counts, from the operands alone, each mechanism of
// the design and fails if one never happened:
//   - a result of greater, smaller and equal;
//   - each slice being the one that decides the result;
//   - the deciding slice holding flags of the losing operand below the
//     deciding bit (kept, not cleared, by the design);
//   - a less significant slice whose own verdict is the opposite of the
//     final one (overruled by the slice merge).
// A watchdog ends the run with a failure if it hangs.
module tb_comparator16;

  localparam int unsigned W      = 16;
  localparam int unsigned S      = 4;
  localparam int unsigned NSLICE = W / S;
  localparam int unsigned NRAND  = 200000;

  logic [W-1:0] a, b;
  logic g, s, eq;
  int checks = 0;
  int failures = 0;

  int n_gt = 0, n_lt = 0, n_eq = 0;
  int n_slice_decides [NSLICE];
  int n_low_flags_kept = 0;
  int n_lower_slice_overruled = 0;

  comparator16 dut (.a(a), .b(b), .g(g), .s(s), .eq(eq));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] va, input logic [W-1:0] vb);
    int top_diff;
    int dslice;
    a = va;
    b = vb;
    #1;
    checks++;
    if (g !== (va > vb) || s !== (va < vb) || eq !== (va == vb)) begin
      failures++;
      if (failures < 20)
        $display("mismatch a=%h b=%h: g=%b s=%b eq=%b", va, vb, g, s, eq);
    end
    if (va > vb) n_gt++;
    if (va < vb) n_lt++;
    if (va == vb) n_eq++;
    // coverage, worked out from the operands
    top_diff = -1;
    for (int i = W - 1; i >= 0; i--)
      if (va[i] != vb[i] && top_diff < 0) top_diff = i;
    if (top_diff >= 0) begin
      dslice = top_diff / S;
      n_slice_decides[dslice]++;
      for (int i = dslice * S; i < top_diff; i++)
        if (va[i] != vb[i] && va[i] != va[top_diff]) begin
          n_low_flags_kept++;
          break;
        end
      for (int k = 0; k < dslice; k++)
        if ((va[k*S +: S] > vb[k*S +: S]) != (va > vb) &&
            va[k*S +: S] != vb[k*S +: S]) begin
          n_lower_slice_overruled++;
          break;
        end
    end
  endtask

  initial begin
    logic [W-1:0] ra, rb, mask;
    int pos;
    foreach (n_slice_decides[k]) n_slice_decides[k] = 0;
    // corners
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    // single-bit differences at every position
    for (int i = 0; i < W; i++) begin
      ra = W'($urandom);
      apply(ra | (W'(1) << i), ra & ~(W'(1) << i));
      apply(ra & ~(W'(1) << i), ra | (W'(1) << i));
    end
    // first difference drawn uniformly over the positions
    for (int n = 0; n < NRAND; n++) begin
      ra   = W'($urandom);
      pos  = int'($urandom_range(W - 1, 0));
      mask = ~((W'(1) << pos) - W'(1)) & ~(W'(1) << pos);  // bits above pos
      rb   = (ra & mask) | (~ra & (W'(1) << pos)) | (W'($urandom) & ((W'(1) << pos) - W'(1)));
      apply(ra, rb);
      if (n % 64 == 0) apply(ra, ra);
      apply(W'($urandom), W'($urandom));
    end
    // coverage
    checks++;
    if (n_gt == 0 || n_lt == 0 || n_eq == 0) begin
      failures++;
      $display("an outcome never occurred");
    end
    for (int k = 0; k < NSLICE; k++) begin
      checks++;
      if (n_slice_decides[k] == 0) begin
        failures++;
        $display("slice %0d never decided", k);
      end
      $display("slice %0d decided %0d times", k, n_slice_decides[k]);
    end
    checks++;
    if (n_low_flags_kept == 0) begin
      failures++;
      $display("losing operand never had flags below the deciding bit");
    end
    checks++;
    if (n_lower_slice_overruled == 0) begin
      failures++;
      $display("a lower slice was never overruled");
    end
    $display("greater=%0d smaller=%0d equal=%0d low_flags_kept=%0d lower_slice_overruled=%0d",
             n_gt, n_lt, n_eq, n_low_flags_kept, n_lower_slice_overruled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
