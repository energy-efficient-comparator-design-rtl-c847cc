// tb_proposed_comparator -- exhaustive check of the 4-bit comparator.
//
// Applies all 256 operand pairs and compares g and s with the relational
// operators of the language on the unsigned operands. Counts the greater,
// smaller and equal outcomes and fails if any of them never occurred. A
// watchdog ends the run with a failure if it hangs.
module tb_proposed_comparator;

  localparam int unsigned W = 4;

  logic [W-1:0] a, b;
  logic g, s;
  int checks = 0;
  int failures = 0;
  int n_gt = 0, n_lt = 0, n_eq = 0;

  proposed_comparator dut (.a(a), .b(b), .g(g), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < (1 << W); ia++) begin
      for (int ib = 0; ib < (1 << W); ib++) begin
        a = W'(ia);
        b = W'(ib);
        #1;
        checks++;
        if (g !== (ia > ib) || s !== (ia < ib)) begin
          failures++;
          $display("mismatch a=%0d b=%0d: g=%b s=%b", ia, ib, g, s);
        end
        if (g) n_gt++;
        if (s) n_lt++;
        if (!g && !s) n_eq++;
      end
    end
    checks++;
    if (n_gt == 0 || n_lt == 0 || n_eq == 0) failures++;
    $display("greater=%0d smaller=%0d equal=%0d", n_gt, n_lt, n_eq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
