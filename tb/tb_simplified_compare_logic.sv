// tb_simplified_compare_logic -- exhaustive check of the second comparator stage.
//
// Enumerates every legal pair of flag vectors (each position is: no flag, flag
// of A, or flag of B; 3^4 = 81 pairs). Since the two vectors never overlap,
// the operand whose flag vector is numerically larger owns the most
// significant flag, so the expected g is (a_sig > b_sig) and the expected s is
// (a_sig < b_sig). Also counts how many vectors keep flags of the losing
// operand below the deciding one, the case a priority stage would have
// cleared. A watchdog ends the run with a failure if it hangs.
module tb_simplified_compare_logic;

  localparam int unsigned W = 4;

  logic [W-1:0] a_sig, b_sig;
  logic g, s;
  int checks = 0;
  int failures = 0;
  int low_flags_kept = 0;

  simplified_compare_logic dut (.a_sig(a_sig), .b_sig(b_sig), .g(g), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_pairs;
    n_pairs = 1;
    for (int i = 0; i < W; i++) n_pairs *= 3;
    for (int code = 0; code < n_pairs; code++) begin
      int c;
      c = code;
      for (int i = 0; i < W; i++) begin
        a_sig[i] = (c % 3 == 1);
        b_sig[i] = (c % 3 == 2);
        c /= 3;
      end
      #1;
      checks += 2;
      if (g !== (a_sig > b_sig)) begin
        failures++;
        $display("g mismatch a_sig=%b b_sig=%b got %b", a_sig, b_sig, g);
      end
      if (s !== (a_sig < b_sig)) begin
        failures++;
        $display("s mismatch a_sig=%b b_sig=%b got %b", a_sig, b_sig, s);
      end
      if (a_sig != 0 && b_sig != 0) low_flags_kept++;
    end
    checks++;
    if (low_flags_kept == 0) begin
      failures++;
      $display("no vector with flags on both sides was applied");
    end
    $display("vectors with flags on both sides: %0d", low_flags_kept);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
