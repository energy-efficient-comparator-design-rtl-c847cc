// tb_significant_bit_detector -- exhaustive check of the first comparator stage.
//
// Applies every pair of 4-bit operands and checks, bit by bit, that a flag is
// raised exactly where that operand has a 1 and the other a 0. Expected values
// come from a per-bit truth table written out in the testbench. A watchdog
// ends the run with a failure if the stimulus does not finish in time.
module tb_significant_bit_detector;

  localparam int unsigned W = 4;

  logic [W-1:0] a, b, a_sig, b_sig;
  int checks = 0;
  int failures = 0;

  significant_bit_detector dut (.a(a), .b(b), .a_sig(a_sig), .b_sig(b_sig));

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
        for (int i = 0; i < W; i++) begin
          logic exp_a, exp_b;
          // truth table of one position: only (1,0) flags A, only (0,1) flags B
          case ({a[i], b[i]})
            2'b10:   begin exp_a = 1'b1; exp_b = 1'b0; end
            2'b01:   begin exp_a = 1'b0; exp_b = 1'b1; end
            default: begin exp_a = 1'b0; exp_b = 1'b0; end
          endcase
          checks++;
          if (a_sig[i] !== exp_a || b_sig[i] !== exp_b) begin
            failures++;
            $display("mismatch a=%b b=%b bit %0d: got %b%b expected %b%b",
                     a, b, i, a_sig[i], b_sig[i], exp_a, exp_b);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
