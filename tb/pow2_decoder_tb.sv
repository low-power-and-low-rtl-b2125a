// pow2_decoder_tb: checks the quotient decoder for all 16 inputs.
//
// The word must have exactly one bit set, at position m; read as an integer
// it is 2^m, and after the inversion of m and the one-place shift used by the
// e^-z units it must read 2^-m in s1.14 (for m up to 14).
`timescale 1ns/1ps
module pow2_decoder_tb;

  logic [3:0]  m;
  logic [15:0] onehot;

  int checks = 0, failures = 0;

  pow2_decoder dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] inv_word;
    for (int k = 0; k < 16; k++) begin
      m = 4'(k);
      #1;
      checks++;
      if (onehot != 16'(2 ** k)) begin
        failures++;
        $display("FAIL: m=%0d word %h", k, onehot);
      end
      // Second read: ~m, shifted right, must be 2^-m in s1.14.
      m = ~4'(k);
      #1;
      inv_word = onehot >> 1;
      if (k <= 14) begin
        checks++;
        if (real'(inv_word) / 16384.0 != 2.0 ** (-k)) begin
          failures++;
          $display("FAIL: 2^-%0d read %h", k, inv_word);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
