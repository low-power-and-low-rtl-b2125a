// exp2_frac_lut_tb: checks all 64 words of the fractional-power table.
//
// For every address {neg, j} the word must equal 2^14 * 2^(+-j/32) rounded to
// nearest, with the power computed here in real arithmetic. The table is
// combinational, so each address is applied and read back after a short
// delay.
`timescale 1ns/1ps
module exp2_frac_lut_tb;

  logic               neg;
  logic [4:0]         j;
  logic signed [15:0] frac;

  int checks = 0, failures = 0;

  exp2_frac_lut dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 64; a++) begin
      real want, err;
      neg = a[5];
      j   = a[4:0];
      #1;
      want = 16384.0 * (2.0 ** ((neg ? -1.0 : 1.0) * real'(j) / 32.0));
      err  = real'(frac) - want;
      checks++;
      if (err > 0.5 || err < -0.5) begin
        failures++;
        $display("FAIL: neg=%0d j=%0d got %0d want %f", neg, j, frac, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
