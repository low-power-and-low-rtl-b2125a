// pow2_decoder: the "DeMux" / decoder of the stair-step segment.
//
// It turns the 4-bit quotient m into a 16-bit one-hot word with bit m set.
// Read as an unsigned integer (s15.0) the word is 2^m. The e^-z units feed
// it the inverted quotient ~m = 15 - m and move the word one place right,
// which leaves bit 14 - m set: read as s1.14 that is 2^-m. A decoder is used
// in place of a shifter, as in the published design. Purely combinational.
module pow2_decoder (
  input  logic [3:0]  m,       // quotient (or its inverse)
  output logic [15:0] onehot   // bit m set, all others clear
);

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      onehot[i] = (m == 4'(i));
    end
  end

endmodule
