// exp2_frac_lut: table of the fractional powers of two used by the
// stair-step segment of the exponential units.
//
// It holds 64 words of s1.14 fixed point. Address {neg, j} returns
//   neg = 0 : round(2^14 * 2^(+j/32))   (e^+z)
//   neg = 1 : round(2^14 * 2^(-j/32))   (e^-z)
// for j = 0..31, so every entry lies in (0.5, 2) and fits in 16 signed bits.
// The 32-entry halves are the "LUT[j]" boxes of the separate e^-z and e^+z
// pipelines; the 64-entry form, addressed by the sign of the argument and
// the remainder j, is the table of the combined e^+-z unit. The table is
// purely combinational (a ROM); the units register its output.
module exp2_frac_lut (
  input  logic                 neg,   // 1: 2^(-j/32), 0: 2^(+j/32)
  input  logic [4:0]           j,     // remainder N mod 32
  output logic signed [15:0]   frac   // s1.14
);

  always_comb begin
    unique case ({neg, j})
      6'd0 : frac = 16'd16384;
      6'd1 : frac = 16'd16743;
      6'd2 : frac = 16'd17109;
      6'd3 : frac = 16'd17484;
      6'd4 : frac = 16'd17867;
      6'd5 : frac = 16'd18258;
      6'd6 : frac = 16'd18658;
      6'd7 : frac = 16'd19066;
      6'd8 : frac = 16'd19484;
      6'd9 : frac = 16'd19911;
      6'd10: frac = 16'd20347;
      6'd11: frac = 16'd20792;
      6'd12: frac = 16'd21247;
      6'd13: frac = 16'd21713;
      6'd14: frac = 16'd22188;
      6'd15: frac = 16'd22674;
      6'd16: frac = 16'd23170;
      6'd17: frac = 16'd23678;
      6'd18: frac = 16'd24196;
      6'd19: frac = 16'd24726;
      6'd20: frac = 16'd25268;
      6'd21: frac = 16'd25821;
      6'd22: frac = 16'd26386;
      6'd23: frac = 16'd26964;
      6'd24: frac = 16'd27554;
      6'd25: frac = 16'd28158;
      6'd26: frac = 16'd28774;
      6'd27: frac = 16'd29405;
      6'd28: frac = 16'd30048;
      6'd29: frac = 16'd30706;
      6'd30: frac = 16'd31379;
      6'd31: frac = 16'd32066;
      6'd32: frac = 16'd16384;
      6'd33: frac = 16'd16033;
      6'd34: frac = 16'd15689;
      6'd35: frac = 16'd15353;
      6'd36: frac = 16'd15024;
      6'd37: frac = 16'd14702;
      6'd38: frac = 16'd14387;
      6'd39: frac = 16'd14079;
      6'd40: frac = 16'd13777;
      6'd41: frac = 16'd13482;
      6'd42: frac = 16'd13193;
      6'd43: frac = 16'd12910;
      6'd44: frac = 16'd12634;
      6'd45: frac = 16'd12363;
      6'd46: frac = 16'd12098;
      6'd47: frac = 16'd11839;
      6'd48: frac = 16'd11585;
      6'd49: frac = 16'd11337;
      6'd50: frac = 16'd11094;
      6'd51: frac = 16'd10856;
      6'd52: frac = 16'd10624;
      6'd53: frac = 16'd10396;
      6'd54: frac = 16'd10173;
      6'd55: frac = 16'd9955;
      6'd56: frac = 16'd9742;
      6'd57: frac = 16'd9533;
      6'd58: frac = 16'd9329;
      6'd59: frac = 16'd9129;
      6'd60: frac = 16'd8933;
      6'd61: frac = 16'd8742;
      6'd62: frac = 16'd8555;
      6'd63: frac = 16'd8371;
      default: frac = 16'd16384;
    endcase
  end

endmodule
