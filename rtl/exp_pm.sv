// exp_pm: four-stage pipelined approximation of e^z for -10.397 <= z <= 10.397
// (the combined e^+z / e^-z unit).
//
// The magnitude a = |z| goes through the usual reduction N = floor(a * 32/ln2),
// m = N[8:5], j = N[4:0]; the sign s of z steers three places:
//   * the table is addressed by {s, j}: 2^(-j/32) when s = 1, 2^(+j/32) else;
//   * m is XORed with s before the decoder, and the decoder word is moved one
//     place right only when s = 1, so the word is 2^m (s15.0) or 2^-m (s1.14);
//   * the composited-error adder forms 1 + r (s = 0) or 1 - r (s = 1), with
//     r = a - N * ln2/32 in s1.14 and ln2/32 held in s1.18.
// The stair-step product 2^(+-N/32) is cut to 26 bits (five low bits dropped)
// before the last multiplier, whose 41-bit product y is the result.
//
// Because the decoder word changes meaning with the sign, so does y:
//   y_neg = 0 (z >= 0): e^z  = y * 2^-23   (s17.23)
//   y_neg = 1 (z <  0): e^z  = y * 2^-37   (y < 2^37 as e^z <= 1)
// The 41-bit width and the sign-dependent formats follow the published unit;
// the y_neg flag that tells a reader which format applies is this design's.
//
// Timing: one argument per clock, latency four clocks, as for the separate
// units. N is truncated (floor). Data registers load only with a valid
// token; the valid chain is reset asynchronously, active low.
module exp_pm
  import csf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  z_t          z,          // s4.11 argument, |z| <= 10.397
  output logic        out_valid,
  output logic        y_neg,      // format of y: 1 when z was negative
  output logic [40:0] y           // e^z, see formats above
);

  // ---------------- clock 1: |z|, N = floor(|z| * 32/ln2) ----------------
  logic               s_c;
  z_t                 a_c;
  logic signed [31:0] p1;
  n_t                 n_c;
  assign s_c = z[Z_W-1];
  assign a_c = s_c ? -z : z;
  assign p1  = a_c * C1;
  assign n_c = p1[P1_FRAC +: N_W];

  logic v1, s1;
  n_t   n1;
  z_t   a1;

  // ---------------- clock 2: zn, decoder, table ----------------
  logic signed [30:0] zn_full;            // N * ln2/32, 18 fraction bits
  logic [3:0]         m_x;
  logic [15:0]        dec;
  logic signed [15:0] lut_c;
  assign zn_full = n1 * C2_Q18;
  assign m_x     = n1[J_W +: M_W] ^ {M_W{s1}};

  pow2_decoder u_dec (.m(m_x), .onehot(dec));
  exp2_frac_lut u_lut (.neg(s1), .j(n1[J_W-1:0]), .frac(lut_c));

  logic               v2, s2;
  logic signed [20:0] zn2;                // s4.16
  logic [15:0]        pw2;                // 2^m (s15.0) or 2^-m (s1.14)
  logic signed [15:0] lut2;               // 2^(+-j/32), s1.14
  z_t                 a2;

  // ---------------- clock 3: CEF add/sub and SSF ----------------
  logic signed [21:0] r_full;             // a - zn, 16 fraction bits
  logic signed [15:0] r_c;                // s1.14
  logic signed [16:0] x_c;
  logic signed [32:0] ssf_full;
  assign r_full   = (22'(a2) <<< 5) - 22'(zn2);
  assign r_c      = r_full[17:2];
  assign x_c      = s2 ? 17'sd16384 - 17'(r_c) : 17'sd16384 + 17'(r_c);
  assign ssf_full = $signed({1'b0, pw2}) * lut2;

  logic               v3, s3;
  logic signed [15:0] x3;                 // 1 +- r, s1.14
  logic signed [25:0] ssf3;               // 2^(+-N/32), s16.9 for z >= 0

  // ---------------- clock 4: product ----------------
  logic signed [41:0] y_full;
  assign y_full = x3 * ssf3;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      v3        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      v3        <= v2;
      out_valid <= v3;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      n1 <= n_c;
      a1 <= a_c;
      s1 <= s_c;
    end
    if (v1) begin
      zn2  <= zn_full[22:2];
      pw2  <= s1 ? (dec >> 1) : dec;
      lut2 <= lut_c;
      a2   <= a1;
      s2   <= s1;
    end
    if (v2) begin
      x3   <= x_c[15:0];
      ssf3 <= ssf_full[30:5];
      s3   <= s2;
    end
    if (v3) begin
      y     <= y_full[40:0];
      y_neg <= s3;
    end
  end

endmodule
