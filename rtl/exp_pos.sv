// exp_pos: four-stage pipelined approximation of e^+z for 0 <= z <= 10.397.
//
// Same reduction as the e^-z unit: N = floor(z * 32/ln2), m = N[8:5],
// j = N[4:0]. The stair-step segment multiplies 2^m (the one-hot decoder
// word read as an s15.0 integer) by 2^(j/32) from the table, giving
// 2^(N/32) in s16.14. The composited-error segment forms 1 + eps with
// eps = z - N * ln2/32, kept with EPS_FRAC fraction bits. The result
// (1 + eps) * 2^(N/32) is returned in s17.14 (32 bits).
//
// EPS_FRAC = 11 is the stand-alone e^+z pipeline (zn and 1 + eps in s4.11 and
// s1.11); EPS_FRAC = 16 gives s4.16 and s1.16, the width drawn for the
// e^+z branch of the hyperbolic unit. Both widths are those of the published
// block diagrams. C2_FRAC sets the fraction bits of ln2/32: 16 as drawn, or
// 18 as in the combined unit. With 16 bits the rounding of the constant,
// multiplied by N up to 479, dominates the error (about 0.33 % at the top of
// the range); 18 bits bring it to about 0.05 %.
//
// Timing: one argument per clock, latency four clocks (z * 32/ln2 and N;
// zn, decoder and table; 1 + eps and 2^m * 2^(j/32); final product).
// N is truncated (floor). Data registers load only with a valid token; the
// valid chain is reset asynchronously, active low.
module exp_pos
  import csf_pkg::*;
#(
  parameter int unsigned EPS_FRAC = 11,   // fraction bits of zn and 1 + eps, 11..16
  parameter int unsigned C2_FRAC  = 16    // fraction bits of ln2/32: 16 or 18
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  z_t          z,          // s4.11 argument, 0 <= z <= 10.397
  output logic        out_valid,
  output logic [31:0] y           // e^+z, s17.14
);

  if (EPS_FRAC < Z_FRAC || EPS_FRAC > 16) begin : g_bad_frac
    $error("exp_pos: EPS_FRAC must lie in 11..16");
  end

  if (C2_FRAC != 16 && C2_FRAC != 18) begin : g_bad_c2
    $error("exp_pos: C2_FRAC must be 16 or 18");
  end

  localparam logic signed [19:0] C2 = (C2_FRAC == 18) ? C2_Q18 : 20'(C2_Q16);
  localparam int unsigned ZN_W = 5 + EPS_FRAC;   // s4.EPS_FRAC
  localparam int unsigned X_W  = 2 + EPS_FRAC;   // s1.EPS_FRAC

  // ---------------- clock 1: N = floor(z * 32/ln2) ----------------
  logic signed [31:0] p1;
  n_t                 n_c;
  assign p1  = z * C1;
  assign n_c = p1[P1_FRAC +: N_W];

  logic v1;
  n_t   n1;
  z_t   z1;

  // ---------------- clock 2: zn, decoder, table ----------------
  logic signed [30:0] zn_full;            // C2_FRAC fraction bits
  logic [15:0]        dec;
  logic signed [15:0] lut_c;
  assign zn_full = n1 * C2;

  pow2_decoder u_dec (.m(n1[J_W +: M_W]), .onehot(dec));
  exp2_frac_lut u_lut (.neg(1'b0), .j(n1[J_W-1:0]), .frac(lut_c));

  logic                  v2;
  logic signed [ZN_W-1:0] zn2;            // s4.EPS_FRAC
  logic [15:0]           pow2;            // 2^m, s15.0
  logic signed [15:0]    lut2;            // 2^(j/32), s1.14
  z_t                    z2;

  // ---------------- clock 3: CEF and SSF ----------------
  logic signed [ZN_W+1:0] x_full;
  logic signed [32:0]     ssf_full;
  assign x_full   = (ZN_W+2)'(1 << EPS_FRAC)
                  + ((ZN_W+2)'(z2) <<< (EPS_FRAC - Z_FRAC))
                  - (ZN_W+2)'(zn2);                           // 1 + z - zn
  assign ssf_full = $signed({1'b0, pow2}) * lut2;              // s16.14

  logic                  v3;
  logic signed [X_W-1:0] x3;              // 1 + eps
  logic signed [31:0]    ssf3;            // 2^(N/32), s16.14

  // ---------------- clock 4: product ----------------
  logic signed [X_W+31:0] y_full;         // 14 + EPS_FRAC fraction bits
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
      z1 <= z;
    end
    if (v1) begin
      zn2  <= zn_full[(C2_FRAC-EPS_FRAC) +: ZN_W];
      pow2 <= dec;
      lut2 <= lut_c;
      z2   <= z1;
    end
    if (v2) begin
      x3   <= x_full[X_W-1:0];
      ssf3 <= ssf_full[31:0];
    end
    if (v3) begin
      y <= y_full[EPS_FRAC +: 32];
    end
  end

endmodule
