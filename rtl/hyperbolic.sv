// hyperbolic: five-stage pipelined sinh(z) / cosh(z) for -10.397 <= z <= 10.397.
//
// An e^-a and an e^+a datapath (a = |z|) run side by side and share their
// front end: one multiplier forms N = floor(a * 32/ln2) and one multiplier
// zn = N * ln2/32. Each branch then has its own decoder, table half and
// composited-error adder, its own stair-step multiplier and its own final
// multiplier, six multipliers in all:
//   e^-a = 2^-m * 2^-(j/32) * (1 - eps)    (s1.30)
//   e^+a = 2^+m * 2^+(j/32) * (1 + eps)    (s17.14)
// In the fifth clock one add/sub unit forms e^a + e^-a (cosh) or e^a - e^-a
// (sinh), and a one-place shift halves it:
//   sinh(z) = (e^z - e^-z) / 2,  cosh(z) = (e^z + e^-z) / 2.
// e^-a is aligned to s17.14 by dropping sixteen low bits; y is s17.14.
//
// Interface: cosh_sel = 1 selects cosh, 0 selects sinh. cosh_sel is sampled
// with z and travels down the pipeline with it, so the choice may change
// every clock. One argument per clock; y and out_valid follow in_valid by
// five clocks:
//   clock 1: |z|, a * 32/ln2, N
//   clock 2: zn = N * ln2/32 (shared); decoders; table reads
//   clock 3: 1 - eps and 1 + eps; the two stair-step products
//   clock 4: the two final products
//   clock 5: add/sub and shift
//
// The shared front end, the two branches, the formats (eps with 16 fraction
// bits in both branches), the add/sub unit, the final shift and the five
// clocks follow the published unit. C2_FRAC (16 as drawn, or 18) is the
// width of ln2/32. Taking |z| at the input and reversing the subtraction for
// sinh of a negative argument (sinh is odd, cosh is even) is this design's
// way of covering the negative half of the stated input range. Data
// registers load only with a valid token; the valid chain is reset
// asynchronously, active low.
module hyperbolic
  import csf_pkg::*;
#(
  parameter int unsigned C2_FRAC = 16     // fraction bits of ln2/32: 16 or 18
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  z_t          z,          // s4.11 argument, |z| <= 10.397
  input  logic        cosh_sel,   // 1: cosh, 0: sinh
  output logic        out_valid,
  output logic [31:0] y           // sinh(z) or cosh(z), s17.14
);

  if (C2_FRAC != 16 && C2_FRAC != 18) begin : g_bad_c2
    $error("hyperbolic: C2_FRAC must be 16 or 18");
  end

  localparam logic signed [19:0] C2 = (C2_FRAC == 18) ? C2_Q18 : 20'(C2_Q16);

  // ---------------- clock 1: |z|, N = floor(|z| * 32/ln2) ----------------
  z_t                 a_c;
  logic signed [31:0] p1;
  n_t                 n_c;
  assign a_c = z[Z_W-1] ? -z : z;
  assign p1  = a_c * C1;
  assign n_c = p1[P1_FRAC +: N_W];

  logic v1, sg1, sel1;
  n_t   n1;
  z_t   a1;

  // ---------------- clock 2: shared zn; decoders and tables ----------------
  logic signed [30:0] zn_full;            // C2_FRAC fraction bits
  logic [3:0]         m_inv;
  logic [15:0]        dec_n, dec_p;
  logic signed [15:0] lut_n, lut_p;
  assign zn_full = n1 * C2;
  assign m_inv   = ~n1[J_W +: M_W];

  pow2_decoder  u_dec_n (.m(m_inv),          .onehot(dec_n));
  pow2_decoder  u_dec_p (.m(n1[J_W +: M_W]), .onehot(dec_p));
  exp2_frac_lut u_lut_n (.neg(1'b1), .j(n1[J_W-1:0]), .frac(lut_n));
  exp2_frac_lut u_lut_p (.neg(1'b0), .j(n1[J_W-1:0]), .frac(lut_p));

  logic               v2, sg2, sel2;
  logic signed [20:0] zn2;                // s4.16
  logic [15:0]        recip2;             // 2^-m, s1.14
  logic [15:0]        pow2;               // 2^m, s15.0
  logic signed [15:0] lutn2, lutp2;       // 2^-(j/32), 2^(j/32), s1.14
  z_t                 a2;

  // ---------------- clock 3: CEF pair and SSF pair ----------------
  logic signed [22:0] eps_full;           // a - zn, 16 fraction bits
  logic signed [22:0] xn_full, xp_full;
  logic signed [32:0] ssfn_full, ssfp_full;
  assign eps_full  = (23'(a2) <<< 5) - 23'(zn2);
  assign xn_full   = 23'sd65536 - eps_full;                     // 1 - eps
  assign xp_full   = 23'sd65536 + eps_full;                     // 1 + eps
  assign ssfn_full = $signed({1'b0, recip2}) * lutn2;           // 28 fraction bits
  assign ssfp_full = $signed({1'b0, pow2}) * lutp2;             // s16.14

  logic               v3, sg3, sel3;
  logic signed [17:0] xn3, xp3;           // 1 - eps, 1 + eps, s1.16
  logic signed [15:0] ssfn3;              // 2^-(N/32), s1.14
  logic signed [31:0] ssfp3;              // 2^(N/32), s16.14

  // ---------------- clock 4: final products ----------------
  logic signed [33:0] en_full;            // 30 fraction bits
  logic signed [49:0] ep_full;            // 30 fraction bits
  assign en_full = xn3 * ssfn3;
  assign ep_full = xp3 * ssfp3;

  logic               v4, sg4, sel4;
  logic [31:0]        en4;                // e^-a, s1.30
  logic [31:0]        ep4;                // e^+a, s17.14

  // ---------------- clock 5: add/sub and shift ----------------
  logic signed [32:0] ep_a, en_a, sum;
  assign ep_a = 33'(signed'(ep4));
  assign en_a = 33'(signed'(en4[31:16]));  // s1.30 -> 14 fraction bits

  always_comb begin
    if (sel4)     sum = ep_a + en_a;        // cosh
    else if (sg4) sum = en_a - ep_a;        // sinh, z < 0
    else          sum = ep_a - en_a;        // sinh, z >= 0
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      v2        <= 1'b0;
      v3        <= 1'b0;
      v4        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      v2        <= v1;
      v3        <= v2;
      v4        <= v3;
      out_valid <= v4;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      n1   <= n_c;
      a1   <= a_c;
      sg1  <= z[Z_W-1];
      sel1 <= cosh_sel;
    end
    if (v1) begin
      zn2    <= zn_full[(C2_FRAC-16) +: 21];
      recip2 <= dec_n >> 1;
      pow2   <= dec_p;
      lutn2  <= lut_n;
      lutp2  <= lut_p;
      a2     <= a1;
      sg2    <= sg1;
      sel2   <= sel1;
    end
    if (v2) begin
      xn3   <= xn_full[17:0];
      xp3   <= xp_full[17:0];
      ssfn3 <= ssfn_full[T_FRAC +: 16];
      ssfp3 <= ssfp_full[31:0];
      sg3   <= sg2;
      sel3  <= sel2;
    end
    if (v3) begin
      en4  <= en_full[31:0];
      ep4  <= ep_full[16 +: 32];
      sg4  <= sg3;
      sel4 <= sel3;
    end
    if (v4) begin
      y <= sum[32:1];
    end
  end

endmodule
