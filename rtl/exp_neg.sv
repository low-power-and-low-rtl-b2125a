// exp_neg: four-stage pipelined approximation of e^-z for 0 <= z <= 10.397.
//
// The argument z (s4.11) is scaled by 32/ln2 and its integer part N is kept.
// Two segments then work side by side:
//   stair-step (SSF)   : 2^-(N/32) = 2^-m * 2^-(j/32), with m = N[8:5] and
//                        j = N[4:0]; 2^-m comes from a one-hot decoder fed
//                        with ~m and moved one place right, 2^-(j/32) from
//                        the table; one multiplier joins them (s1.14).
//   composited error (CEF): 1 - eps = 1 + zn - z with zn = N * ln2/32 (s1.16).
// The product of the two is e^-z, since e^-eps ~= 1 - eps (the quadratic
// term is left out on purpose: it saves a multiplier and an adder).
//
// Timing: one argument per clock; y holds the result of the argument taken
// with in_valid four rising edges earlier, flagged by out_valid. With
// PIPELINED = 0 the three inner register stages are left out and the result
// follows one clock after its argument, at a lower clock rate (the published
// design mentions such a non-pipelined version, run at half the clock rate).
//   clock 1: z * 32/ln2, integer part N
//   clock 2: zn = N * ln2/32, decoder, table read
//   clock 3: 1 - eps, 2^-m * 2^-(j/32)
//   clock 4: final product, y in s1.30
// The stage split, the formats and the decoder follow the published design.
// C2_FRAC sets the fraction bits of the constant ln2/32: 16 as drawn for
// this unit, or 18 as in the combined e^+-z unit, which lowers the error of
// zn for large N. N is taken by truncation (floor), so 0 <= eps < ln2/32 up
// to constant rounding; data registers load only with a valid token (no reset needed),
// the valid chain is reset asynchronously, active low.
module exp_neg
  import csf_pkg::*;
#(
  parameter int unsigned C2_FRAC   = 16,   // fraction bits of ln2/32: 16 or 18
  parameter bit          PIPELINED = 1'b1  // 0: one clock, no stage registers
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  z_t          z,          // s4.11 argument, 0 <= z <= 10.397
  output logic        out_valid,
  output logic [31:0] y           // e^-z, s1.30
);

  if (C2_FRAC != 16 && C2_FRAC != 18) begin : g_bad_c2
    $error("exp_neg: C2_FRAC must be 16 or 18");
  end

  localparam logic signed [19:0] C2 = (C2_FRAC == 18) ? C2_Q18 : 20'(C2_Q16);

  // ---------------- clock 1: N = floor(z * 32/ln2) ----------------
  logic signed [31:0] p1;
  n_t                 n_c;
  assign p1  = z * C1;                    // s10.20
  assign n_c = p1[P1_FRAC +: N_W];

  logic v1;
  n_t   n1;
  z_t   z1;

  // ---------------- clock 2: zn, decoder, table ----------------
  logic signed [30:0] zn_full;            // N * ln2/32, C2_FRAC fraction bits
  logic [3:0]         m_inv;
  logic [15:0]        dec;
  logic signed [15:0] lut_c;
  assign zn_full = n1 * C2;
  assign m_inv   = ~n1[J_W +: M_W];

  pow2_decoder u_dec (.m(m_inv), .onehot(dec));
  exp2_frac_lut u_lut (.neg(1'b1), .j(n1[J_W-1:0]), .frac(lut_c));

  logic               v2;
  logic signed [20:0] zn2;                // s4.16
  logic [15:0]        recip2;             // 2^-m, s1.14
  logic signed [15:0] lut2;               // 2^-(j/32), s1.14
  z_t                 z2;

  // ---------------- clock 3: CEF and SSF ----------------
  logic signed [22:0] x_full;
  logic signed [32:0] ssf_full;
  assign x_full   = 23'sd65536 + 23'(zn2) - (23'(z2) <<< 5);  // 1 + zn - z
  assign ssf_full = $signed({1'b0, recip2}) * lut2;            // 28 fraction bits

  logic               v3;
  logic signed [17:0] x3;                 // 1 - eps, s1.16
  logic signed [15:0] ssf3;               // 2^-(N/32), s1.14

  // ---------------- clock 4: product ----------------
  logic signed [33:0] y_full;             // 30 fraction bits
  assign y_full = x3 * ssf3;

  if (PIPELINED) begin : g_pipe
    // Registers at the ends of clocks 1, 2 and 3.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v1 <= 1'b0;
        v2 <= 1'b0;
        v3 <= 1'b0;
      end else begin
        v1 <= in_valid;
        v2 <= v1;
        v3 <= v2;
      end
    end

    always_ff @(posedge clk) begin
      if (in_valid) begin
        n1 <= n_c;
        z1 <= z;
      end
      if (v1) begin
        zn2    <= zn_full[(C2_FRAC-16) +: 21];
        recip2 <= dec >> 1;
        lut2   <= lut_c;
        z2     <= z1;
      end
      if (v2) begin
        x3   <= x_full[17:0];
        ssf3 <= ssf_full[T_FRAC +: 16];
      end
    end
  end else begin : g_flat
    // Same datapath, one combinational path into the output register.
    always_comb begin
      v1     = in_valid;
      n1     = n_c;
      z1     = z;
      v2     = v1;
      zn2    = zn_full[(C2_FRAC-16) +: 21];
      recip2 = dec >> 1;
      lut2   = lut_c;
      z2     = z1;
      v3     = v2;
      x3     = x_full[17:0];
      ssf3   = ssf_full[T_FRAC +: 16];
    end
  end

  // Output register (clock 4, or the only clock when not pipelined).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v3;
  end

  always_ff @(posedge clk) begin
    if (v3) y <= y_full[31:0];
  end

endmodule
