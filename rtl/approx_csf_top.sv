// approx_csf_top: the four table-driven function units side by side.
//
//   exp_neg    : e^-z for 0 <= z <= 10.397, four clocks, s1.30 result.
//   exp_pos    : e^+z for 0 <= z <= 10.397, four clocks, s17.14 result.
//   exp_pm     : e^z for |z| <= 10.397, four clocks, 41-bit result whose
//                binary point depends on the sign of z (exp_y_neg).
//   hyperbolic : sinh(z) or cosh(z) for |z| <= 10.397, five clocks, s17.14.
//
// The units are separate architectures, each for its own range or function,
// so each has its own argument, valid and result ports (prefixes neg_, pos_,
// exp_ and hyp_) and they can be used independently. All take one s4.11
// argument per clock and share only the clock and the asynchronous
// active-low reset. Every unit keeps its default parameters. Each unit
// follows its published architecture; collecting them in one top, with these
// port names, is this design's own arrangement.
module approx_csf_top
  import csf_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,

  // e^-z
  input  logic        neg_in_valid,
  input  z_t          neg_z,
  output logic        neg_out_valid,
  output logic [31:0] neg_y,

  // e^+z
  input  logic        pos_in_valid,
  input  z_t          pos_z,
  output logic        pos_out_valid,
  output logic [31:0] pos_y,

  // e^z, both signs
  input  logic        exp_in_valid,
  input  z_t          exp_z,
  output logic        exp_out_valid,
  output logic        exp_y_neg,
  output logic [40:0] exp_y,

  // sinh / cosh
  input  logic        hyp_in_valid,
  input  z_t          hyp_z,
  input  logic        hyp_cosh_sel,
  output logic        hyp_out_valid,
  output logic [31:0] hyp_y
);

  exp_neg u_exp_neg (
    .clk(clk), .rst_n(rst_n),
    .in_valid(neg_in_valid), .z(neg_z),
    .out_valid(neg_out_valid), .y(neg_y)
  );

  exp_pos u_exp_pos (
    .clk(clk), .rst_n(rst_n),
    .in_valid(pos_in_valid), .z(pos_z),
    .out_valid(pos_out_valid), .y(pos_y)
  );

  exp_pm u_exp_pm (
    .clk(clk), .rst_n(rst_n),
    .in_valid(exp_in_valid), .z(exp_z),
    .out_valid(exp_out_valid), .y_neg(exp_y_neg), .y(exp_y)
  );

  hyperbolic u_hyperbolic (
    .clk(clk), .rst_n(rst_n),
    .in_valid(hyp_in_valid), .z(hyp_z), .cosh_sel(hyp_cosh_sel),
    .out_valid(hyp_out_valid), .y(hyp_y)
  );

endmodule
