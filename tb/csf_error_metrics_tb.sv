// csf_error_metrics_tb: error statistics of the three published
// configurations over uniformly distributed random arguments.
//
// N_SAMPLES uniform random s4.11 arguments (default 10^6) are streamed, one
// per clock, into
//   exp_neg          e^-z,      z in [0, 10.397]
//   exp_pm           e^z,       z in [-10.397, 10.397]
//   hyperbolic       sinh/cosh, z in [-10.397, 10.397], function at random
//                    (default ln2/32 width and the 18-bit option)
// and each result is compared with double-precision arithmetic. For every
// configuration the minimum, maximum and mean error, its standard deviation,
// the mean squared error and the mean absolute error are printed.
//
// Checks: every result within the per-sample bound of the unit testbenches,
// and the mean squared error of each configuration below a ceiling:
//   e^-z                  MSE <= 3.68e-9   (the published figure)
//   e^z                   MSE <= 4.0
//   sinh/cosh, 18-bit C2  MSE <= 4.0
//   sinh/cosh, 16-bit C2  MSE <= 150.0
`timescale 1ns/1ps
module csf_error_metrics_tb;
  import csf_pkg::*;

  localparam int N_SAMPLES = 1000000;
  localparam int Z_LAST    = 21293;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  z_t   zn_arg, zs_arg;           // non-negative / signed argument streams
  logic sel;

  logic        v_en, v_pm, v_h16, v_h18, pm_neg;
  logic [31:0] y_en, y_h16, y_h18;
  logic [40:0] y_pm;

  int checks = 0, failures = 0;

  exp_neg    u_en  (.clk, .rst_n, .in_valid, .z(zn_arg), .out_valid(v_en), .y(y_en));
  exp_pm     u_pm  (.clk, .rst_n, .in_valid, .z(zs_arg), .out_valid(v_pm), .y_neg(pm_neg), .y(y_pm));
  hyperbolic u_h16 (.clk, .rst_n, .in_valid, .z(zs_arg), .cosh_sel(sel), .out_valid(v_h16), .y(y_h16));
  hyperbolic #(.C2_FRAC(18)) u_h18 (.clk, .rst_n, .in_valid, .z(zs_arg), .cosh_sel(sel),
                                    .out_valid(v_h18), .y(y_h18));

  always #5 clk = ~clk;

  // Running statistics of one configuration.
  class stats_c;
    string name;
    real   emin = 1.0e30, emax = -1.0e30, sum = 0.0, sq = 0.0, sabs = 0.0;
    int    n = 0;
    function new(string nm); name = nm; endfunction
    function void add(real e);
      n++;
      sum += e; sq += e * e; sabs += (e < 0.0 ? -e : e);
      if (e < emin) emin = e;
      if (e > emax) emax = e;
    endfunction
    function real mse(); return sq / n; endfunction
    function void show();
      real mean, sd;
      mean = sum / n;
      sd   = $sqrt(sq / n - mean * mean);
      $display("%-22s n=%0d min %e max %e mean %e std %e MSE %e MAE %e",
               name, n, emin, emax, mean, sd, sq / n, sabs / n);
    endfunction
  endclass

  stats_c s_en, s_pm, s_h16, s_h18;

  typedef struct { int zn; int zs; bit c; } arg_t;
  arg_t q_en[$], q_pm[$], q_h[$];

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_en  = new("e^-z (exp_neg)");
    s_pm  = new("e^z (exp_pm)");
    s_h16 = new("sinh/cosh, C2 s1.16");
    s_h18 = new("sinh/cosh, C2 s1.18");
    rst_n = 1'b0; in_valid = 1'b0; zn_arg = '0; zs_arg = '0; sel = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < N_SAMPLES; k++) begin
      @(posedge clk);
      #1 in_valid = 1'b1;
      zn_arg = z_t'($urandom_range(Z_LAST, 0));
      zs_arg = z_t'(int'($urandom_range(2 * Z_LAST, 0)) - Z_LAST);
      sel    = 1'($urandom_range(1, 0));
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (10) @(posedge clk);
    s_en.show(); s_pm.show(); s_h16.show(); s_h18.show();
    checks++; if (s_en.n != N_SAMPLES || s_pm.n != N_SAMPLES || s_h16.n != N_SAMPLES) failures++;
    checks++; if (s_en.mse()  > 3.68e-9) failures++;
    checks++; if (s_pm.mse()  > 4.0)     failures++;
    checks++; if (s_h18.mse() > 4.0)     failures++;
    checks++; if (s_h16.mse() > 150.0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      q_en.push_back('{int'(zn_arg), 0, 1'b0});
      q_pm.push_back('{0, int'(zs_arg), 1'b0});
      q_h.push_back('{0, int'(zs_arg), sel});
    end
  end

  always @(posedge clk) begin
    if (rst_n && v_en) begin
      arg_t a;
      real  want, err;
      a    = q_en.pop_front();
      want = $exp(-real'(a.zn) / 2048.0);
      err  = real'(y_en) / (2.0 ** 30) - want;
      s_en.add(err);
      checks++;
      if (err > 4.0e-4 || err < -4.0e-4) failures++;
    end
    if (rst_n && v_pm) begin
      arg_t a;
      real  want, err, ae;
      a    = q_pm.pop_front();
      want = $exp(real'(a.zs) / 2048.0);
      err  = real'(y_pm) / (pm_neg ? 2.0 ** 37 : 2.0 ** 23) - want;
      s_pm.add(err);
      ae = err < 0.0 ? -err : err;
      checks++;
      if (ae > 1.0e-3 * want + 2.5e-3) failures++;
    end
    if (rst_n && v_h16) begin
      arg_t a;
      real  x, want, e16, e18, ea;
      a    = q_h.pop_front();
      x    = real'(a.zs) / 2048.0;
      want = a.c ? ($exp(x) + $exp(-x)) / 2.0 : ($exp(x) - $exp(-x)) / 2.0;
      ea   = $exp(x < 0.0 ? -x : x);
      e16  = real'(signed'(y_h16)) / 16384.0 - want;
      e18  = real'(signed'(y_h18)) / 16384.0 - want;
      s_h16.add(e16);
      s_h18.add(e18);
      checks++;
      if ((e16 < 0.0 ? -e16 : e16) > 4.0e-3 * ea + 1.0 / 4096.0) failures++;
      checks++;
      if ((e18 < 0.0 ? -e18 : e18) > 1.0e-3 * ea + 1.0 / 4096.0) failures++;
    end
  end

endmodule
