// hyperbolic_tb: exhaustive check of the sinh / cosh pipeline.
//
// Every s4.11 code from -10.397 to +10.397 is applied twice, once for cosh
// and once for sinh, alternating the select every clock so that a change of
// function between neighbouring arguments is exercised too. Results (s17.14)
// are compared with sinh(z) or cosh(z) in real arithmetic; the error must stay
// within REL_TOL * e^|z| + ABS_TOL, the bound set by the e^+z branch with the
// 16-bit ln2/32 constant. Each result must arrive five clocks after its
// argument. A second instance with the 18-bit constant is held to REL_TOL18.
`timescale 1ns/1ps
module hyperbolic_tb;
  import csf_pkg::*;

  localparam real REL_TOL   = 4.0e-3;
  localparam real REL_TOL18 = 1.0e-3;
  localparam real ABS_TOL   = 1.0 / 4096.0;
  localparam int  LATENCY   = 5;
  localparam int  Z_LAST    = 21293;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  z_t          z;
  logic        cosh_sel;
  logic        out_valid, ov18;
  logic [31:0] y, y18;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_cosh = 0, n_sinh_pos = 0, n_sinh_neg = 0;

  hyperbolic dut (.*);
  hyperbolic #(.C2_FRAC(18)) dut18 (.clk, .rst_n, .in_valid, .z, .cosh_sel,
                                    .out_valid(ov18), .y(y18));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int code; bit c; int t; } tag_t;
  tag_t pend[$];
  real  amax = 0.0, amax18 = 0.0;
  int   nres = 0;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; z = '0; cosh_sel = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = -Z_LAST; c <= Z_LAST; c++) begin
      for (int f = 0; f < 2; f++) begin
        @(posedge clk);
        #1 in_valid = 1'b1; z = z_t'(c); cosh_sel = f[0];
      end
      if (c % 113 == 0) begin
        @(posedge clk);
        #1 in_valid = 1'b0;
      end
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (LATENCY + 3) @(posedge clk);
    checks++;
    if (pend.size() != 0 || nres != 2 * (2 * Z_LAST + 1)) begin
      failures++;
      $display("FAIL: %0d results", nres);
    end
    checks++;
    if (n_cosh == 0 || n_sinh_pos == 0 || n_sinh_neg == 0) failures++;
    $display("sinh/cosh, 16-bit ln2/32: max abs err %f", amax);
    $display("sinh/cosh, 18-bit ln2/32: max abs err %f", amax18);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid) pend.push_back('{int'(z), cosh_sel, cycle});

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      tag_t tg;
      real  x, want, got, got18, err, err18, ea;
      checks++;
      if (pend.size() == 0 || ov18 != out_valid) begin
        failures++;
        $display("FAIL: unexpected result");
      end else begin
        tg   = pend.pop_front();
        x    = real'(tg.code) / 2048.0;
        want = tg.c ? ($exp(x) + $exp(-x)) / 2.0 : ($exp(x) - $exp(-x)) / 2.0;
        ea   = $exp(x < 0.0 ? -x : x);
        got   = real'(signed'(y)) / 16384.0;
        got18 = real'(signed'(y18)) / 16384.0;
        err   = got - want;   if (err < 0.0) err = -err;
        err18 = got18 - want; if (err18 < 0.0) err18 = -err18;
        if (err > amax) amax = err;
        if (err18 > amax18) amax18 = err18;
        if (tg.c) n_cosh++;
        else if (tg.code < 0) n_sinh_neg++;
        else n_sinh_pos++;
        nres++;
        checks++;
        if (err > REL_TOL * ea + ABS_TOL) begin
          failures++;
          if (failures < 10) $display("FAIL: %s z=%f got %f want %f", tg.c ? "cosh" : "sinh", x, got, want);
        end
        checks++;
        if (err18 > REL_TOL18 * ea + ABS_TOL) begin
          failures++;
          if (failures < 10) $display("FAIL(18): %s z=%f got %f want %f", tg.c ? "cosh" : "sinh", x, got18, want);
        end
        checks++;
        if (cycle - tg.t != LATENCY) begin
          failures++;
          if (failures < 10) $display("FAIL: latency %0d", cycle - tg.t);
        end
      end
    end
  end

endmodule
