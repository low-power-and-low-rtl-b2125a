// exp_pos_tb: exhaustive check of the e^+z pipeline at its widths.
//
// Three instances run side by side: the stand-alone width (EPS_FRAC = 11),
// the width drawn for the e^+z branch of the hyperbolic unit (EPS_FRAC = 16), and that width
// with ln2/32 held to 18 fraction bits (C2_FRAC = 18, tolerance REL_TOL18). Every s4.11 code
// from 0 to 10.397 is applied, one per clock with occasional idle cycles.
// Results (s17.14) are compared with e^z in real arithmetic: the error must
// stay within REL_TOL * e^z + 2^-13 (REL_TOL18 for the 18-bit constant). Each result must arrive four clocks after
// its argument. The worst relative error of each instance is printed.
`timescale 1ns/1ps
module exp_pos_tb;
  import csf_pkg::*;

  localparam real REL_TOL = 4.0e-3;
  localparam real REL_TOL18 = 1.0e-3;
  localparam real ABS_TOL = 1.0 / 8192.0;
  localparam int  LATENCY = 4;
  localparam int  Z_LAST  = 21293;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  z_t          z;
  logic        ov11, ov16, ov18;
  logic [31:0] y11, y16, y18;

  int checks = 0, failures = 0;
  int cycle = 0;

  exp_pos #(.EPS_FRAC(11)) dut11 (.clk, .rst_n, .in_valid, .z, .out_valid(ov11), .y(y11));
  exp_pos #(.EPS_FRAC(16)) dut16 (.clk, .rst_n, .in_valid, .z, .out_valid(ov16), .y(y16));
  exp_pos #(.EPS_FRAC(16), .C2_FRAC(18)) dut18 (.clk, .rst_n, .in_valid, .z, .out_valid(ov18), .y(y18));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int code; int t; } tag_t;
  tag_t pend[$];
  real  rmax11 = 0.0, rmax16 = 0.0, rmax18 = 0.0, amax11 = 0.0, amax16 = 0.0, amax18 = 0.0;
  int   nres = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; z = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c <= Z_LAST; c++) begin
      @(posedge clk);
      if (c % 89 == 7) begin
        #1 in_valid = 1'b0;
        @(posedge clk);
      end
      #1 in_valid = 1'b1; z = z_t'(c);
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (LATENCY + 3) @(posedge clk);
    checks++;
    if (pend.size() != 0 || nres != Z_LAST + 1) begin
      failures++;
      $display("FAIL: %0d results of %0d", nres, Z_LAST + 1);
    end
    $display("e^z, EPS_FRAC=11: max rel err %e, max abs err %f", rmax11, amax11);
    $display("e^z, EPS_FRAC=16: max rel err %e, max abs err %f", rmax16, amax16);
    $display("e^z, EPS_FRAC=16, C2_FRAC=18: max rel err %e, max abs err %f", rmax18, amax18);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid) pend.push_back('{int'(z), cycle});

  function automatic void check_one(string tag, logic [31:0] yy, real want, real rtol,
                                    ref real rmax, ref real amax);
    real got, err;
    got = real'(signed'(yy)) / 16384.0;
    err = got - want;
    if (err < 0.0) err = -err;
    if (err / want > rmax) rmax = err / want;
    if (err > amax) amax = err;
    checks++;
    if (err > rtol * want + ABS_TOL) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %f want %f", tag, got, want);
    end
  endfunction

  always @(posedge clk) begin
    if (rst_n && (ov11 || ov16 || ov18)) begin
      tag_t tg;
      real  want;
      checks++;
      if (ov11 != ov16 || ov11 != ov18 || pend.size() == 0) begin
        failures++;
        $display("FAIL: unexpected result");
      end else begin
        tg   = pend.pop_front();
        want = $exp(real'(tg.code) / 2048.0);
        nres++;
        check_one("11", y11, want, REL_TOL, rmax11, amax11);
        check_one("16", y16, want, REL_TOL, rmax16, amax16);
        check_one("18", y18, want, REL_TOL18, rmax18, amax18);
        checks++;
        if (cycle - tg.t != LATENCY) begin
          failures++;
          if (failures < 10) $display("FAIL: latency %0d", cycle - tg.t);
        end
      end
    end
  end

endmodule
