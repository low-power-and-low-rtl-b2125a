// exp_pm_tb: exhaustive check of the combined e^+-z pipeline.
//
// Every s4.11 code from -10.397 to +10.397 is applied, one per clock with
// occasional idle cycles. The 41-bit result is read with the format its
// y_neg flag names (2^-23 for z >= 0, 2^-37 for z < 0) and compared with e^z
// in real arithmetic: the error must stay within REL_TOL * e^z + ABS_TOL.
// ABS_TOL covers the nine fraction bits the stair-step product keeps near
// e^0. The flag itself must equal the sign of the argument, and each result
// must arrive four clocks after its argument.
`timescale 1ns/1ps
module exp_pm_tb;
  import csf_pkg::*;

  localparam real REL_TOL = 1.0e-3;
  localparam real ABS_TOL = 2.5e-3;
  localparam int  LATENCY = 4;
  localparam int  Z_LAST  = 21293;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  z_t          z;
  logic        out_valid;
  logic        y_neg;
  logic [40:0] y;

  int checks = 0, failures = 0;
  int cycle = 0;

  exp_pm dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int code; int t; } tag_t;
  tag_t pend[$];
  real  amax_pos = 0.0, amax_neg = 0.0, rmax = 0.0;
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
    for (int c = -Z_LAST; c <= Z_LAST; c++) begin
      @(posedge clk);
      if (c % 101 == 3) begin
        #1 in_valid = 1'b0;
        @(posedge clk);
      end
      #1 in_valid = 1'b1; z = z_t'(c);
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (LATENCY + 3) @(posedge clk);
    checks++;
    if (pend.size() != 0 || nres != 2 * Z_LAST + 1) begin
      failures++;
      $display("FAIL: %0d results of %0d", nres, 2 * Z_LAST + 1);
    end
    $display("e^z over [-10.397, 0): max abs err %e", amax_neg);
    $display("e^z over [0, 10.397]: max abs err %f, max rel err %e", amax_pos, rmax);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && in_valid) pend.push_back('{int'(z), cycle});

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      tag_t tg;
      real  got, want, err;
      checks++;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL: result without argument");
      end else begin
        tg   = pend.pop_front();
        want = $exp(real'(tg.code) / 2048.0);
        got  = real'(y) / (y_neg ? 2.0 ** 37 : 2.0 ** 23);
        err  = got - want;
        if (err < 0.0) err = -err;
        nres++;
        if (tg.code < 0) begin
          if (err > amax_neg) amax_neg = err;
        end else begin
          if (err > amax_pos) amax_pos = err;
          if (err / want > rmax) rmax = err / want;
        end
        checks++;
        if (err > REL_TOL * want + ABS_TOL) begin
          failures++;
          if (failures < 10) $display("FAIL: z=%f got %f want %f", tg.code / 2048.0, got, want);
        end
        checks++;
        if (y_neg != (tg.code < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL: y_neg wrong for z=%f", tg.code / 2048.0);
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
