// exp_neg_tb: exhaustive check of the e^-z pipeline.
//
// Every s4.11 code from 0 up to 10.397 is applied, one per clock with an
// occasional idle cycle. Each result is compared with e^-z computed in real
// arithmetic; the absolute error must stay below ABS_TOL. The testbench also
// checks that each result arrives exactly four clocks after its argument and
// prints the error statistics (max, min, mean, MSE) over the sweep. A second
// instance built without pipeline registers (PIPELINED = 0) gets the same
// arguments and must meet the same bound one clock after each argument.
`timescale 1ns/1ps
module exp_neg_tb;
  import csf_pkg::*;

  localparam real ABS_TOL = 4.0e-4;
  localparam int  LATENCY = 4;
  localparam int  Z_LAST  = 21293;        // floor(10.397 * 2^11)

  logic        clk = 1'b0;
  logic        rst_n;
  logic        in_valid;
  z_t          z;
  logic        out_valid;
  logic [31:0] y;

  int checks = 0, failures = 0;
  int cycle = 0;

  exp_neg dut (.*);

  // Non-pipelined variant: same results, one clock of latency.
  logic        out_valid_f;
  logic [31:0] y_f;
  exp_neg #(.PIPELINED(1'b0)) dut_flat (.clk, .rst_n, .in_valid, .z,
                                        .out_valid(out_valid_f), .y(y_f));

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int code; int t; } tag_t;
  tag_t pend[$], pend_f[$];
  int   nres_f = 0;

  real emax = -1.0, emin = 1.0, esum = 0.0, esq = 0.0;
  int  nres = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Driver.
  initial begin
    rst_n = 1'b0; in_valid = 1'b0; z = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c <= Z_LAST; c++) begin
      @(posedge clk);
      if (c % 97 == 5) begin
        #1 in_valid = 1'b0;
        @(posedge clk);
      end
      #1 in_valid = 1'b1; z = z_t'(c);
    end
    @(posedge clk);
    #1 in_valid = 1'b0;
    repeat (LATENCY + 3) @(posedge clk);
    if (pend.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", pend.size());
    end
    checks++;
    if (nres != Z_LAST + 1 || nres_f != Z_LAST + 1 || pend_f.size() != 0) failures++;
    $display("e^-z over [0, 10.397]: max err %e, min err %e, mean %e, MSE %e",
             emax, emin, esum / nres, esq / nres);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Record arguments as they are taken.
  always @(posedge clk) begin
    if (rst_n && in_valid) begin
      pend.push_back('{int'(z), cycle});
      pend_f.push_back('{int'(z), cycle});
    end
  end

  // The non-pipelined instance must give the same word one clock later.
  always @(posedge clk) begin
    if (rst_n && out_valid_f) begin
      tag_t tg;
      real  got, want, err;
      checks++;
      if (pend_f.size() == 0) begin
        failures++;
      end else begin
        tg   = pend_f.pop_front();
        got  = real'(y_f) / (2.0 ** 30);
        want = $exp(-real'(tg.code) / 2048.0);
        err  = got - want;
        nres_f++;
        checks++;
        if (err > ABS_TOL || err < -ABS_TOL) failures++;
        checks++;
        if (cycle - tg.t != 1) begin
          failures++;
          if (failures < 10) $display("FAIL: flat latency %0d", cycle - tg.t);
        end
      end
    end
  end

  // Compare results.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      tag_t tg;
      real  got, want, err;
      if (pend.size() == 0) begin
        failures++;
        $display("FAIL: result without argument");
      end else begin
        tg   = pend.pop_front();
        got  = real'(y) / (2.0 ** 30);
        want = $exp(-real'(tg.code) / 2048.0);
        err  = got - want;
        nres++;
        esum += err; esq += err * err;
        if (err > emax) emax = err;
        if (err < emin) emin = err;
        checks++;
        if (err > ABS_TOL || err < -ABS_TOL) begin
          failures++;
          if (failures < 10) $display("FAIL: z=%f got %f want %f", tg.code / 2048.0, got, want);
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
