// approx_csf_top_tb: end-to-end test of the top with every parameter at its
// default.
//
// All four units receive independent streams of random s4.11 arguments,
// each with its own random idle cycles: e^-z and e^+z in [0, 10.397], e^z and
// sinh/cosh in [-10.397, 10.397] (plus the edge codes 0 and the range ends);
// the hyperbolic stream picks cosh or sinh at random per argument. Every
// result is compared with the real-valued function:
//   e^-z      : error <= 4e-4
//   e^+z      : error <= 4e-3 * e^z + 2^-13
//   e^z       : error <= 1e-3 * e^z + 2.5e-3 (format picked by exp_y_neg)
//   sinh/cosh : error <= 4e-3 * e^|z| + 2^-12
// and must arrive after the unit's latency (4, 4, 4 and 5 clocks). The test counts
// how often each mechanism occurs - positive and negative exponent, cosh,
// sinh of a positive and of a negative argument, a function switch between
// neighbouring arguments, results on back-to-back clocks, idle gaps - and
// counts a failure for any that never occurs.
`timescale 1ns/1ps
module approx_csf_top_tb;
  import csf_pkg::*;

  localparam int  N_ARGS  = 20000;
  localparam int  Z_LAST  = 21293;
  localparam int  EXP_LAT = 4;
  localparam int  HYP_LAT = 5;

  logic        clk = 1'b0;
  logic        rst_n;
  logic        neg_in_valid, neg_out_valid, pos_in_valid, pos_out_valid;
  z_t          neg_z, pos_z;
  logic [31:0] neg_y, pos_y;
  logic        exp_in_valid, exp_out_valid, exp_y_neg;
  z_t          exp_z;
  logic [40:0] exp_y;
  logic        hyp_in_valid, hyp_cosh_sel, hyp_out_valid;
  z_t          hyp_z;
  logic [31:0] hyp_y;

  int checks = 0, failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_exp_pos = 0, n_exp_neg = 0, n_cosh = 0, n_sinh_pos = 0, n_sinh_neg = 0;
  int n_switch = 0, n_b2b_exp = 0, n_b2b_hyp = 0, n_gap = 0;
  int n_neg = 0, n_pos = 0, n_b2b_neg = 0, n_b2b_pos = 0;

  approx_csf_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  typedef struct { int code; bit c; int t; } tag_t;
  tag_t exp_q[$], hyp_q[$], neg_q[$], pos_q[$];
  int   exp_done = 0, hyp_done = 0, neg_done = 0, pos_done = 0;

  function automatic int rand_code(int k);
    if (k == 0) return 0;
    if (k == 1) return Z_LAST;
    if (k == 2) return -Z_LAST;
    return int'($urandom_range(2 * Z_LAST, 0)) - Z_LAST;
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // e^-z stream
  initial begin
    neg_in_valid = 1'b0; neg_z = '0;
    wait (rst_n);
    for (int k = 0; k < N_ARGS; k++) begin
      @(posedge clk);
      if ($urandom_range(9, 0) == 0) begin
        #1 neg_in_valid = 1'b0;
        n_gap++;
        @(posedge clk);
      end
      #1 neg_in_valid = 1'b1;
      neg_z = z_t'(k == 0 ? 0 : k == 1 ? Z_LAST : int'($urandom_range(Z_LAST, 0)));
    end
    @(posedge clk);
    #1 neg_in_valid = 1'b0;
  end

  // e^+z stream
  initial begin
    pos_in_valid = 1'b0; pos_z = '0;
    wait (rst_n);
    for (int k = 0; k < N_ARGS; k++) begin
      @(posedge clk);
      if ($urandom_range(4, 0) == 0) begin
        #1 pos_in_valid = 1'b0;
        n_gap++;
        @(posedge clk);
      end
      #1 pos_in_valid = 1'b1;
      pos_z = z_t'(k == 0 ? 0 : k == 1 ? Z_LAST : int'($urandom_range(Z_LAST, 0)));
    end
    @(posedge clk);
    #1 pos_in_valid = 1'b0;
  end

  // e^z stream
  initial begin
    exp_in_valid = 1'b0; exp_z = '0;
    wait (rst_n);
    for (int k = 0; k < N_ARGS; k++) begin
      @(posedge clk);
      if ($urandom_range(7, 0) == 0) begin
        #1 exp_in_valid = 1'b0;
        n_gap++;
        @(posedge clk);
      end
      #1 exp_in_valid = 1'b1; exp_z = z_t'(rand_code(k));
    end
    @(posedge clk);
    #1 exp_in_valid = 1'b0;
  end

  // hyperbolic stream
  initial begin
    hyp_in_valid = 1'b0; hyp_z = '0; hyp_cosh_sel = 1'b0;
    wait (rst_n);
    for (int k = 0; k < N_ARGS; k++) begin
      @(posedge clk);
      if ($urandom_range(5, 0) == 0) begin
        #1 hyp_in_valid = 1'b0;
        n_gap++;
        @(posedge clk);
      end
      #1 hyp_in_valid = 1'b1; hyp_z = z_t'(rand_code(k));
      hyp_cosh_sel = $urandom_range(1, 0) == 1;
    end
    @(posedge clk);
    #1 hyp_in_valid = 1'b0;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    wait (exp_done == N_ARGS && hyp_done == N_ARGS && neg_done == N_ARGS && pos_done == N_ARGS);
    repeat (HYP_LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || hyp_q.size() != 0 || neg_q.size() != 0 || pos_q.size() != 0) begin
      failures++;
      $display("FAIL: results missing");
    end
    $display("mechanisms: e^-z %0d (back-to-back %0d), e^+z %0d (back-to-back %0d)",
             n_neg, n_b2b_neg, n_pos, n_b2b_pos);
    $display("            exp z>=0 %0d, exp z<0 %0d, cosh %0d, sinh z>=0 %0d, sinh z<0 %0d",
             n_exp_pos, n_exp_neg, n_cosh, n_sinh_pos, n_sinh_neg);
    $display("            function switch %0d, back-to-back exp %0d, hyp %0d, idle gaps %0d",
             n_switch, n_b2b_exp, n_b2b_hyp, n_gap);
    checks++; if (n_exp_pos  == 0) failures++;
    checks++; if (n_exp_neg  == 0) failures++;
    checks++; if (n_cosh     == 0) failures++;
    checks++; if (n_sinh_pos == 0) failures++;
    checks++; if (n_sinh_neg == 0) failures++;
    checks++; if (n_switch   == 0) failures++;
    checks++; if (n_b2b_exp  == 0) failures++;
    checks++; if (n_b2b_hyp  == 0) failures++;
    checks++; if (n_gap      == 0) failures++;
    checks++; if (n_b2b_neg  == 0 || n_neg != N_ARGS) failures++;
    checks++; if (n_b2b_pos  == 0 || n_pos != N_ARGS) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // argument capture
  bit last_sel_valid = 1'b0, last_sel;
  always @(posedge clk) begin
    if (rst_n && exp_in_valid) exp_q.push_back('{int'(exp_z), 1'b0, cycle});
    if (rst_n && neg_in_valid) neg_q.push_back('{int'(neg_z), 1'b0, cycle});
    if (rst_n && pos_in_valid) pos_q.push_back('{int'(pos_z), 1'b0, cycle});
    if (rst_n && hyp_in_valid) begin
      hyp_q.push_back('{int'(hyp_z), hyp_cosh_sel, cycle});
      if (last_sel_valid && last_sel != hyp_cosh_sel) n_switch++;
      last_sel_valid = 1'b1;
      last_sel       = hyp_cosh_sel;
    end
  end

  // result checks
  int last_exp_t = -10, last_hyp_t = -10, last_neg_t = -10, last_pos_t = -10;
  always @(posedge clk) begin
    if (rst_n && neg_out_valid) begin
      tag_t tg;
      real  want, err;
      checks++;
      if (neg_q.size() == 0) begin
        failures++;
      end else begin
        tg   = neg_q.pop_front();
        want = $exp(-real'(tg.code) / 2048.0);
        err  = real'(neg_y) / (2.0 ** 30) - want;
        n_neg++;
        if (cycle - last_neg_t == 1) n_b2b_neg++;
        last_neg_t = cycle;
        neg_done++;
        checks++;
        if (err > 4.0e-4 || err < -4.0e-4) begin
          failures++;
          if (failures < 10) $display("FAIL e^-z: z=%f err %e", tg.code / 2048.0, err);
        end
        checks++;
        if (cycle - tg.t != EXP_LAT) failures++;
      end
    end
    if (rst_n && pos_out_valid) begin
      tag_t tg;
      real  want, err;
      checks++;
      if (pos_q.size() == 0) begin
        failures++;
      end else begin
        tg   = pos_q.pop_front();
        want = $exp(real'(tg.code) / 2048.0);
        err  = real'(signed'(pos_y)) / 16384.0 - want;
        if (err < 0.0) err = -err;
        n_pos++;
        if (cycle - last_pos_t == 1) n_b2b_pos++;
        last_pos_t = cycle;
        pos_done++;
        checks++;
        if (err > 4.0e-3 * want + 1.0 / 8192.0) begin
          failures++;
          if (failures < 10) $display("FAIL e^+z: z=%f err %e", tg.code / 2048.0, err);
        end
        checks++;
        if (cycle - tg.t != EXP_LAT) failures++;
      end
    end
    if (rst_n && exp_out_valid) begin
      tag_t tg;
      real  want, got, err;
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
      end else begin
        tg   = exp_q.pop_front();
        want = $exp(real'(tg.code) / 2048.0);
        got  = real'(exp_y) / (exp_y_neg ? 2.0 ** 37 : 2.0 ** 23);
        err  = got - want; if (err < 0.0) err = -err;
        if (tg.code < 0) n_exp_neg++; else n_exp_pos++;
        if (cycle - last_exp_t == 1) n_b2b_exp++;
        last_exp_t = cycle;
        exp_done++;
        checks++;
        if (err > 1.0e-3 * want + 2.5e-3 || exp_y_neg != (tg.code < 0)) begin
          failures++;
          if (failures < 10) $display("FAIL exp: z=%f got %f want %f", tg.code / 2048.0, got, want);
        end
        checks++;
        if (cycle - tg.t != EXP_LAT) failures++;
      end
    end
    if (rst_n && hyp_out_valid) begin
      tag_t tg;
      real  x, want, got, err, ea;
      checks++;
      if (hyp_q.size() == 0) begin
        failures++;
      end else begin
        tg   = hyp_q.pop_front();
        x    = real'(tg.code) / 2048.0;
        want = tg.c ? ($exp(x) + $exp(-x)) / 2.0 : ($exp(x) - $exp(-x)) / 2.0;
        ea   = $exp(x < 0.0 ? -x : x);
        got  = real'(signed'(hyp_y)) / 16384.0;
        err  = got - want; if (err < 0.0) err = -err;
        if (tg.c) n_cosh++;
        else if (tg.code < 0) n_sinh_neg++;
        else n_sinh_pos++;
        if (cycle - last_hyp_t == 1) n_b2b_hyp++;
        last_hyp_t = cycle;
        hyp_done++;
        checks++;
        if (err > 4.0e-3 * ea + 1.0 / 4096.0) begin
          failures++;
          if (failures < 10) $display("FAIL hyp: %s z=%f got %f want %f", tg.c ? "cosh" : "sinh", x, got, want);
        end
        checks++;
        if (cycle - tg.t != HYP_LAT) failures++;
      end
    end
  end

endmodule
