// tb_bdlev_dlf: two parts.
// 1) Random data/error words against an integer reference model of the
//    weighted sign-sign update (up alpha for a data-1 sample above the
//    reference, down beta for one below, data-0 samples ignored, saturation).
// 2) Closed loop: a signal whose "1" samples take one of four equiprobable
//    levels (h0 +/- h_1 plus/minus a small residual) is compared with the
//    loop's code, as the error comparator does. With alpha:beta = 1:3 the code
//    must settle at the lower main level h0 - |h-1|, with 1:1 between the two
//    main levels (near h0), and with 1:7 below the lowest level.
// 3) Noise: two equiprobable levels h0 +/- h with Gaussian noise of standard
//    deviation sigma and alpha:beta = 1:3. The level then settles below
//    h0 - h by a margin dd that solves
//      P(0 > n > -dd) = P(n < -2h - dd),   n ~ N(0, sigma^2)
//    (the mass of the lower level lost below the reference equals the mass
//    of the upper level that reaches below it). dd is found here by
//    bisection and compared with the loop, for a small h (large dd) and a
//    large h (dd near zero).
`timescale 1ns/1ps
module tb_bdlev_dlf;
  localparam int R = 4, FRAC = 6;
  logic clk = 1'b0, rst_n = 1'b0, en;
  logic [R-1:0] d_bits, e_bits;
  logic [3:0] alpha, beta;
  logic [7:0] code;
  int checks = 0, failures = 0;
  int ref_acc;

  always #5 clk = ~clk;
  bdlev_dlf #(.RATIO(R), .DAC_BITS(8), .FRAC(FRAC)) dut (
    .clk, .rst_n, .en, .d_bits, .e_bits, .alpha, .beta, .code);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // closed loop: returns the mean code over the last part of the run
  task automatic run_loop(input int a, input int b, input int h0, input int hm1,
                          input int resi, input int n, output real mean);
    real sum = 0.0;
    alpha = 4'(a); beta = 4'(b);
    for (int i = 0; i < n; i++) begin
      en = 1'b1;
      for (int k = 0; k < R; k++) begin
        int lvl;
        lvl = h0 + (($urandom & 1) ? hm1 : -hm1) + (($urandom & 1) ? resi : -resi);
        d_bits[k] = 1'b1;
        e_bits[k] = (lvl > int'(code)) || (lvl == int'(code) && ($urandom & 1));
      end
      @(posedge clk); #1;
      if (i >= n / 2) sum += real'(code);
    end
    mean = sum / real'(n - n / 2);
  endtask

  // standard normal cumulative distribution (Abramowitz-Stegun 7.1.26)
  function automatic real phi(real z);
    real t, y, x;
    x = (z < 0.0) ? -z / 1.4142135623730951 : z / 1.4142135623730951;
    t = 1.0 / (1.0 + 0.3275911 * x);
    y = 1.0 - (((((1.061405429 * t - 1.453152027) * t) + 1.421413741) * t
                - 0.284496736) * t + 0.254829592) * t * $exp(-x * x);
    return (z < 0.0) ? 0.5 * (1.0 - y) : 0.5 * (1.0 + y);
  endfunction

  // margin dd below h0 - h predicted for noise sigma, by bisection
  function automatic real predict_dd(real h, real sigma);
    real lo = 0.0, hi = 5.0 * sigma, mid;
    for (int i = 0; i < 60; i++) begin
      mid = 0.5 * (lo + hi);
      if (0.5 - phi(-mid / sigma) < phi((-2.0 * h - mid) / sigma)) lo = mid;
      else hi = mid;
    end
    return mid;
  endfunction

  // approximately normal sample: sum of 12 uniforms minus 6
  function automatic real gauss();
    real g = -6.0;
    for (int i = 0; i < 12; i++) g += real'($urandom % 65536) / 65536.0;
    return g;
  endfunction

  task automatic run_noisy(input int h0, input real h, input real sigma, input int n,
                           output real mean);
    real sum = 0.0, lvl;
    alpha = 4'd1; beta = 4'd3;
    for (int i = 0; i < n; i++) begin
      en = 1'b1;
      for (int k = 0; k < R; k++) begin
        lvl = real'(h0) + (($urandom & 1) ? h : -h) + sigma * gauss();
        d_bits[k] = 1'b1;
        e_bits[k] = lvl > real'(code);
      end
      @(posedge clk); #1;
      if (i >= n / 2) sum += real'(code);
    end
    mean = sum / real'(n - n / 2);
  endtask

  initial begin
    real m;
    en = 1'b0; d_bits = '0; e_bits = '0; alpha = 4'd1; beta = 4'd3;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    ref_acc = 64 << FRAC;
    check(code == 8'd64, "reset code");
    // part 1: random stimulus against the reference model
    for (int i = 0; i < 3000; i++) begin
      int step;
      en = ($urandom % 4) != 0;
      d_bits = R'($urandom); e_bits = R'($urandom);
      alpha = 4'($urandom); beta = 4'($urandom);
      if (i > 1500 && i < 1900) begin d_bits = '1; e_bits = '1; alpha = 4'd15; end // drive to the top
      if (i > 2200 && i < 2700) begin d_bits = '1; e_bits = '0; beta = 4'd15; end  // drive to the bottom
      step = 0;
      for (int k = 0; k < R; k++) if (d_bits[k]) step += e_bits[k] ? int'(alpha) : -int'(beta);
      @(posedge clk); #1;
      if (en) begin
        ref_acc += step;
        if (ref_acc < 0) ref_acc = 0;
        if (ref_acc > (1 << (8 + FRAC)) - 1) ref_acc = (1 << (8 + FRAC)) - 1;
      end
      check(int'(code) == (ref_acc >> FRAC), $sformatf("step %0d code %0d exp %0d", i, code, ref_acc >> FRAC));
    end
    // part 2: quantile tracking
    run_loop(1, 3, 150, 30, 4, 20000, m);   // expect ~ h0 - |h-1| = 120
    $display("1:3 mean %f", m);
    check(m > 115.0 && m < 125.0, "1:3 settles at h0-|h-1|");
    run_loop(1, 1, 150, 30, 4, 20000, m);   // median of upper eye: between 124 and 176
    $display("1:1 mean %f", m);
    check(m > 126.0 && m < 174.0, "1:1 settles between the main levels");
    run_loop(1, 7, 150, 30, 4, 20000, m);   // lowest level 116
    $display("1:7 mean %f", m);
    check(m > 111.0 && m < 119.0, "1:7 settles at the lowest level");
    // part 3: noise lowers the level by dd
    begin
      real dd_small, dd_large, p_small, p_large;
      p_small = predict_dd(8.0, 16.0);
      p_large = predict_dd(32.0, 16.0);
      run_noisy(150, 8.0, 16.0, 40000, m);
      dd_small = 150.0 - 8.0 - m;
      run_noisy(150, 32.0, 16.0, 40000, m);
      dd_large = 150.0 - 32.0 - m;
      $display("noise: h/sigma 0.5 dd %f (predicted %f), h/sigma 2 dd %f (predicted %f)",
               dd_small, p_small, dd_large, p_large);
      check(dd_small > p_small - 1.5 && dd_small < p_small + 1.5, "dd for a small cursor");
      check(dd_large > p_large - 1.5 && dd_large < p_large + 1.5, "dd for a large cursor");
      check(dd_small > dd_large + 2.0, "dd shrinks as the cursor grows");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
