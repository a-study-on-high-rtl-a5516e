// tb_gmet_engine: checks the GMET update rule of gmet_engine.
// The metric is a concave function of the code (a stand-in for Bdlev versus
// phase or tap weight). Checked:
//  - while adaptation is off the code follows the manual code;
//  - every step against a reference model: one LSB, direction reversed when the
//    metric fell since the previous step and kept otherwise, next delay
//    = gain*16/|delta| clamped to [T_MIN, T_MAX] (T_MAX when delta = 0),
//    and the number of words between steps equals the announced delay;
//  - convergence to the peak, with short delays far away and long ones near
//    the peak, for a saturating 8-bit code and a wrapping 7-bit code whose
//    path to the peak crosses the wrap from 127 to 0.
`timescale 1ns/1ps
module tb_gmet_engine;
  localparam int TMIN = 8, TMAX = 4095, GS = 4;
  logic clk = 1'b0, rst_n = 1'b0, en;
  logic adapt_a, adapt_b;
  logic [7:0] man_a, code_a, gain;
  logic [6:0] man_b, code_b;
  logic [9:0] met_a, met_b;
  logic upd_a, rev_a, upd_b, rev_b;
  logic [11:0] dly_a, dly_b;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  gmet_engine #(.CODE_BITS(8), .MET_BITS(10), .WRAP(1'b0), .GSHIFT(GS), .T_MIN(TMIN), .T_MAX(TMAX)) dut_a (
    .clk, .rst_n, .en, .adapt_en(adapt_a), .man_code(man_a), .metric(met_a), .gain,
    .code(code_a), .update(upd_a), .reversal(rev_a), .delay(dly_a));
  gmet_engine #(.CODE_BITS(7), .MET_BITS(10), .WRAP(1'b1), .GSHIFT(GS), .T_MIN(TMIN), .T_MAX(TMAX)) dut_b (
    .clk, .rst_n, .en, .adapt_en(adapt_b), .man_code(man_b), .metric(met_b), .gain,
    .code(code_b), .update(upd_b), .reversal(rev_b), .delay(dly_b));

  // concave metrics: peak 1000 at code 150 (A), circular peak at code 5 (B)
  function automatic int fa(int c);
    int d = c - 150;
    return 1000 - (d * d) / 8;
  endfunction
  function automatic int fb(int c);
    int d = (c - 5 + 128) % 128;
    if (d > 64) d = 128 - d;
    return 900 - (d * d) / 6;
  endfunction
  always_comb met_a = 10'(fa(int'(code_a)));
  always_comb met_b = 10'(fb(int'(code_b)));

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model of engine A, evaluated on the words between its steps
  int  m_ref, m_dir, words_since, exp_delay;
  int  first_delays [$], late_delays [$];
  int  nupd_a = 0, nupd_b = 0, wrap_seen = 0;

  initial begin
    en = 1'b0; adapt_a = 1'b0; adapt_b = 1'b0; gain = 8'd64;
    man_a = 8'd80; man_b = 7'd110;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // manual mode
    for (int i = 0; i < 20; i++) begin
      man_a = 8'($urandom); man_b = 7'($urandom); en = 1'($urandom);
      @(posedge clk); #1;
      check(code_a == man_a && code_b == man_b, "manual code followed");
    end
    man_a = 8'd80; man_b = 7'd110;
    repeat (2) @(posedge clk); #1;
    // adaptation, every cycle is one word
    adapt_a = 1'b1; adapt_b = 1'b1; en = 1'b1;
    m_ref = fa(80); m_dir = 1; words_since = 0; exp_delay = TMIN;
    for (int cyc = 0; cyc < 400_000; cyc++) begin
      int prev_a, prev_b;
      prev_a = int'(code_a); prev_b = int'(code_b);
      @(posedge clk); #1;
      words_since++;
      if (upd_a) begin
        int delta, nd, st, q;
        nupd_a++;
        // the metric seen at the step is the one of the previous code
        delta = fa(prev_a) - m_ref;
        nd = (delta < 0) ? -m_dir : m_dir;
        st = prev_a + nd;
        if (st < 0) st = 0;
        if (st > 255) st = 255;
        check(int'(code_a) == st, $sformatf("A step %0d -> %0d exp %0d", prev_a, code_a, st));
        check(words_since == exp_delay || nupd_a == 1,
              $sformatf("A words between steps %0d exp %0d", words_since, exp_delay));
        check(rev_a == (nd != m_dir), "A reversal flag");
        q = (delta == 0) ? TMAX : (64 * 16) / (delta < 0 ? -delta : delta);
        if (q > TMAX) q = TMAX;
        if (q < TMIN) q = TMIN;
        check(int'(dly_a) == q, $sformatf("A delay %0d exp %0d (delta %0d)", dly_a, q, delta));
        if (nupd_a <= 10) first_delays.push_back(q);
        m_ref = fa(prev_a); m_dir = nd; exp_delay = q; words_since = 0;
      end
      if (upd_b) begin
        nupd_b++;
        if (prev_b == 127 && code_b == 0) wrap_seen++;
      end
      if (cyc > 300_000 && upd_a) late_delays.push_back(int'(dly_a));
    end
    begin
      int fs = 0, ls = 0;
      foreach (first_delays[i]) fs += first_delays[i];
      foreach (late_delays[i]) ls += late_delays[i];
      $display("A code %0d B code %0d, steps %0d/%0d, mean delay early %0d late %0d",
               code_a, code_b, nupd_a, nupd_b, fs / first_delays.size(),
               late_delays.size() ? ls / late_delays.size() : 0);
      check(code_a >= 147 && code_a <= 153, "A converged to the peak");
      check(code_b <= 8 || code_b >= 126, "B converged to the peak across the wrap");
      check(wrap_seen > 0, "B crossed 127 -> 0");
      check(late_delays.size() > 0 && ls / late_delays.size() > 4 * (fs / first_delays.size()),
            "delays near the peak are longer than far from it");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
