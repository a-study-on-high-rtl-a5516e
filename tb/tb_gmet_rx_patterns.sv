// tb_gmet_rx_patterns: pattern-dependence test of the adaptation loops. Two
// complete receivers (back end + rx_afe_model) run side by side on the same
// channel, one fed PRBS7 and one PRBS31, each configured over its own I2C
// bus with the same settings and started from the same interpolator code.
//
// Phase 1, CDR only at alpha:beta = 1:3: for each receiver the number of
// words until its phase first comes within +-2 steps (of 32 per UI) of the
// phase that maximizes the 1/4 quantile of the upper eye (computed here from
// the model's cursors) is recorded. Both must get there; the longer of the
// two times may be at most four times the shorter (the run length of the
// pattern changes the speed only moderately). After settling, the spread of
// the phase over a window (its dither) is measured for both.
// Phase 2, joint CDR + 2-tap DFE at 1:7: averaged over the last 20000 words,
// both receivers' taps must lie within 10 LSB of the first two post-cursors
// at their phase, and the 1/8 quantile of the upper eye at the mean taps
// (computed from the cursors) within 8 units of its best over a grid of tap
// values. Recovered data of both must be error free, checked with each
// pattern's own recurrence.
`timescale 1ns/1ps
module tb_gmet_rx_patterns;
  import rx_pkg::*;
  localparam logic [6:0] DEV = 7'h2A;
  localparam int ORD [2] = '{7, 31};
  localparam int TAP [2] = '{6, 28};

  logic clk = 1'b0, rst_n = 1'b0, clk_fwd = 1'b0;
  int checks = 0, failures = 0;

  always #2 clk = ~clk;
  always #1 clk_fwd = ~clk_fwd;

  logic [1:0][3:0] d_q, e_q;
  logic [1:0][15:0] rx_data;
  logic [1:0] rx_valid, scl, sda_pull, sda_oe, sda;
  logic [1:0][3:0] clk_4ph;
  logic [1:0][1:0] pi_gray_msb;
  logic [1:0][31:0] pi_therm_lsb;
  logic [1:0][3:0][254:0] bdlev_cells;
  logic [1:0][254:0] w1_cells, w2_cells;
  logic [1:0][3:0][4:0] ofs_code;
  logic [1:0][63:0] ctle_tap_sel;
  rx_status_t status [2];
  logic [1:0][2:0] gmet_update, gmet_reversal;
  logic [1:0][2:0][11:0] gmet_delay;

  for (genvar i = 0; i < 2; i++) begin : g_rx
    assign sda[i] = ~(sda_pull[i] | sda_oe[i]);
    gmet_rx_top dut (
      .clk, .rst_n, .d_q(d_q[i]), .e_q(e_q[i]), .rx_data(rx_data[i]), .rx_valid(rx_valid[i]),
      .scl(scl[i]), .sda_i(sda[i]), .sda_oe(sda_oe[i]), .clk_fwd, .clk_4ph(clk_4ph[i]),
      .pi_gray_msb(pi_gray_msb[i]), .pi_therm_lsb(pi_therm_lsb[i]), .bdlev_cells(bdlev_cells[i]),
      .w1_cells(w1_cells[i]), .w2_cells(w2_cells[i]), .ofs_code(ofs_code[i]),
      .ctle_tap_sel(ctle_tap_sel[i]), .status(status[i]), .gmet_update(gmet_update[i]),
      .gmet_reversal(gmet_reversal[i]), .gmet_delay(gmet_delay[i])
    );
    rx_afe_model #(.PEAK(180.0), .TAIL(0.85), .NOISE(6), .PRBS(ORD[i])) afe (
      .clk, .pi_gray_msb(pi_gray_msb[i]), .pi_therm_lsb(pi_therm_lsb[i]),
      .bdlev_cells(bdlev_cells[i]), .w1_cells(w1_cells[i]), .w2_cells(w2_cells[i]),
      .ofs_code(ofs_code[i]), .d_q(d_q[i]), .e_q(e_q[i])
    );
    i2c_bfm #(.HALF(100)) bfm (.scl(scl[i]), .sda_pull(sda_pull[i]), .sda(sda[i]));
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #60_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- pattern checkers on the recovered data ----------------
  bit hist0 [$], hist1 [$];
  int prbs_err [2] = '{0, 0};
  int prbs_bits [2] = '{0, 0};
  always @(posedge clk) if (rst_n) begin
    if (rx_valid[0]) for (int k = 0; k < 16; k++) begin
      hist0.push_back(rx_data[0][k]);
      if (hist0.size() > ORD[0] + 1) void'(hist0.pop_front());
      if (hist0.size() == ORD[0] + 1) begin
        prbs_bits[0]++;
        if (hist0[ORD[0]] != (hist0[0] ^ hist0[ORD[0] - TAP[0]])) prbs_err[0]++;
      end
    end
    if (rx_valid[1]) for (int k = 0; k < 16; k++) begin
      hist1.push_back(rx_data[1][k]);
      if (hist1.size() > ORD[1] + 1) void'(hist1.pop_front());
      if (hist1.size() == ORD[1] + 1) begin
        prbs_bits[1]++;
        if (hist1[ORD[1]] != (hist1[0] ^ hist1[ORD[1] - TAP[1]])) prbs_err[1]++;
      end
    end
  end

  // ---------------- I2C: same write to both receivers ----------------
  task automatic wreg(input logic [7:0] a, input logic [7:0] d);
    logic [7:0] buf8 [16];
    logic ok0, ok1;
    buf8[0] = d;
    fork
      g_rx[0].bfm.write_regs(DEV, a, 1, buf8, ok0);
      g_rx[1].bfm.write_regs(DEV, a, 1, buf8, ok1);
    join
    check(ok0 && ok1, $sformatf("I2C write %h acknowledged", a));
  endtask

  task automatic words(input int n);
    repeat (n * 4) @(posedge clk);
  endtask

  // copy of the model's cursor table, h[f][k+2] for f in 1/32 UI
  real cur [32][11];
  initial begin
    #1;
    for (int f = 0; f < 32; f++) for (int k = 0; k < 11; k++) cur[f][k] = g_rx[0].afe.h[f][k];
  end

  // fraction q quantile of the upper-eye levels at phase f (noise ignored)
  function automatic real quantile(int f, real q, real w1, real w2);
    real v [$];
    real x, c;
    int bit_i;
    for (int pat = 0; pat < 1024; pat++) begin
      x = cur[f][2];
      bit_i = 0;
      for (int k = -2; k <= 8; k++) begin
        if (k == 0) continue;
        c = cur[f][k + 2];
        if (k == 1) c -= w1;
        if (k == 2) c -= w2;
        x += ((pat >> bit_i) & 1) ? c : -c;
        bit_i++;
      end
      v.push_back(x);
    end
    v.sort();
    bit_i = int'(q * 1024.0);
    x = v[bit_i];
    return x;
  endfunction

  function automatic int circ_dist(int a, int b);
    int d = (a - b + 32) % 32;
    return (d > 16) ? 32 - d : d;
  endfunction

  // words until each receiver's phase first comes near best_f
  int best_f = -1;
  int t_conv [2] = '{-1, -1};
  int word_n = 0;
  bit timing = 1'b0;
  always @(posedge clk) if (timing && rx_valid[0]) begin
    word_n++;
    for (int i = 0; i < 2; i++)
      if (t_conv[i] < 0 && circ_dist(int'(status[i].pi_code) % 32, best_f) <= 2) t_conv[i] = word_n;
  end

  initial begin
    int f_now, lo [2], hi [2], e0 [2], tmin, tmax, ba, bb;
    real best_q, qv, w1s [2], w2s [2], fs [2];
    scl = '1;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    words(20);

    best_q = -1e9;
    for (int f = 0; f < 32; f++) begin
      qv = quantile(f, 0.25, 0.0, 0.0);
      if (qv > best_q) begin best_q = qv; best_f = f; end
    end

    wreg(8'h03, 8'd19); wreg(8'h04, 8'd14); wreg(8'h05, 8'd17); wreg(8'h06, 8'd16);
    wreg(8'h00, 8'b0001);
    wreg(8'h07, 8'd40);
    words(2000);                                  // Bdlev settles at the start phase
    check(status[0].pi_code == 7'd40 && status[1].pi_code == 7'd40, "both start at PI code 40");

    // phase 1: CDR only
    timing = 1'b1;
    wreg(8'h00, 8'b0011);
    words(50000);
    timing = 1'b0;
    for (int i = 0; i < 2; i++) begin
      f_now = int'(status[i].pi_code) % 32;
      $display("PRBS%0d: settled in %0d words, PI %0d (best fraction %0d)",
               ORD[i], t_conv[i], status[i].pi_code, best_f);
      check(t_conv[i] > 0, $sformatf("PRBS%0d: CDR reaches the optimum", ORD[i]));
      check(circ_dist(f_now, best_f) <= 3, $sformatf("PRBS%0d: CDR stays at the optimum", ORD[i]));
    end
    tmin = (t_conv[0] < t_conv[1]) ? t_conv[0] : t_conv[1];
    tmax = (t_conv[0] < t_conv[1]) ? t_conv[1] : t_conv[0];
    check(tmin > 0 && tmax <= 4 * tmin, "convergence time similar for both patterns");

    // dither after settling
    for (int i = 0; i < 2; i++) begin lo[i] = 999; hi[i] = -999; e0[i] = prbs_err[i]; end
    repeat (20000) begin
      words(1);
      for (int i = 0; i < 2; i++) begin
        f_now = int'(status[i].pi_code);
        if (f_now - int'(status[0].pi_code) > 64) f_now -= 128;
        if (f_now < lo[i]) lo[i] = f_now;
        if (f_now > hi[i]) hi[i] = f_now;
      end
    end
    for (int i = 0; i < 2; i++) begin
      $display("PRBS%0d: phase dither %0d steps peak to peak over 20000 words", ORD[i], hi[i] - lo[i]);
      check(hi[i] - lo[i] <= 6, $sformatf("PRBS%0d: dither within +-3 steps", ORD[i]));
      check(prbs_err[i] == e0[i], $sformatf("PRBS%0d: no bit errors without DFE (%0d)", ORD[i], prbs_err[i] - e0[i]));
    end

    // phase 2: joint CDR + DFE
    wreg(8'h01, 8'h71);
    wreg(8'h00, 8'b1111);
    words(130000);
    // average taps and phase over the last 20000 words: near the optimum the
    // metric is flat and each code wanders by several LSB
    for (int i = 0; i < 2; i++) begin w1s[i] = 0.0; w2s[i] = 0.0; fs[i] = 0.0; e0[i] = prbs_err[i]; end
    repeat (20000) begin
      words(1);
      for (int i = 0; i < 2; i++) begin
        w1s[i] += real'(status[i].w1) / 20000.0;
        w2s[i] += real'(status[i].w2) / 20000.0;
        fs[i]  += real'(status[i].pi_code % 7'd32) / 20000.0;
      end
    end
    for (int i = 0; i < 2; i++) begin
      f_now = int'(fs[i] + 0.5) % 32;
      $display("PRBS%0d with DFE: mean PI fraction %f, w1 %f (h1 %f), w2 %f (h2 %f)", ORD[i],
               fs[i], w1s[i], cur[f_now][3], w2s[i], cur[f_now][4]);
      best_q = -1e9;
      for (int a = 30; a <= 80; a += 2)
        for (int b = 0; b <= 40; b += 2) begin
          qv = quantile(f_now, 0.125, real'(a), real'(b));
          if (qv > best_q) begin best_q = qv; ba = a; bb = b; end
        end
      qv = quantile(f_now, 0.125, w1s[i], w2s[i]);
      $display("  1/8 quantile at the mean taps %f, best %f at w1 %0d w2 %0d", qv, best_q, ba, bb);
      check(qv > best_q - 8.0, $sformatf("PRBS%0d: eye within 8 units of its best", ORD[i]));
      check(w1s[i] > cur[f_now][3] - 10.0 && w1s[i] < cur[f_now][3] + 10.0,
            $sformatf("PRBS%0d: tap 1 near h1", ORD[i]));
      check(w2s[i] > cur[f_now][4] - 10.0 && w2s[i] < cur[f_now][4] + 10.0,
            $sformatf("PRBS%0d: tap 2 near h2", ORD[i]));
    end
    for (int i = 0; i < 2; i++) begin
      check(prbs_err[i] == e0[i], $sformatf("PRBS%0d: no bit errors with DFE (%0d)", ORD[i], prbs_err[i] - e0[i]));
      check(prbs_bits[i] > 100000, $sformatf("PRBS%0d: data checked", ORD[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
