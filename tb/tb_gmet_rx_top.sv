// tb_gmet_rx_top: end-to-end test of the receiver back end with all
// parameters at their defaults, closed around rx_afe_model (channel, CTLE,
// interpolator, DFE summers, comparators and DACs).
//
// Sequence, all configuration over I2C:
//  1. Offsets of the data comparators cancelled through the offset DACs, the
//     CTLE position set, and a wrong-address access refused.
//  2. Manual mode: DFE disabled while manual tap codes are nonzero (the tap
//     DACs must stay off), then DFE enabled with adaptation off (the manual
//     codes must reach the DACs).
//  3. "Without DFE": CDR adaptation on, alpha:beta = 1:3. The interpolator
//     code must settle within +-3 steps (of 32 per UI) of the phase that
//     maximizes the 1/4 quantile of the upper eye, computed here from the
//     model's cursors; Bdlev read over I2C must be near that quantile, and
//     the recovered data must be error free (checked with the PRBS7
//     recurrence, so no alignment is needed).
//  4. "With DFE": alpha:beta = 1:7, tap adaptation on. Averaged over the
//     last 20000 words (the codes wander by several LSB around the flat top
//     of the metric), the tap weights must lie within 10 LSB of the first two
//     post-cursors at the mean phase, the phase near the optimum with taps, the Bdlev metric must rise well above the
//     value without DFE, and the data must again be error free.
// Mechanisms counted (each must occur): Bdlev up and down updates, GMET
// steps and reversals of all three loops, delay shortening and lengthening
// of the CDR loop, an interpolator quadrant change, the DFE-off and manual
// modes, I2C writes and reads, and toggles of the IQ divider outputs.
`timescale 1ns/1ps
module tb_gmet_rx_top;
  import rx_pkg::*;
  localparam logic [6:0] DEV = 7'h2A;

  logic clk = 1'b0, rst_n = 1'b0, clk_fwd = 1'b0;
  logic [3:0] d_q, e_q;
  logic [15:0] rx_data;
  logic rx_valid;
  logic scl, sda_pull, sda_oe, sda;
  logic [3:0] clk_4ph;
  logic [1:0] pi_gray_msb;
  logic [31:0] pi_therm_lsb;
  logic [3:0][254:0] bdlev_cells;
  logic [254:0] w1_cells, w2_cells;
  logic [3:0][4:0] ofs_code;
  logic [63:0] ctle_tap_sel;
  rx_status_t status;
  logic [2:0] gmet_update, gmet_reversal;
  logic [2:0][11:0] gmet_delay;

  int checks = 0, failures = 0;

  always #2 clk = ~clk;          // quarter-rate clock
  always #1 clk_fwd = ~clk_fwd;  // forwarded clock
  assign sda = ~(sda_pull | sda_oe);

  gmet_rx_top dut (
    .clk, .rst_n, .d_q, .e_q, .rx_data, .rx_valid, .scl, .sda_i(sda), .sda_oe,
    .clk_fwd, .clk_4ph, .pi_gray_msb, .pi_therm_lsb, .bdlev_cells, .w1_cells, .w2_cells,
    .ofs_code, .ctle_tap_sel, .status, .gmet_update, .gmet_reversal, .gmet_delay
  );
  rx_afe_model #(.PEAK(180.0), .TAIL(0.85), .NOISE(6)) afe (
    .clk, .pi_gray_msb, .pi_therm_lsb, .bdlev_cells, .w1_cells, .w2_cells, .ofs_code, .d_q, .e_q
  );
  i2c_bfm #(.HALF(100)) bfm (.scl, .sda_pull, .sda);

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

  // ---------------- mechanism counters ----------------
  int n_bd_up = 0, n_bd_dn = 0, n_step [3] = '{0, 0, 0}, n_rev [3] = '{0, 0, 0};
  int n_shorter = 0, n_longer = 0, n_quad = 0, n_iq = 0, n_i2c_wr = 0, n_i2c_rd = 0;
  int n_dfe_off = 0, n_manual = 0;
  int last_dly = -1;
  logic [1:0] last_gray;
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < 4; s++) if (d_q[s]) begin
      if (e_q[s]) n_bd_up++; else n_bd_dn++;
    end
    for (int i = 0; i < 3; i++) begin
      if (gmet_update[i]) n_step[i]++;
      if (gmet_reversal[i]) n_rev[i]++;
    end
    if (gmet_update[0]) begin
      if (last_dly >= 0 && int'(gmet_delay[0]) < last_dly) n_shorter++;
      if (last_dly >= 0 && int'(gmet_delay[0]) > last_dly) n_longer++;
      last_dly = int'(gmet_delay[0]);
    end
    if (pi_gray_msb != last_gray) n_quad++;
    last_gray <= pi_gray_msb;
  end
  always @(posedge clk_4ph[1]) n_iq++;

  // ---------------- PRBS7 checker on the recovered data ----------------
  bit hist [$];
  int prbs_err = 0, prbs_bits = 0;
  always @(posedge clk) if (rst_n && rx_valid) begin
    for (int k = 0; k < 16; k++) begin
      hist.push_back(rx_data[k]);
      if (hist.size() > 8) void'(hist.pop_front());
      if (hist.size() == 8) begin
        prbs_bits++;
        if (hist[7] != (hist[0] ^ hist[1])) prbs_err++;
      end
    end
  end

  // ---------------- I2C helpers ----------------
  task automatic wreg(input logic [7:0] a, input logic [7:0] d);
    logic [7:0] buf8 [16];
    logic ok;
    buf8[0] = d;
    bfm.write_regs(DEV, a, 1, buf8, ok);
    n_i2c_wr++;
    check(ok, $sformatf("I2C write %h acknowledged", a));
  endtask
  task automatic rreg(input logic [7:0] a, output logic [7:0] d);
    logic [7:0] buf8 [16];
    logic ok;
    bfm.read_regs(DEV, a, 1, buf8, ok);
    n_i2c_rd++;
    check(ok, $sformatf("I2C read %h acknowledged", a));
    d = buf8[0];
  endtask
  task automatic words(input int n);
    repeat (n * 4) @(posedge clk);
  endtask

  // copy of the model's cursor table, h[f][k+2] for f in 1/32 UI
  real cur [32][11];
  initial begin
    #1;
    for (int f = 0; f < 32; f++) for (int k = 0; k < 11; k++) cur[f][k] = afe.h[f][k];
  end

  // ---------------- independent prediction from the model's cursors ------
  // level below which a fraction q of the upper-eye samples lie at phase f,
  // with tap weights w1, w2 (residual = cursor - weight), noise ignored
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

  initial begin
    logic [7:0] r, bd [4], pic, w1r, w2r;
    int best_f, f_now, met_nodfe, met_dfe, e0;
    real best_q, qv, w1m, w2m, fm;
    scl = 1'b1;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    last_gray = pi_gray_msb;
    words(20);

    // 1. static settings
    begin
      logic acked;
      bfm.probe(7'h11, acked);
      check(!acked, "wrong I2C address refused");
    end
    // offset DAC: model offsets 6, -4, 2, 0 at 2 units per code
    wreg(8'h03, 8'd19); wreg(8'h04, 8'd14); wreg(8'h05, 8'd17); wreg(8'h06, 8'd16);
    check(ofs_code[0] == 5'd19 && ofs_code[1] == 5'd14 && ofs_code[2] == 5'd17 && ofs_code[3] == 5'd16,
          "offset codes reach the offset DACs");
    wreg(8'h02, 8'd45);
    check(ctle_tap_sel == (64'd1 << 45), "CTLE ladder tap 45 selected");
    rreg(8'h02, r);
    check(r == 8'd45, "CTLE register reads back");

    // 2. manual and DFE-off modes
    wreg(8'h08, 8'd40); wreg(8'h09, 8'd12);
    wreg(8'h00, 8'b0001);                       // Bdlev on, CDR off, DFE off
    words(4);
    check($countones(w1_cells) == 0 && $countones(w2_cells) == 0, "DFE off: tap DACs off");
    rreg(8'h15, r);
    check(r == 8'd0, "DFE off: tap 1 reads 0");
    n_dfe_off++;
    wreg(8'h00, 8'b0101);                       // DFE on, adaptation off
    words(4);
    check($countones(w1_cells) == 40 && $countones(w2_cells) == 12, "manual tap codes reach the DACs");
    n_manual++;
    wreg(8'h07, 8'd40);                         // start phase, manual
    words(4);
    check(pi_gray_msb == 2'b01 && $countones(pi_therm_lsb) == 24, "manual PI code 40 = quadrant 1, 24 cells");

    // 3. without DFE: CDR adaptation, 1:3
    wreg(8'h00, 8'b0011);                       // Bdlev on, CDR on, DFE off
    words(60000);
    f_now = int'(status.pi_code) % 32;
    best_q = -1e9; best_f = 0;
    for (int f = 0; f < 32; f++) begin
      qv = quantile(f, 0.25, 0.0, 0.0);
      if (qv > best_q) begin best_q = qv; best_f = f; end
    end
    rreg(8'h14, pic);
    check(pic == 8'(status.pi_code), "PI code readback");
    met_nodfe = 0;
    for (int s = 0; s < 4; s++) begin
      rreg(8'h10 + 8'(s), bd[s]);
      met_nodfe += int'(bd[s]);
    end
    qv = quantile(f_now, 0.25, 0.0, 0.0);
    $display("no DFE: PI %0d (fraction %0d, best %0d), Bdlev %0d %0d %0d %0d, predicted %f",
             status.pi_code, f_now, best_f, bd[0], bd[1], bd[2], bd[3], qv);
    check(circ_dist(f_now, best_f) <= 3, "CDR settles at the Bdlev maximum (no DFE)");
    // error comparator offsets 3, -2, 0, 1 shift each slice's level
    check(int'(bd[0]) > qv + 3 - 10 && int'(bd[0]) < qv + 3 + 10, "Bdlev slice 0 near predicted quantile");
    check(int'(bd[1]) > qv - 2 - 10 && int'(bd[1]) < qv - 2 + 10, "Bdlev slice 1 near predicted quantile");
    e0 = prbs_err;
    words(5000);
    check(prbs_err == e0, $sformatf("no bit errors without DFE (%0d)", prbs_err - e0));

    // 4. with DFE: taps and CDR adapt together, 1:7
    wreg(8'h01, 8'h71);
    wreg(8'h08, 8'd0); wreg(8'h09, 8'd0);
    wreg(8'h00, 8'b1111);
    words(130000);
    // average over 20000 words: near the optimum the metric is flat and the
    // codes wander by several LSB
    w1m = 0.0; w2m = 0.0; fm = 0.0;
    e0 = prbs_err;
    repeat (20000) begin
      words(1);
      w1m += real'(status.w1) / 20000.0;
      w2m += real'(status.w2) / 20000.0;
      fm  += real'(status.pi_code % 7'd32) / 20000.0;
    end
    f_now = int'(fm + 0.5) % 32;
    rreg(8'h15, w1r); rreg(8'h16, w2r);
    check(w1r == status.w1 && w2r == status.w2, "tap codes read back");
    met_dfe = 0;
    for (int s = 0; s < 4; s++) begin
      rreg(8'h10 + 8'(s), bd[s]);
      met_dfe += int'(bd[s]);
    end
    best_q = -1e9; best_f = 0;
    for (int f = 0; f < 32; f++) begin
      qv = quantile(f, 0.125, cur[f][3], cur[f][4]);
      if (qv > best_q) begin best_q = qv; best_f = f; end
    end
    $display("DFE: mean PI fraction %f (best %0d) w1 %f (h1 %f) w2 %f (h2 %f) Bdlev sum %0d vs %0d",
             fm, best_f, w1m, cur[f_now][3], w2m, cur[f_now][4], met_dfe, met_nodfe);
    check(circ_dist(f_now, best_f) <= 3, "CDR settles at the Bdlev maximum (with DFE)");
    check(w1m > cur[f_now][3] - 10.0 && w1m < cur[f_now][3] + 10.0, "tap 1 near h1");
    check(w2m > cur[f_now][4] - 10.0 && w2m < cur[f_now][4] + 10.0, "tap 2 near h2");
    check(met_dfe > met_nodfe + 4 * 40, "DFE opens the eye");
    check(prbs_err == e0, $sformatf("no bit errors with DFE (%0d)", prbs_err - e0));

    // mechanisms
    $display("counts: bdlev up %0d down %0d, steps %0d/%0d/%0d, reversals %0d/%0d/%0d, delay shorter %0d longer %0d, quadrant changes %0d, iq %0d, i2c wr %0d rd %0d",
             n_bd_up, n_bd_dn, n_step[0], n_step[1], n_step[2], n_rev[0], n_rev[1], n_rev[2],
             n_shorter, n_longer, n_quad, n_iq, n_i2c_wr, n_i2c_rd);
    check(n_bd_up > 0 && n_bd_dn > 0, "Bdlev moved both ways");
    for (int i = 0; i < 3; i++) begin
      check(n_step[i] > 0, $sformatf("loop %0d stepped", i));
      check(n_rev[i] > 0, $sformatf("loop %0d reversed", i));
    end
    check(n_shorter > 0 && n_longer > 0, "CDR update delay adapted both ways");
    check(n_quad > 0, "interpolator quadrant changed");
    check(n_dfe_off > 0 && n_manual > 0, "DFE-off and manual modes exercised");
    check(n_i2c_wr > 0 && n_i2c_rd > 0, "I2C writes and reads");
    check(n_iq > 100, "IQ divider running");
    $display("PRBS bits checked %0d", prbs_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
