// tb_gmet_rx_sweep: Bdlev-versus-sampling-phase sweep and CDR lock point,
// without and with the DFE, on one receiver (back end + rx_afe_model, PRBS7).
//
// For each configuration the interpolator is stepped by hand through one UI
// (codes 32..63, CDR adaptation off) and, at each code, the sum of the four
// adapted Bdlev codes is averaged over the last 500 of 2500 words. Then the
// CDR loop is switched on from the sweep's worst code and its mean phase
// over the last 10000 of 60000 words is compared with the code of the
// sweep's maximum: the loop must lock within +-2 steps (of 32 per UI) of it.
//   without DFE: DFE off, alpha:beta = 1:3
//   with DFE:    taps adapted first at the phase found without DFE, and
//                adapting on throughout the sweep, alpha:beta = 1:7
// The maximum of the sweep with DFE must also lie well above the maximum
// without it.
// Last, tap 1 is swept by hand (codes 0..80, CDR and tap 2 held at their
// adapted codes, alpha:beta = 1:7). Far below the first post-cursor the eye
// level must follow w1 with unit slope (about 4 per LSB in the sum of four
// slices); near the optimum the slope must be smaller; and the maximum must
// lie within 6 LSB of h1 at that phase. All configuration goes through I2C.
`timescale 1ns/1ps
module tb_gmet_rx_sweep;
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

  always #2 clk = ~clk;
  always #1 clk_fwd = ~clk_fwd;
  assign sda = ~(sda_pull | sda_oe);

  gmet_rx_top dut (
    .clk, .rst_n, .d_q, .e_q, .rx_data, .rx_valid, .scl, .sda_i(sda), .sda_oe,
    .clk_fwd, .clk_4ph, .pi_gray_msb, .pi_therm_lsb, .bdlev_cells, .w1_cells, .w2_cells,
    .ofs_code, .ctle_tap_sel, .status, .gmet_update, .gmet_reversal, .gmet_delay
  );
  rx_afe_model #(.PEAK(180.0), .TAIL(0.85), .NOISE(6), .PRBS(7)) afe (
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

  task automatic wreg(input logic [7:0] a, input logic [7:0] d);
    logic [7:0] buf8 [16];
    logic ok;
    buf8[0] = d;
    bfm.write_regs(DEV, a, 1, buf8, ok);
    check(ok, $sformatf("I2C write %h acknowledged", a));
  endtask

  task automatic words(input int n);
    repeat (n * 4) @(posedge clk);
  endtask

  function automatic int bdlev_sum();
    int s = 0;
    for (int i = 0; i < 4; i++) s += int'(status.bdlev[i]);
    return s;
  endfunction

  function automatic int circ_dist(int a, int b);
    int d = (a - b + 32) % 32;
    return (d > 16) ? 32 - d : d;
  endfunction

  // sweep codes 32..63 by hand, then lock from the worst code
  task automatic sweep_and_lock(input string name, input logic [7:0] ctrl_sweep,
                                input logic [7:0] ctrl_lock, output real best_lvl);
    real lvl [32];
    real fm;
    int best_c, worst_c, f_lock;
    real worst_lvl;
    wreg(8'h07, 8'd32);
    wreg(8'h00, ctrl_sweep);
    words(8000);
    best_lvl = -1.0; worst_lvl = 1e9; best_c = 0; worst_c = 0;
    for (int c = 0; c < 32; c++) begin
      wreg(8'h07, 8'(32 + c));
      words(2000);
      lvl[c] = 0.0;
      repeat (500) begin
        words(1);
        lvl[c] += real'(bdlev_sum()) / 500.0;
      end
      if (lvl[c] > best_lvl)  begin best_lvl = lvl[c];  best_c = c; end
      if (lvl[c] < worst_lvl) begin worst_lvl = lvl[c]; worst_c = c; end
    end
    $write("%s sweep (Bdlev sum per code 32..63):", name);
    for (int c = 0; c < 32; c++) $write(" %0d", int'(lvl[c]));
    $display("");
    wreg(8'h07, 8'(32 + worst_c));
    words(4000);
    wreg(8'h00, ctrl_lock);
    words(50000);
    fm = 0.0;
    repeat (10000) begin
      words(1);
      fm += real'(status.pi_code % 7'd32) / 10000.0;
    end
    f_lock = int'(fm + 0.5) % 32;
    $display("%s: sweep maximum %f at code %0d, minimum at %0d; CDR mean phase %f",
             name, best_lvl, 32 + best_c, 32 + worst_c, fm);
    check(best_lvl > worst_lvl + 40.0, $sformatf("%s: Bdlev depends on the phase", name));
    check(circ_dist(f_lock, best_c) <= 2, $sformatf("%s: CDR locks at the Bdlev maximum", name));
  endtask

  initial begin
    real max_nodfe, max_dfe;
    scl = 1'b1;
    repeat (10) @(posedge clk);
    rst_n = 1'b1;
    words(20);
    wreg(8'h03, 8'd19); wreg(8'h04, 8'd14); wreg(8'h05, 8'd17); wreg(8'h06, 8'd16);
    // without DFE: Bdlev on, DFE off, 1:3
    wreg(8'h01, 8'h31);
    sweep_and_lock("without DFE", 8'b0001, 8'b0011, max_nodfe);
    // with DFE: taps first adapt at the best phase without DFE, then keep
    // adapting during the sweep, 1:7
    wreg(8'h01, 8'h71);
    wreg(8'h07, 8'(status.pi_code));
    wreg(8'h00, 8'b1101);
    words(80000);
    sweep_and_lock("with DFE", 8'b1101, 8'b1111, max_dfe);
    check(max_dfe > max_nodfe + 160.0, "DFE raises the Bdlev maximum");
    // tap-1 sweep at the locked phase
    begin
      real lv [17];
      real best, h1, slope_far, slope_near;
      int pi_lock, best_w;
      pi_lock = int'(status.pi_code);
      h1 = afe.h[pi_lock % 32][3];
      wreg(8'h07, 8'(pi_lock));
      wreg(8'h09, 8'(status.w2));
      wreg(8'h00, 8'b0101);
      best = -1.0; best_w = 0;
      for (int j = 0; j <= 16; j++) begin
        wreg(8'h08, 8'(5 * j));
        words((j == 0) ? 6000 : 2500);
        lv[j] = 0.0;
        repeat (500) begin
          words(1);
          lv[j] += real'(bdlev_sum()) / 500.0;
        end
        if (lv[j] > best) begin best = lv[j]; best_w = 5 * j; end
      end
      $write("w1 sweep (Bdlev sum per w1 = 0, 5, .. 80):");
      for (int j = 0; j <= 16; j++) $write(" %0d", int'(lv[j]));
      $display("");
      slope_far = (lv[6] - lv[2]) / 20.0;                       // w1 10 .. 30
      slope_near = (lv[best_w / 5 + 1] - lv[best_w / 5 - 1]) / 10.0;
      if (slope_near < 0.0) slope_near = -slope_near;
      $display("w1 sweep: maximum at %0d (h1 %f), slope far %f near %f per LSB",
               best_w, h1, slope_far, slope_near);
      check(slope_far > 3.0 && slope_far < 5.0, "eye level follows w1 with unit slope far from h1");
      check(slope_near < slope_far / 2.0, "slope smaller near the optimum");
      check(real'(best_w) > h1 - 6.0 && real'(best_w) < h1 + 6.0, "eye maximum at w1 near h1");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
