// gmet_rx_top: digital back end of a quarter-rate baud-rate receiver that
// adapts its sampling phase (CDR) and a 2-tap DFE with one shared algorithm,
// gradient maximum-eye tracking (GMET).
//
// Each of the four quarter-rate slices has a data comparator and an error
// comparator. The error comparator's reference, the biased data level
// (Bdlev), is adapted per slice by a bdlev_dlf loop with unequal up/down
// weights, so it settles at a chosen quantile of the upper eye and so tracks
// the vertical eye opening. The sum of the four Bdlev codes is the metric
// that three gmet_engine instances climb: one steps the phase-interpolator
// code (CDR), two step the DFE tap-1 and tap-2 weights. Each steps its code
// by one LSB in the direction that last raised the metric, and waits a delay
// inversely proportional to the metric change before the next step.
//
// Signal flow:
//   d_q/e_q (4+4 decisions per quarter-rate cycle) -> rx_des -> 16-bit words
//   words -> 4 x bdlev_dlf -> Bdlev codes -> dac_therm_enc -> reference DACs
//   sum of Bdlev codes -> gmet_engine x3 -> PI code -> pi_code_enc -> PI
//                                        -> w1, w2 -> dac_therm_enc -> DFE DACs
//   scl/sda <-> i2c_slave <-> rx_csr (enables, ratios, gains, manual codes,
//                                     CTLE position, offset codes, read back)
//   CTLE position -> ctle_onehot_dec -> R-ladder;  offset codes -> offset DACs
//   clk_fwd -> iq_divider -> 4-phase clock to the interpolator
//
// The analog parts (termination, CTLE, CML summers, StrongARM comparators,
// DACs, interpolator, clock buffers) are outside this module; their control
// words are its outputs and the comparator decisions its inputs.
//
// Clocking: clk is the quarter-rate sampling clock; all digital state runs on
// it with the deserializer's word_valid as clock enable (one word per
// DES_RATIO cycles). clk_fwd clocks only the IQ divider. rst_n is
// asynchronous, active low.
//
// Modes (register CTRL): with dfe_en low the tap weights driven to the DACs
// are 0 ("without DFE"); with cdr_en or dfe_adapt_en low the corresponding
// codes follow their manual registers.
//
// From the receiver description: the four-slice quarter-rate front end with
// one adapted error reference per comparator, GMET for the phase and both
// taps, Bdlev as the shared metric, the DAC codings, the I2C access and the
// IQ divider. This design's own choices: the deserializer ratio, the use of
// the summed Bdlev codes as metric, the register map and reset values, and
// the single clock domain with enable.
module gmet_rx_top
  import rx_pkg::*;
#(
  parameter int unsigned DES_RATIO = 4,
  parameter int unsigned DLF_FRAC  = 6,
  parameter int unsigned GSHIFT    = 4,
  parameter int unsigned T_MIN     = 8,
  parameter int unsigned T_MAX     = 4095,
  parameter logic [6:0]  I2C_ADDR  = 7'h2A,
  localparam int unsigned WW       = NSLICE * DES_RATIO,
  localparam int unsigned NCELL    = (1 << DAC_BITS) - 1
) (
  input  logic                clk,
  input  logic                rst_n,
  // comparator decisions, slice 0 = earliest unit interval
  input  logic [NSLICE-1:0]   d_q,
  input  logic [NSLICE-1:0]   e_q,
  // recovered data
  output logic [WW-1:0]       rx_data,
  output logic                rx_valid,
  // I2C
  input  logic                scl,
  input  logic                sda_i,
  output logic                sda_oe,
  // forwarded clock and its four phases
  input  logic                clk_fwd,
  output logic [3:0]          clk_4ph,
  // phase interpolator control
  output logic [1:0]          pi_gray_msb,
  output logic [PI_LSB_THERM-1:0] pi_therm_lsb,
  // thermometer-coded current DACs: error references and DFE taps
  output logic [NSLICE-1:0][NCELL-1:0] bdlev_cells,
  output logic [NCELL-1:0]    w1_cells,
  output logic [NCELL-1:0]    w2_cells,
  // binary offset DACs of the data comparators
  output logic [NSLICE-1:0][OFS_BITS-1:0] ofs_code,
  // CTLE R-ladder tap select
  output logic [CTLE_POS-1:0] ctle_tap_sel,
  // adapted codes, and GMET step events [0]=CDR [1]=tap 1 [2]=tap 2
  output rx_status_t          status,
  output logic [2:0]          gmet_update,
  output logic [2:0]          gmet_reversal,
  // wait (in words) each GMET loop chose at its last step
  output logic [2:0][$clog2(T_MAX+1)-1:0] gmet_delay
);

  localparam int unsigned MET_BITS = DAC_BITS + $clog2(NSLICE);

  rx_cfg_t             cfg;
  logic [WW-1:0]       d_word, e_word;
  logic                word_valid;
  logic [7:0]          reg_addr, reg_wdata, reg_rdata;
  logic                reg_we;
  logic [NSLICE-1:0][DAC_BITS-1:0] bdlev;
  logic [MET_BITS-1:0] metric;
  logic [PI_BITS-1:0]  pi_code;
  logic [DAC_BITS-1:0] w1_code, w2_code, w1_out, w2_out;
  logic                tap_adapt;

  // ---------------- data path: deserializer ----------------
  rx_des #(.NSLICE(NSLICE), .RATIO(DES_RATIO)) u_des (
    .clk, .rst_n, .d_q, .e_q, .d_word, .e_word, .word_valid
  );
  assign rx_data  = d_word;
  assign rx_valid = word_valid;

  // ---------------- Bdlev loops, one per error comparator ----------------
  for (genvar s = 0; s < NSLICE; s++) begin : g_slice
    logic [DES_RATIO-1:0] d_s, e_s;
    for (genvar k = 0; k < DES_RATIO; k++) begin : g_bit
      assign d_s[k] = d_word[k*NSLICE + s];
      assign e_s[k] = e_word[k*NSLICE + s];
    end
    bdlev_dlf #(.RATIO(DES_RATIO), .DAC_BITS(DAC_BITS), .FRAC(DLF_FRAC)) u_dlf (
      .clk, .rst_n,
      .en     (word_valid && cfg.bdlev_en),
      .d_bits (d_s),
      .e_bits (e_s),
      .alpha  (cfg.alpha),
      .beta   (cfg.beta),
      .code   (bdlev[s])
    );
    dac_therm_enc #(.BITS(DAC_BITS)) u_ref_dac (.code(bdlev[s]), .cell_on(bdlev_cells[s]));
  end

  always_comb begin
    metric = '0;
    for (int s = 0; s < NSLICE; s++) metric = metric + MET_BITS'(bdlev[s]);
  end

  // ---------------- GMET engines ----------------
  gmet_engine #(.CODE_BITS(PI_BITS), .MET_BITS(MET_BITS), .WRAP(1'b1),
                .GSHIFT(GSHIFT), .T_MIN(T_MIN), .T_MAX(T_MAX)) u_gmet_cdr (
    .clk, .rst_n, .en(word_valid), .adapt_en(cfg.cdr_en), .man_code(cfg.pi_man),
    .metric, .gain(cfg.gain_cdr), .code(pi_code),
    .update(gmet_update[0]), .reversal(gmet_reversal[0]), .delay(gmet_delay[0])
  );

  assign tap_adapt = cfg.dfe_en && cfg.dfe_adapt_en;

  gmet_engine #(.CODE_BITS(DAC_BITS), .MET_BITS(MET_BITS), .WRAP(1'b0),
                .GSHIFT(GSHIFT), .T_MIN(T_MIN), .T_MAX(T_MAX)) u_gmet_w1 (
    .clk, .rst_n, .en(word_valid), .adapt_en(tap_adapt), .man_code(cfg.w1_man),
    .metric, .gain(cfg.gain_w1), .code(w1_code),
    .update(gmet_update[1]), .reversal(gmet_reversal[1]), .delay(gmet_delay[1])
  );

  gmet_engine #(.CODE_BITS(DAC_BITS), .MET_BITS(MET_BITS), .WRAP(1'b0),
                .GSHIFT(GSHIFT), .T_MIN(T_MIN), .T_MAX(T_MAX)) u_gmet_w2 (
    .clk, .rst_n, .en(word_valid), .adapt_en(tap_adapt), .man_code(cfg.w2_man),
    .metric, .gain(cfg.gain_w2), .code(w2_code),
    .update(gmet_update[2]), .reversal(gmet_reversal[2]), .delay(gmet_delay[2])
  );

  assign w1_out = cfg.dfe_en ? w1_code : '0;
  assign w2_out = cfg.dfe_en ? w2_code : '0;

  pi_code_enc #(.NTHERM(PI_LSB_THERM)) u_pi_enc (
    .code(pi_code), .gray_msb(pi_gray_msb), .therm_lsb(pi_therm_lsb)
  );
  dac_therm_enc #(.BITS(DAC_BITS)) u_w1_dac (.code(w1_out), .cell_on(w1_cells));
  dac_therm_enc #(.BITS(DAC_BITS)) u_w2_dac (.code(w2_out), .cell_on(w2_cells));

  // ---------------- static settings ----------------
  ctle_onehot_dec #(.NPOS(CTLE_POS)) u_ctle_dec (.code(cfg.ctle_code), .tap_sel(ctle_tap_sel));
  assign ofs_code = cfg.ofs_code;

  // ---------------- I2C access ----------------
  always_comb begin
    status.bdlev   = bdlev;
    status.pi_code = pi_code;
    status.w1      = w1_out;
    status.w2      = w2_out;
  end

  i2c_slave #(.DEV_ADDR(I2C_ADDR)) u_i2c (
    .clk, .rst_n, .scl, .sda_i, .sda_oe, .reg_addr, .reg_wdata, .reg_we, .reg_rdata
  );

  rx_csr u_csr (
    .clk, .rst_n, .reg_addr, .reg_wdata, .reg_we, .reg_rdata, .cfg, .status
  );

  // ---------------- clock path ----------------
  iq_divider u_iqdiv (.clk_in(clk_fwd), .rst_n, .clk_4ph);

endmodule
