// rx_pkg: constants and types shared by the digital back end of the
// quarter-rate adaptive receiver (GMET clock-and-data recovery plus 2-tap DFE
// adaptation).
//
// The numbers that come from the receiver description are the four
// quarter-rate sampler slices, the 2-tap DFE, the 8-bit current-DAC codes,
// the 5-bit offset DAC codes, the 64-position CTLE R-ladder and the 7-bit
// phase-interpolator code (2 gray-coded MSBs plus 32 thermometer LSBs, i.e.
// 128 phase steps). The register map, the deserializer ratio and the reset
// values are choices of this implementation.
package rx_pkg;

  // Quarter-rate front end: four data and four error comparators.
  localparam int unsigned NSLICE     = 4;
  // Current-DAC resolution (Bdlev references and DFE tap weights).
  localparam int unsigned DAC_BITS   = 8;
  // Offset-calibration voltage DAC resolution (data samplers).
  localparam int unsigned OFS_BITS   = 5;
  // CTLE R-ladder: 64 one-hot positions.
  localparam int unsigned CTLE_POS   = 64;
  localparam int unsigned CTLE_BITS  = $clog2(CTLE_POS);
  // Phase interpolator: 2 gray-coded MSBs and 32 thermometer LSBs.
  localparam int unsigned PI_LSB_THERM = 32;
  localparam int unsigned PI_BITS    = 2 + $clog2(PI_LSB_THERM);

  // Register addresses of the control/status register file (I2C side).
  typedef enum logic [7:0] {
    REG_CTRL    = 8'h00,  // [0] bdlev_en [1] cdr_en [2] dfe_en [3] dfe_adapt_en
    REG_RATIO   = 8'h01,  // [3:0] alpha (up weight) [7:4] beta (down weight)
    REG_CTLE    = 8'h02,  // [5:0] CTLE R-ladder position
    REG_OFS0    = 8'h03,  // [4:0] data-sampler offset code, slice 0
    REG_OFS1    = 8'h04,
    REG_OFS2    = 8'h05,
    REG_OFS3    = 8'h06,
    REG_PI_MAN  = 8'h07,  // [6:0] PI code used while CDR adaptation is off
    REG_W1_MAN  = 8'h08,  // tap-1 weight used while DFE adaptation is off
    REG_W2_MAN  = 8'h09,  // tap-2 weight used while DFE adaptation is off
    REG_G_CDR   = 8'h0A,  // update gain alpha_C of the CDR loop
    REG_G_W1    = 8'h0B,  // update gain of the tap-1 loop
    REG_G_W2    = 8'h0C,  // update gain of the tap-2 loop
    REG_BDLEV0  = 8'h10,  // read only: Bdlev code, slice 0..3
    REG_BDLEV1  = 8'h11,
    REG_BDLEV2  = 8'h12,
    REG_BDLEV3  = 8'h13,
    REG_PI      = 8'h14,  // read only: PI code in use
    REG_W1      = 8'h15,  // read only: tap-1 weight code in use
    REG_W2      = 8'h16   // read only: tap-2 weight code in use
  } reg_addr_e;

  // Settings delivered by the register file to the datapath.
  typedef struct packed {
    logic                bdlev_en;
    logic                cdr_en;
    logic                dfe_en;
    logic                dfe_adapt_en;
    logic [3:0]          alpha;
    logic [3:0]          beta;
    logic [CTLE_BITS-1:0] ctle_code;
    logic [NSLICE-1:0][OFS_BITS-1:0] ofs_code;
    logic [PI_BITS-1:0]  pi_man;
    logic [DAC_BITS-1:0] w1_man;
    logic [DAC_BITS-1:0] w2_man;
    logic [7:0]          gain_cdr;
    logic [7:0]          gain_w1;
    logic [7:0]          gain_w2;
  } rx_cfg_t;

  // Adapted codes read back through the register file.
  typedef struct packed {
    logic [NSLICE-1:0][DAC_BITS-1:0] bdlev;
    logic [PI_BITS-1:0]              pi_code;
    logic [DAC_BITS-1:0]             w1;
    logic [DAC_BITS-1:0]             w2;
  } rx_status_t;

endpackage
