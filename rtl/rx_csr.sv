// rx_csr: control and status registers of the receiver's digital back end.
//
// Holds the settings written over I2C and presents them to the datapath as
// one rx_cfg_t struct; returns either a setting or an adapted code (rx_status_t)
// on reads. The register map is in rx_pkg (reg_addr_e). Writes to read-only
// or unused addresses are ignored; reads of unused addresses return 0.
//
// Reset values: Bdlev adaptation on, CDR and DFE adaptation off, DFE on,
// alpha:beta = 1:3, CTLE position 32, offset codes at mid-scale 16, manual
// PI code 0, manual tap weights 0, loop gains CDR 96, tap 1 16, tap 2 32.
// The gains order the loop bandwidths as the receiver description asks:
// Bdlev fastest, then DFE tap 1, tap 2, and the CDR slowest (a larger gain
// means a longer update delay). The register map and the values are this
// design's choices.
//
// Timing: a write takes effect in the cycle after reg_we; reads are
// combinational.
module rx_csr
  import rx_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic [7:0] reg_addr,
  input  logic [7:0] reg_wdata,
  input  logic       reg_we,
  output logic [7:0] reg_rdata,
  output rx_cfg_t    cfg,
  input  rx_status_t status
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.bdlev_en     <= 1'b1;
      cfg.cdr_en       <= 1'b0;
      cfg.dfe_en       <= 1'b1;
      cfg.dfe_adapt_en <= 1'b0;
      cfg.alpha        <= 4'd1;
      cfg.beta         <= 4'd3;
      cfg.ctle_code    <= CTLE_BITS'(32);
      cfg.ofs_code     <= {NSLICE{OFS_BITS'(16)}};
      cfg.pi_man       <= '0;
      cfg.w1_man       <= '0;
      cfg.w2_man       <= '0;
      cfg.gain_cdr     <= 8'd96;
      cfg.gain_w1      <= 8'd16;
      cfg.gain_w2      <= 8'd32;
    end else if (reg_we) begin
      case (reg_addr)
        REG_CTRL: begin
          cfg.bdlev_en     <= reg_wdata[0];
          cfg.cdr_en       <= reg_wdata[1];
          cfg.dfe_en       <= reg_wdata[2];
          cfg.dfe_adapt_en <= reg_wdata[3];
        end
        REG_RATIO: begin
          cfg.alpha <= reg_wdata[3:0];
          cfg.beta  <= reg_wdata[7:4];
        end
        REG_CTLE:   cfg.ctle_code   <= reg_wdata[CTLE_BITS-1:0];
        REG_OFS0:   cfg.ofs_code[0] <= reg_wdata[OFS_BITS-1:0];
        REG_OFS1:   cfg.ofs_code[1] <= reg_wdata[OFS_BITS-1:0];
        REG_OFS2:   cfg.ofs_code[2] <= reg_wdata[OFS_BITS-1:0];
        REG_OFS3:   cfg.ofs_code[3] <= reg_wdata[OFS_BITS-1:0];
        REG_PI_MAN: cfg.pi_man      <= reg_wdata[PI_BITS-1:0];
        REG_W1_MAN: cfg.w1_man      <= reg_wdata;
        REG_W2_MAN: cfg.w2_man      <= reg_wdata;
        REG_G_CDR:  cfg.gain_cdr    <= reg_wdata;
        REG_G_W1:   cfg.gain_w1     <= reg_wdata;
        REG_G_W2:   cfg.gain_w2     <= reg_wdata;
        default: ;
      endcase
    end
  end

  always_comb begin
    case (reg_addr)
      REG_CTRL:   reg_rdata = {4'b0, cfg.dfe_adapt_en, cfg.dfe_en, cfg.cdr_en, cfg.bdlev_en};
      REG_RATIO:  reg_rdata = {cfg.beta, cfg.alpha};
      REG_CTLE:   reg_rdata = 8'(cfg.ctle_code);
      REG_OFS0:   reg_rdata = 8'(cfg.ofs_code[0]);
      REG_OFS1:   reg_rdata = 8'(cfg.ofs_code[1]);
      REG_OFS2:   reg_rdata = 8'(cfg.ofs_code[2]);
      REG_OFS3:   reg_rdata = 8'(cfg.ofs_code[3]);
      REG_PI_MAN: reg_rdata = 8'(cfg.pi_man);
      REG_W1_MAN: reg_rdata = cfg.w1_man;
      REG_W2_MAN: reg_rdata = cfg.w2_man;
      REG_G_CDR:  reg_rdata = cfg.gain_cdr;
      REG_G_W1:   reg_rdata = cfg.gain_w1;
      REG_G_W2:   reg_rdata = cfg.gain_w2;
      REG_BDLEV0: reg_rdata = status.bdlev[0];
      REG_BDLEV1: reg_rdata = status.bdlev[1];
      REG_BDLEV2: reg_rdata = status.bdlev[2];
      REG_BDLEV3: reg_rdata = status.bdlev[3];
      REG_PI:     reg_rdata = 8'(status.pi_code);
      REG_W1:     reg_rdata = status.w1;
      REG_W2:     reg_rdata = status.w2;
      default:    reg_rdata = 8'h00;
    endcase
  end

endmodule
