// i2c_slave: I2C target that gives an external controller access to the
// receiver's control and status registers (adaptation enables, manual codes,
// gains, and the adapted Bdlev, DFE weight and interpolator codes).
//
// Protocol: 7-bit device address DEV_ADDR. A write transfer sends the
// register pointer as its first data byte and register values in the bytes
// after it; a read transfer returns registers starting at the pointer. The
// pointer increments after every data byte in both directions, so blocks of
// registers can be moved in one transfer. Every byte is acknowledged; an
// address that does not match is ignored until the next START.
//
// SCL and SDA are sampled with the system clock through two-flip-flop
// synchronizers; START/STOP and SCL edges are detected from the synchronized
// levels, so the system clock must run at least about 8 times faster than
// SCL. SDA is open drain: sda_oe = 1 pulls the line low. reg_we pulses for one
// clock with reg_addr/reg_wdata when a data byte has been received;
// reg_rdata must show the register at reg_addr combinationally.
//
// The receiver description says only that I2C logic connects the chip to a
// PC and that the adapted codes are read through it; the protocol details
// follow the usual register-pointer convention and are this design's choice.
//
// The assertions at the end state the rule that the target leaves SDA alone while idle
// or while an address is received; they are
// switched off while rst_n is low, which is why lint reports rst_n as used
// both asynchronously (the flip-flops) and synchronously (the checks). The
// flip-flops themselves use rst_n only as an asynchronous reset.
module i2c_slave #(
  parameter logic [6:0] DEV_ADDR = 7'h2A
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       scl,
  input  logic       sda_i,
  output logic       sda_oe,
  output logic [7:0] reg_addr,
  output logic [7:0] reg_wdata,
  output logic       reg_we,
  input  logic [7:0] reg_rdata
);

  typedef enum logic [2:0] {S_IDLE, S_ADDR, S_ACK_A, S_WR, S_ACK_W, S_RD, S_ACK_R} state_e;

  state_e     state;
  logic [2:0] scl_s, sda_s;
  logic       scl_rise, scl_fall, start_c, stop_c;
  logic [3:0] bitcnt;
  logic [7:0] sh;
  logic       rw, first, acked;

  assign scl_rise = (scl_s[2:1] == 2'b01);
  assign scl_fall = (scl_s[2:1] == 2'b10);
  assign start_c  = scl_s[1] && scl_s[2] && (sda_s[2:1] == 2'b10);
  assign stop_c   = scl_s[1] && scl_s[2] && (sda_s[2:1] == 2'b01);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scl_s <= '1;
      sda_s <= '1;
    end else begin
      scl_s <= {scl_s[1:0], scl};
      sda_s <= {sda_s[1:0], sda_i};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      bitcnt    <= '0;
      sh        <= '0;
      rw        <= 1'b0;
      first     <= 1'b0;
      acked     <= 1'b0;
      sda_oe    <= 1'b0;
      reg_addr  <= '0;
      reg_wdata <= '0;
      reg_we    <= 1'b0;
    end else begin
      reg_we <= 1'b0;
      if (start_c) begin
        state  <= S_ADDR;
        bitcnt <= '0;
        sda_oe <= 1'b0;
      end else if (stop_c) begin
        state  <= S_IDLE;
        sda_oe <= 1'b0;
      end else begin
        unique case (state)
          S_IDLE: sda_oe <= 1'b0;
          S_ADDR: begin
            if (scl_rise) begin
              sh     <= {sh[6:0], sda_s[1]};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              if (sh[7:1] == DEV_ADDR) begin
                rw     <= sh[0];
                sda_oe <= 1'b1;
                state  <= S_ACK_A;
              end else begin
                state  <= S_IDLE;
              end
            end
          end
          S_ACK_A: begin
            if (scl_fall) begin
              bitcnt <= '0;
              if (rw) begin
                sh     <= reg_rdata;
                sda_oe <= ~reg_rdata[7];
                state  <= S_RD;
              end else begin
                sda_oe <= 1'b0;
                first  <= 1'b1;
                state  <= S_WR;
              end
            end
          end
          S_WR: begin
            if (scl_rise) begin
              sh     <= {sh[6:0], sda_s[1]};
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall && bitcnt == 4'd8) begin
              sda_oe <= 1'b1;
              state  <= S_ACK_W;
              if (first) begin
                reg_addr <= sh;
                first    <= 1'b0;
              end else begin
                reg_wdata <= sh;
                reg_we    <= 1'b1;
              end
            end
          end
          S_ACK_W: begin
            if (scl_fall) begin
              sda_oe <= 1'b0;
              bitcnt <= '0;
              state  <= S_WR;
            end
            // the pointer advances in the cycle after the write strobe
            if (reg_we) reg_addr <= reg_addr + 1'b1;
          end
          S_RD: begin
            if (scl_rise) begin
              bitcnt <= bitcnt + 1'b1;
            end else if (scl_fall) begin
              if (bitcnt == 4'd8) begin
                sda_oe   <= 1'b0;
                reg_addr <= reg_addr + 1'b1;
                state    <= S_ACK_R;
              end else begin
                sh     <= {sh[6:0], 1'b0};
                sda_oe <= ~sh[6];
              end
            end
          end
          S_ACK_R: begin
            if (scl_rise) begin
              acked <= ~sda_s[1];
            end else if (scl_fall) begin
              bitcnt <= '0;
              if (acked) begin
                sh     <= reg_rdata;
                sda_oe <= ~reg_rdata[7];
                state  <= S_RD;
              end else begin
                state  <= S_IDLE;
              end
            end
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end

  // the target never pulls SDA while idle or while an address is shifted in
  a_sda_quiet: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_IDLE || state == S_ADDR) |-> !sda_oe);

endmodule
