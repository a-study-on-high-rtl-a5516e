// tb_rx_csr: checks the register file: reset values of every setting, write
// and read back of every writable register with random data (only the
// implemented bits kept), status registers returning the status inputs,
// writes to read-only and unused addresses having no effect, and unused
// addresses reading 0.
`timescale 1ns/1ps
module tb_rx_csr;
  import rx_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [7:0] reg_addr, reg_wdata, reg_rdata;
  logic reg_we;
  rx_cfg_t cfg;
  rx_status_t status;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  rx_csr dut (.clk, .rst_n, .reg_addr, .reg_wdata, .reg_we, .reg_rdata, .cfg, .status);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [7:0] d);
    reg_addr = a; reg_wdata = d; reg_we = 1'b1;
    @(posedge clk); #1;
    reg_we = 1'b0;
  endtask

  task automatic rdchk(input logic [7:0] a, input logic [7:0] exp, input string what);
    reg_addr = a;
    #1;
    check(reg_rdata == exp, $sformatf("%s: addr %h read %h exp %h", what, a, reg_rdata, exp));
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // writable registers and their implemented-bit masks
    logic [7:0] addrs [13] = '{8'h00, 8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06,
                               8'h07, 8'h08, 8'h09, 8'h0A, 8'h0B, 8'h0C};
    logic [7:0] masks [13] = '{8'h0F, 8'hFF, 8'h3F, 8'h1F, 8'h1F, 8'h1F, 8'h1F,
                               8'h7F, 8'hFF, 8'hFF, 8'hFF, 8'hFF, 8'hFF};
    logic [7:0] resets [13] = '{8'h05, 8'h31, 8'h20, 8'h10, 8'h10, 8'h10, 8'h10,
                                8'h00, 8'h00, 8'h00, 8'h60, 8'h10, 8'h20};
    reg_we = 1'b0; reg_addr = '0; reg_wdata = '0;
    status.bdlev = {8'd11, 8'd22, 8'd33, 8'd44};
    status.pi_code = 7'd99; status.w1 = 8'd55; status.w2 = 8'd66;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 13; i++) rdchk(addrs[i], resets[i], "reset value");
    check(cfg.bdlev_en && !cfg.cdr_en && cfg.dfe_en && !cfg.dfe_adapt_en, "reset enables");
    check(cfg.alpha == 4'd1 && cfg.beta == 4'd3, "reset ratio 1:3");
    // random writes and read back
    for (int t = 0; t < 200; t++) begin
      int i;
      logic [7:0] d;
      i = $urandom % 13;
      d = 8'($urandom);
      wr(addrs[i], d);
      rdchk(addrs[i], d & masks[i], "read back");
    end
    // struct fields follow the registers
    wr(8'h00, 8'b1010); wr(8'h01, 8'h71); wr(8'h02, 8'd45); wr(8'h05, 8'd7);
    wr(8'h07, 8'd100); wr(8'h0B, 8'd9);
    check(!cfg.bdlev_en && cfg.cdr_en && !cfg.dfe_en && cfg.dfe_adapt_en, "CTRL bits");
    check(cfg.alpha == 4'd1 && cfg.beta == 4'd7, "ratio 1:7");
    check(cfg.ctle_code == 6'd45 && cfg.ofs_code[2] == 5'd7, "CTLE and offset codes");
    check(cfg.pi_man == 7'd100 && cfg.gain_w1 == 8'd9, "manual PI code and gain");
    // status registers
    rdchk(8'h10, 8'd44, "Bdlev 0"); rdchk(8'h11, 8'd33, "Bdlev 1");
    rdchk(8'h12, 8'd22, "Bdlev 2"); rdchk(8'h13, 8'd11, "Bdlev 3");
    rdchk(8'h14, 8'd99, "PI code"); rdchk(8'h15, 8'd55, "tap 1"); rdchk(8'h16, 8'd66, "tap 2");
    // read-only and unused addresses
    wr(8'h14, 8'h00); wr(8'h10, 8'h00); wr(8'h40, 8'hFF);
    rdchk(8'h14, 8'd99, "status not writable"); rdchk(8'h10, 8'd44, "status not writable");
    rdchk(8'h40, 8'h00, "unused reads 0"); rdchk(8'hFF, 8'h00, "unused reads 0");
    rdchk(8'h02, 8'd45, "unused write had no effect");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
