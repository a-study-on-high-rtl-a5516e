// tb_i2c_slave: checks the I2C target against a 256-byte register model.
// Writes bursts with pointer auto-increment, reads them back in bursts and
// single bytes, checks that a wrong device address is not acknowledged and
// causes no write, and that every write strobe carries the expected address
// and data.
`timescale 1ns/1ps
module tb_i2c_slave;
  logic clk = 1'b0, rst_n = 1'b0;
  logic scl, sda_pull, sda_oe, sda;
  logic [7:0] reg_addr, reg_wdata, reg_rdata;
  logic reg_we;
  logic [7:0] mem [256];
  int checks = 0, failures = 0;
  int wr_strobes = 0;

  always #5 clk = ~clk;
  assign sda = ~(sda_pull | sda_oe);

  i2c_slave #(.DEV_ADDR(7'h2A)) dut (
    .clk, .rst_n, .scl, .sda_i(sda), .sda_oe, .reg_addr, .reg_wdata, .reg_we, .reg_rdata
  );
  i2c_bfm #(.HALF(200)) bfm (.scl, .sda_pull, .sda);

  assign reg_rdata = mem[reg_addr];
  always_ff @(posedge clk) if (reg_we) begin
    mem[reg_addr] <= reg_wdata;
    wr_strobes <= wr_strobes + 1;
  end

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] wd [16], rd [16], expect_mem [256];
    logic ok, acked;
    int n0;
    for (int i = 0; i < 256; i++) begin mem[i] = 8'(i * 7 + 3); expect_mem[i] = mem[i]; end
    repeat (5) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    // burst write of 5 bytes at 0x40
    for (int i = 0; i < 16; i++) wd[i] = 8'($urandom);
    bfm.write_regs(7'h2A, 8'h40, 5, wd, ok);
    check(ok, "write burst acknowledged");
    for (int i = 0; i < 5; i++) expect_mem[8'h40 + i] = wd[i];
    check(wr_strobes == 5, "five write strobes");
    for (int i = 0; i < 256; i++) check(mem[i] == expect_mem[i], $sformatf("mem[%0h]", i));
    // burst read back of 7 bytes from 0x3F
    bfm.read_regs(7'h2A, 8'h3F, 7, rd, ok);
    check(ok, "read burst acknowledged");
    for (int i = 0; i < 7; i++)
      check(rd[i] == expect_mem[8'h3F + i], $sformatf("read %0d got %h exp %h", i, rd[i], expect_mem[8'h3F + i]));
    // single reads at random addresses
    for (int t = 0; t < 6; t++) begin
      logic [7:0] a;
      a = 8'($urandom);
      bfm.read_regs(7'h2A, a, 1, rd, ok);
      check(ok && rd[0] == expect_mem[a], $sformatf("single read %h", a));
    end
    // wrong address: no ACK, no write
    n0 = wr_strobes;
    bfm.probe(7'h2B, acked);
    check(!acked, "foreign address not acknowledged");
    wd[0] = 8'hAA;
    bfm.write_regs(7'h15, 8'h00, 1, wd, ok);
    check(!ok, "write to foreign address not acknowledged");
    check(wr_strobes == n0, "foreign write ignored");
    bfm.probe(7'h2A, acked);
    check(acked, "own address acknowledged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
