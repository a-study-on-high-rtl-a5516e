// tb_ctle_onehot_dec: exhaustive check that each of the 64 ladder positions
// selects exactly its own tap.
`timescale 1ns/1ps
module tb_ctle_onehot_dec;
  logic [5:0] code;
  logic [63:0] tap_sel;
  int checks = 0, failures = 0;

  ctle_onehot_dec #(.NPOS(64)) dut (.code, .tap_sel);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 64; c++) begin
      code = 6'(c); #1;
      checks++;
      if (tap_sel != (64'd1 << c)) begin failures++; $display("FAIL code %0d", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
