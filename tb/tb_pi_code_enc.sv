// tb_pi_code_enc: exhaustive check of the interpolator code conversion.
// For all 128 codes: the MSBs are the gray code of the quadrant, the LSB word
// is a thermometer (ones from bit 0 up, no gaps) whose length runs up in even
// and down in odd quadrants, and neighbouring codes (including 127 -> 0)
// change the thermometer length by exactly one.
`timescale 1ns/1ps
module tb_pi_code_enc;
  logic [6:0] code;
  logic [1:0] gray_msb;
  logic [31:0] therm_lsb;
  int checks = 0, failures = 0;
  int len [128];

  pi_code_enc #(.NTHERM(32)) dut (.code, .gray_msb, .therm_lsb);

  task automatic check(input bit c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0] gray_tab [4] = '{2'b00, 2'b01, 2'b11, 2'b10};
    for (int c = 0; c < 128; c++) begin
      int q, l, n;
      code = 7'(c); #1;
      q = c / 32; l = c % 32;
      n = $countones(therm_lsb);
      len[c] = n;
      check(gray_msb == gray_tab[q], $sformatf("gray of code %0d", c));
      check(therm_lsb == 32'((64'd1 << n) - 1), $sformatf("thermometer shape code %0d", c));
      check(n == ((q % 2 == 0) ? l : 32 - l), $sformatf("length code %0d = %0d", c, n));
    end
    for (int c = 0; c < 128; c++) begin
      int d;
      d = len[(c + 1) % 128] - len[c];
      check(d == 1 || d == -1, $sformatf("step %0d -> %0d", c, (c + 1) % 128));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
