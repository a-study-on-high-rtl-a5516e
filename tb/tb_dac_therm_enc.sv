// tb_dac_therm_enc: exhaustive check of the 8-bit to 255-cell thermometer
// decoder: the number of cells on equals the code and they are the lowest
// ones.
`timescale 1ns/1ps
module tb_dac_therm_enc;
  logic [7:0] code;
  logic [254:0] cell_on;
  int checks = 0, failures = 0;

  dac_therm_enc #(.BITS(8)) dut (.code, .cell_on);

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      code = 8'(c); #1;
      checks++;
      if ($countones(cell_on) != c) begin failures++; $display("FAIL count code %0d", c); end
      for (int i = 0; i < 255; i++) begin
        checks++;
        if (cell_on[i] != (i < c)) begin failures++; $display("FAIL cell %0d code %0d", i, c); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
