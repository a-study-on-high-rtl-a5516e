// tb_iq_divider: checks the four divided phases against the input clock:
// phase 0 toggles on every rising input edge, phase 1 on every falling edge
// and lags phase 0 by one input half period, phases 2 and 3 are the
// complements of 0 and 1, and the output period is two input periods.
`timescale 1ps/1fs
module tb_iq_divider;
  logic clk_in = 1'b0, rst_n = 1'b0;
  logic [3:0] clk_4ph;
  int checks = 0, failures = 0;
  realtime t_rise [$];

  always #18 clk_in = ~clk_in;
  iq_divider dut (.clk_in, .rst_n, .clk_4ph);

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

  always @(posedge clk_4ph[0]) if (rst_n) t_rise.push_back($realtime);

  initial begin
    logic p0, p1;
    #100 rst_n = 1'b1;
    check(clk_4ph == 4'b1100, "reset phases");
    for (int i = 0; i < 40; i++) begin
      p0 = clk_4ph[0];
      @(posedge clk_in); #1;
      check(clk_4ph[0] == !p0, "phase 0 toggles on rising input edge");
      check(clk_4ph[1] == p0, "phase 1 still holds the old value of phase 0");
      @(negedge clk_in); #1;
      check(clk_4ph[1] == clk_4ph[0], "phase 1 follows phase 0 half an input period later");
      check(clk_4ph[2] == !clk_4ph[0] && clk_4ph[3] == !clk_4ph[1], "complement phases");
    end
    for (int i = 1; i < t_rise.size(); i++)
      check(t_rise[i] - t_rise[i-1] == 72.0, "divided period = 2 input periods");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
