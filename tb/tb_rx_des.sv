// tb_rx_des: drives random decisions into the deserializer, keeps the bit
// stream in time order, and checks every output word against the last
// NSLICE*RATIO bits (bit 0 oldest), for both streams. Also checks that words
// come exactly every RATIO cycles.
`timescale 1ns/1ps
module tb_rx_des;
  localparam int NS = 4, R = 4, W = NS * R;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [NS-1:0] d_q, e_q;
  logic [W-1:0] d_word, e_word;
  logic word_valid;
  logic d_hist [$], e_hist [$];
  int checks = 0, failures = 0, words = 0, last_valid = -1, cyc = 0;

  always #5 clk = ~clk;
  rx_des #(.NSLICE(NS), .RATIO(R)) dut (.clk, .rst_n, .d_q, .e_q, .d_word, .e_word, .word_valid);

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
    d_q = '0; e_q = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      d_q = NS'($urandom); e_q = NS'($urandom);
      @(posedge clk);
      for (int s = 0; s < NS; s++) begin d_hist.push_back(d_q[s]); e_hist.push_back(e_q[s]); end
      cyc++;
      #1;
      if (word_valid) begin
        logic [W-1:0] de, ee;
        for (int k = 0; k < W; k++) begin
          de[k] = d_hist[d_hist.size() - W + k];
          ee[k] = e_hist[e_hist.size() - W + k];
        end
        check(d_word == de, $sformatf("data word %h exp %h", d_word, de));
        check(e_word == ee, $sformatf("error word %h exp %h", e_word, ee));
        if (last_valid >= 0) check(cyc - last_valid == R, "word spacing");
        last_valid = cyc;
        words++;
      end
    end
    check(words == 100, $sformatf("word count %0d", words));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
