// rx_des: deserializer of the quarter-rate sampler outputs.
//
// Every cycle of the quarter-rate clock the four data comparators and the four
// error comparators each deliver one decision; slice 0 holds the earliest
// unit interval and slice 3 the latest. The deserializer gathers RATIO such
// groups into one parallel word per stream (data and error) and raises
// word_valid for one cycle when a word is complete. Bit k of a word is the
// k-th unit interval in time (bit 0 the oldest), so bit k-1 of the data word
// is the previous bit of bit k, which the adaptation logic relies on.
//
// Timing: a word is available, with word_valid high, in the cycle after its
// last group was sampled; one word every RATIO cycles. The digital back end
// uses word_valid as its clock enable, so in silicon it could run from the
// clock divided by RATIO.
//
// The receiver description names the deserializer but gives neither its
// ratio nor its ordering; both are choices of this design (default ratio 4,
// a 16-bit word for a 4-slice front end).
//
// The assertions at the end state the word rate (one word_valid every RATIO cycles); they are
// switched off while rst_n is low, which is why lint reports rst_n as used
// both asynchronously (the flip-flops) and synchronously (the checks). The
// flip-flops themselves use rst_n only as an asynchronous reset.
module rx_des #(
  parameter int unsigned NSLICE = 4,
  parameter int unsigned RATIO  = 4,     // at least 2
  localparam int unsigned W     = NSLICE * RATIO
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NSLICE-1:0] d_q,        // data decisions of this cycle
  input  logic [NSLICE-1:0] e_q,        // error decisions of this cycle
  output logic [W-1:0]      d_word,
  output logic [W-1:0]      e_word,
  output logic              word_valid
);

  // the RATIO-1 groups received before the current one
  localparam int unsigned WS = W - NSLICE;
  logic [WS-1:0] d_sh, e_sh;
  logic [$clog2(RATIO+1)-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_sh       <= '0;
      e_sh       <= '0;
      cnt        <= '0;
      d_word     <= '0;
      e_word     <= '0;
      word_valid <= 1'b0;
    end else begin
      // newest group enters at the top, older groups move toward bit 0
      d_sh <= WS'({d_q, d_sh} >> NSLICE);
      e_sh <= WS'({e_q, e_sh} >> NSLICE);
      word_valid <= 1'b0;
      if (cnt == $bits(cnt)'(RATIO - 1)) begin
        cnt        <= '0;
        d_word     <= {d_q, d_sh};
        e_word     <= {e_q, e_sh};
        word_valid <= 1'b1;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  // exactly one word per RATIO cycles
  a_word_rate: assert property (@(posedge clk) disable iff (!rst_n)
    word_valid |=> !word_valid [*RATIO-1] ##1 word_valid);

endmodule
