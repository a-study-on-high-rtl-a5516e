// iq_divider: divide-by-2 quadrature clock generator.
//
// The forwarded clock is divided by two into four phases 90 degrees apart
// (0, 90, 180 and 270 degrees of the divided clock), which feed the phase
// interpolator that produces the quarter-rate sampling clocks. A master
// flip-flop toggles on the rising edge of the input clock (I); a second
// flip-flop copies it on the falling edge (Q, a quarter period of the divided
// clock later). The 180 and 270 degree phases are their complements.
//
// Interface: clk_in is the forwarded clock, rst_n an asynchronous reset that
// starts all phases low/high in a defined order; clk_4ph[0..3] are the
// 0/90/180/270 degree outputs. The first edge of phase 0 follows the first
// rising edge of clk_in after reset.
//
// The description gives the function (divide by two, four phases); the
// two-flip-flop structure is the usual one and this design's choice. In
// silicon it is a current-mode logic latch pair; this is its logic function.
module iq_divider (
  input  logic       clk_in,
  input  logic       rst_n,
  output logic [3:0] clk_4ph
);

  logic i_q, q_q;

  always_ff @(posedge clk_in or negedge rst_n) begin
    if (!rst_n) i_q <= 1'b0;
    else        i_q <= ~i_q;
  end

  always_ff @(negedge clk_in or negedge rst_n) begin
    if (!rst_n) q_q <= 1'b0;
    else        q_q <= i_q;
  end

  assign clk_4ph = {~q_q, ~i_q, q_q, i_q};

endmodule
