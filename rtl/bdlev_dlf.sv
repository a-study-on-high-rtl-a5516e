// bdlev_dlf: digital loop filter that adapts the biased data level (Bdlev),
// the reference of one error comparator.
//
// The error comparator of a slice compares the equalized signal with the
// reference set by this loop's 8-bit current-DAC code. For each sample whose
// data decision is 1 the loop moves the reference up by alpha when the signal
// was above it (error decision 1) and down by beta when it was below
// (error decision 0). This is the sign-sign update of Bdlev with unequal
// weights: at equilibrium P(above) * alpha = P(below) * beta, so an
// alpha:beta of 1:3 settles where 3/4 of the "1" samples lie above the
// reference (the lower of the two eye levels h0 - |h-1|), and 1:7 where
// 7/8 lie above. Samples whose data decision is 0 do not update the loop: the
// loop tracks the upper eye only.
//
// The accumulator holds DAC_BITS integer bits and FRAC fractional bits; the
// loop gain mu is 2^-FRAC code LSB per unit of alpha or beta. All RATIO
// samples of one deserialized word are summed into a single update, applied
// when en is high. The accumulator saturates at both ends. The code output is
// the integer part of the accumulator register.
//
// From the receiver description: the update rule with unequal weights, the
// 1:3 and 1:7 ratios, one adapted reference per error comparator and the
// 8-bit DAC code. This design's own choices: ignoring data-0 samples, FRAC,
// the reset value and saturation.
module bdlev_dlf #(
  parameter int unsigned RATIO    = 4,
  parameter int unsigned DAC_BITS = 8,
  parameter int unsigned FRAC     = 6,
  parameter logic [DAC_BITS-1:0] INIT = DAC_BITS'(1 << (DAC_BITS - 2))
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,          // one deserialized word is valid
  input  logic [RATIO-1:0]    d_bits,      // data decisions of this slice
  input  logic [RATIO-1:0]    e_bits,      // error decisions of this slice
  input  logic [3:0]          alpha,       // up weight
  input  logic [3:0]          beta,        // down weight
  output logic [DAC_BITS-1:0] code
);

  localparam int unsigned AW = DAC_BITS + FRAC;
  localparam int unsigned SW = AW + 2;            // signed working width

  logic [AW-1:0]        acc;
  logic signed [SW-1:0] step;
  logic signed [SW-1:0] nxt;

  always_comb begin
    step = '0;
    for (int k = 0; k < RATIO; k++) begin
      if (d_bits[k]) begin
        if (e_bits[k]) step = step + SW'(alpha);
        else           step = step - SW'(beta);
      end
    end
    nxt = $signed({2'b00, acc}) + step;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= {INIT, {FRAC{1'b0}}};
    end else if (en) begin
      if (nxt < 0)                               acc <= '0;
      else if (nxt > $signed({2'b00, {AW{1'b1}}})) acc <= '1;
      else                                       acc <= nxt[AW-1:0];
    end
  end

  assign code = acc[AW-1:FRAC];

endmodule
