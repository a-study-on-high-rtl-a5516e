// pi_code_enc: converts the binary phase-interpolator code into the control
// word of the interpolator: 2 gray-coded MSBs that pick the pair of adjacent
// clock phases (quadrant) and 32 thermometer-coded LSBs that set the
// interpolation weight inside the quadrant.
//
// A 7-bit code gives 128 steps over one period of the 4-phase clock, 32 per
// quadrant. Gray coding of the quadrant means that only one phase selection
// changes at a quadrant boundary. To keep the output phase monotonic across
// a boundary the weight runs up in even quadrants and down in odd quadrants:
// the number of ones in the thermometer word is lsb in an even quadrant and
// 32 - lsb in an odd one. So code 31 (quadrant 0, 31 ones) and code 32
// (quadrant 1, 32 ones) differ by one thermometer element, as any two
// neighbouring codes do, including the wrap from 127 to 0.
//
// Purely combinational. The 2-bit gray MSB / 32-bit thermometer LSB split and
// the 128-step range are those of the described interpolator; the direction
// reversal in odd quadrants is this design's reading of how the two fields
// combine.
module pi_code_enc #(
  parameter int unsigned NTHERM = 32,
  localparam int unsigned LSB_BITS = $clog2(NTHERM),
  localparam int unsigned CODE_BITS = 2 + LSB_BITS
) (
  input  logic [CODE_BITS-1:0] code,
  output logic [1:0]           gray_msb,
  output logic [NTHERM-1:0]    therm_lsb
);

  logic [1:0]          quad;
  logic [LSB_BITS-1:0] lsb;
  logic [LSB_BITS:0]   ones;

  always_comb begin
    quad     = code[CODE_BITS-1 -: 2];
    lsb      = code[LSB_BITS-1:0];
    gray_msb = quad ^ (quad >> 1);
    ones     = quad[0] ? ((LSB_BITS+1)'(NTHERM) - (LSB_BITS+1)'(lsb))
                       : (LSB_BITS+1)'(lsb);
    for (int i = 0; i < NTHERM; i++) therm_lsb[i] = ((LSB_BITS+1)'(i) < ones);
  end

endmodule
