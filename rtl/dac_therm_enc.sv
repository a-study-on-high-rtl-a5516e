// dac_therm_enc: binary-to-thermometer decoder in front of an 8-bit
// thermometer-coded differential current DAC.
//
// The receiver drives its adapted analog quantities (the error-comparator
// references set by the Bdlev loops and the two DFE tap weights) through
// thermometer-coded current DACs, which are monotonic by construction: raising
// the code by one switches on exactly one more unit cell. This block turns
// the 8-bit binary code into 255 unit-cell enables: cell i is on when
// i < code. Purely combinational.
//
// The 8-bit resolution and the thermometer coding are those of the
// described DACs; reading "8-bit thermometer-coded" as 255 unit cells (rather
// than 8 segments) is this design's interpretation.
module dac_therm_enc #(
  parameter int unsigned BITS = 8,
  localparam int unsigned NCELL = (1 << BITS) - 1
) (
  input  logic [BITS-1:0]  code,
  output logic [NCELL-1:0] cell_on
);

  always_comb begin
    for (int i = 0; i < NCELL; i++) cell_on[i] = (BITS'(i) < code);
  end

endmodule
