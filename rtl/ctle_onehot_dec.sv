// ctle_onehot_dec: decoder for the 64-position one-hot R-ladder of the CTLE.
//
// The CTLE's degeneration resistance is picked from a resistor ladder with
// 64 taps, exactly one of which is switched on. This block turns the 6-bit
// position code written over I2C into that one-hot tap select: bit code is
// set and all others are clear. Purely combinational. The 64-way one-hot
// ladder is the described one; the binary code in front of it is this
// design's choice.
module ctle_onehot_dec #(
  parameter int unsigned NPOS = 64,
  localparam int unsigned BITS = $clog2(NPOS)
) (
  input  logic [BITS-1:0] code,
  output logic [NPOS-1:0] tap_sel
);

  always_comb begin
    tap_sel = '0;
    tap_sel[code] = 1'b1;
  end

endmodule
