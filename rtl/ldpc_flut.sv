// ldpc_flut: combinational look-up table for f(x) = ln((1+e^-x)/(1-e^-x)).
//
// Used by both node units: the check node unit applies it to the sum of the other
// five input magnitudes, the variable node unit to the magnitude of each outgoing
// message. Input is a 6-bit unsigned magnitude, output a 4-bit magnitude, both with
// one LSB = 0.25 (table and format are defined in ldpc_pkg: LUT[m] =
// min(15, round(4*f(m/4))), LUT[0] = 15). The source architecture realises this LUT
// as combinational logic with a 6-bit input and 4-bit output; the table contents
// and the scaling are this design's choice. No clock, no latency.
module ldpc_flut
  import ldpc_pkg::*;
(
  input  logic [SUM_W-1:0] mag_in,
  output logic [MAG_W-1:0] mag_out
);
  always_comb mag_out = f_lut(mag_in);
endmodule
