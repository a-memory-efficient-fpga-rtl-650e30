// Quantized scaling of a variable-to-check message magnitude.
//
// The variable node adds its inputs at a wider precision; before the result
// is stored or sent to a check node its magnitude is brought back to
// 3 bits by this piecewise rule, which approximates a scaling factor of
// about 0.75..0.9 together with saturation:
//   in >= 8      -> 7
//   4 <= in < 8  -> in - 1
//   in < 4       -> in
// Because the check node only takes minima of these magnitudes, scaling the
// variable-to-check messages is equivalent to scaling the check-to-variable
// messages by the same monotone rule (the alpha of normalized min-sum).
// The rule is the one the design specifies. Purely combinational.
//
// Ports: mag_in (IN_W bits, unsigned magnitude), mag_out (3 bits).
module ldpc_scale #(
  parameter int unsigned IN_W = 5
) (
  input  logic [IN_W-1:0]          mag_in,
  output logic [ldpc_pkg::MAG_W-1:0] mag_out
);
  import ldpc_pkg::*;

  always_comb begin
    if (mag_in >= IN_W'(8))
      mag_out = MAG_W'(MAG_MAX);
    else if (mag_in >= IN_W'(4))
      mag_out = MAG_W'(mag_in - IN_W'(1));
    else
      mag_out = MAG_W'(mag_in);
  end
endmodule
