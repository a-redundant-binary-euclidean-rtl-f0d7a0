// sd_norm_detect: normalization and sign test on the three leading signed
// bits b0, b1, b2 of a signed bit fraction.
//
// A fraction is normalized when exactly one of b0 and b1 is nonzero and, if
// b0 = 0, also b2 != -b1:
//   standard form   b0 = 0, b1 != 0, b2 != -b1   magnitude in (1/4, 1)
//   complement form b0 != 0, b1 = 0               magnitude in (1/2, 1)
// An unnormalized fraction with b0 = 0 has magnitude below 1/2. The sign of a
// normalized fraction is that of b0 when b0 is nonzero, else that of b1
// (a nonzero complement bit always dominates the rest of the number).
//
// Interface: d[0..2] = b0, b1, b2. norm = normalized; neg = sign is negative
// (meaningful when norm is set; for an unnormalized input it gives the sign
// of the leading nonzero digit among b0, b1). Purely combinational.
//
// The test follows the normalization definition of the algorithm exactly.
module sd_norm_detect
  import rbea_pkg::*;
(
  input  sdig_t d [3],
  output logic  norm,
  output logic  neg
);

  always_comb begin
    if (sd_nz(d[0])) norm = !sd_nz(d[1]);
    else             norm = sd_nz(d[1]) && !sd_opp(d[1], d[2]);
    neg = sd_nz(d[0]) ? d[0].neg : d[1].neg;
  end

endmodule
