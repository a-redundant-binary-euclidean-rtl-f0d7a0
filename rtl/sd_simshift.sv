// sd_simshift: simplifying ("absorbing") left shift of a signed bit
// fraction b0.b1b2...bN, doubling its value.
//
//   b1 != 0 and b2 = -b1 :  0.b1 b3 b4 ... bN 0   (b2 absorbed: b1/2 - b1/4 = b1/4)
//   otherwise            :  b1.b2 b3 ... bN 0     (plain shift)
//
// On an unnormalized fraction with b0 = 0 this is exactly the simshift of
// the algorithm (the plain shift then has b1 = 0, so b0 stays 0). It is also
// used, after a diff and decomp, on a result of magnitude below 1/2 that may
// already look like 0.1 0 ...: the plain shift then moves b1 into the
// complement bit and gives a normalized complement-form fraction, which is
// the "at least one simshift" that may make b0 nonzero. The input must have
// b0 = 0 (asserted in the instantiating controller).
//
// Interface: d, q have N+1 digits, index 0 = b0. Purely combinational.
module sd_simshift
  import rbea_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  sdig_t d [N+1],
  output sdig_t q [N+1],
  output logic  absorbed   // the b1/b2 pair was absorbed
);

  always_comb begin
    absorbed = sd_opp(d[1], d[2]);
    if (absorbed) begin
      q[0] = SD_ZERO;
      q[1] = d[1];
      for (int i = 2; i < N; i++) q[i] = d[i+1];
    end else begin
      for (int i = 0; i < N; i++) q[i] = d[i+1];
    end
    q[N] = SD_ZERO;
  end

  // d[0] is b0, which must be zero for this shift; it takes no part in the
  // result.
  wire unused_b0 = ^d[0];

endmodule
