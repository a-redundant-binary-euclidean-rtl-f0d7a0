// rb_to_bin: converts a redundant binary integer to its magnitude in plain
// binary.
//
// The digits d[0..N] are an integer with d[N] the unit position, so the
// value is sum d[i] * 2^(N-i). The positive and negative digits are gathered
// into two binary words and subtracted with an ordinary carry-propagate
// subtractor; the magnitude of the two's complement difference is returned.
// This conversion is needed once, at the end of a gcd computation, to present
// the result (which may come out negative in redundant form) as an unsigned
// number; it is this design's own addition.
//
// Interface: d has N+1 digits; mag is N bits (the value must have magnitude
// below 2^N); is_neg is the sign. Purely combinational.
module rb_to_bin
  import rbea_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  sdig_t            d [N+1],
  output logic [N-1:0]     mag,
  output logic             is_neg
);

  logic [N:0] pv, nv, diffv;

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      pv[N-i] = d[i].pos;
      nv[N-i] = d[i].neg;
    end
    diffv  = pv - nv;
    is_neg = diffv[N];
    mag    = is_neg ? N'(-diffv) : diffv[N-1:0];
  end

endmodule
