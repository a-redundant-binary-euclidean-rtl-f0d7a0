// rbea_diff: one diff step of the redundant binary Euclidean algorithm,
// combined with the decomp and the simshift that always follow it.
//
// The selected term (P diff Q, 2P diff Q or P diff 2Q) is formed by shifting
// P or Q one place left and negating Q when P and Q have the same sign. The
// operands are extended by two integer positions and added in the
// constant-time redundant adder (N+3 digits). The selected term has a
// magnitude below 1/2, so the weighted sum of the result's integer positions
// is -1, 0 or 1 and is folded into the complement bit b0. decomp then clears
// b0 when b0 = -b1, and the result is shifted once (sd_simshift), which is
// always possible because the magnitude is below 1/2. Doing the diff and the
// shift in one step is the combination the algorithm points out in its
// Observation 4.
//
// Interface: p, q, r have N+1 digits (index 0 = complement bit). sel is the
// term from digit_select, sub = 1 when P and Q have the same sign. r is the
// new P; its value is twice the selected term. fold_ok reports that the folded
// integer part was in range (checked by an assertion); decomp_used and
// complement_out report the two special cases. Purely combinational.
module rbea_diff
  import rbea_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  sdig_t p [N+1],
  input  sdig_t q [N+1],
  input  sel_t  sel,
  input  logic  sub,
  output sdig_t r [N+1],
  output logic  fold_ok,
  output logic  decomp_used,
  output logic  complement_out,
  output logic  absorbed
);

  localparam int unsigned W = N + 3;

  sdig_t x [W];
  sdig_t y [W];
  sdig_t s [W+1];
  sdig_t f [N+1];   // folded sum
  sdig_t d [N+1];   // after decomp
  logic signed [4:0] top;

  always_comb begin
    // x: P at positions -2..N, or 2P (P one place up)
    // y: +-Q at positions -2..N, or +-2Q
    for (int i = 0; i < W; i++) begin
      x[i] = SD_ZERO;
      y[i] = SD_ZERO;
    end
    for (int i = 0; i <= N; i++) begin
      if (sel == SEL_2P_Q) x[i+1] = p[i];
      else                 x[i+2] = p[i];
      if (sel == SEL_P_2Q) y[i+1] = sub ? sd_neg(q[i]) : q[i];
      else                 y[i+2] = sub ? sd_neg(q[i]) : q[i];
    end
  end

  sd_adder #(.W(W)) u_add (.x(x), .y(y), .s(s));

  always_comb begin
    // s[0..3] are the positions of weight 8, 4, 2 and 1.
    top = 5'(8 * sd_val(s[0])) + 5'(4 * sd_val(s[1]))
        + 5'(2 * sd_val(s[2])) + 5'(sd_val(s[3]));
    fold_ok = (top >= -5'sd1) && (top <= 5'sd1);
    f[0] = sd_from_int(top);
    for (int i = 1; i <= N; i++) f[i] = s[i+3];
    decomp_used = sd_opp(f[0], f[1]);
    d = f;
    if (decomp_used) begin
      d[0] = SD_ZERO;
      d[1] = f[0];
    end
  end

  sd_simshift #(.N(N)) u_shift (.d(d), .q(r), .absorbed(absorbed));

  assign complement_out = sd_nz(r[0]);

endmodule
