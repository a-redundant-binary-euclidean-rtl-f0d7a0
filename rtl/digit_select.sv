// digit_select: look-ahead term selection of the redundant binary Euclidean
// algorithm.
//
// With P and Q both normalized, the next value of P is one of
// P diff Q, 2P diff Q or P diff 2Q, where "a diff b" is a - b when a and b
// have the same sign and a + b otherwise (its magnitude is ||a| - |b||).
// The choice depends only on whether P diff Q would be normalized:
//   not normalized              -> P diff Q   (|P diff Q| < 1/2)
//   normalized, sign = sign(P)  -> P diff 2Q  (|P| > |Q|)
//   normalized, sign != sign(P) -> 2P diff Q  (|P| < |Q|)
// and each choice gives a result of magnitude below 1/2.
//
// Because a transfer in the redundant adder moves at most one place, the
// leading three digits of P diff Q depend on positions 0..4 of P and Q only.
// This block therefore takes just those five digits of each operand, adds
// them in a 5-digit copy of the redundant adder (with two leading integer
// positions, whose value is folded into the complement bit), applies decomp
// to the leading digits and tests them for normalization.
//
// Interface: p5, q5 are positions 0..4 of P and Q; sub = 1 when P and Q have
// the same sign (diff is a subtraction); p_neg = sign of P. sel is the chosen
// term; pq_norm tells whether P diff Q was normalized. Purely combinational.
//
// The selection rule and the five-position look-ahead follow the algorithm;
// implementing the look-ahead as a short adder (rather than a table) is one
// of the two options it allows.
module digit_select
  import rbea_pkg::*;
(
  input  sdig_t p5 [5],
  input  sdig_t q5 [5],
  input  logic  sub,
  input  logic  p_neg,
  output sel_t  sel,
  output logic  pq_norm
);

  sdig_t x [7];
  sdig_t y [7];
  sdig_t s [8];
  sdig_t r [3];
  sdig_t rd [3];
  logic signed [4:0] top;
  logic d_neg;

  always_comb begin
    x[0] = SD_ZERO;
    x[1] = SD_ZERO;
    y[0] = SD_ZERO;
    y[1] = SD_ZERO;
    for (int i = 0; i < 5; i++) begin
      x[i+2] = p5[i];
      y[i+2] = sub ? sd_neg(q5[i]) : q5[i];
    end
  end

  sd_adder #(.W(7)) u_add (.x(x), .y(y), .s(s));

  always_comb begin
    // s[0..3] have weights 8, 4, 2, 1; their sum is the complement bit.
    top = 5'(8 * sd_val(s[0])) + 5'(4 * sd_val(s[1]))
        + 5'(2 * sd_val(s[2])) + 5'(sd_val(s[3]));
    r[0] = sd_from_int(top);
    r[1] = s[4];
    r[2] = s[5];
    // decomp: b0 = -b1 != 0  ->  0.b0 b2 ...
    if (sd_opp(r[0], r[1])) begin
      rd[0] = SD_ZERO;
      rd[1] = r[0];
      rd[2] = r[2];
    end else begin
      rd = r;
    end
  end

  sd_norm_detect u_norm (.d(rd), .norm(pq_norm), .neg(d_neg));

  always_comb begin
    if (!pq_norm)             sel = SEL_P_Q;
    else if (d_neg != p_neg)  sel = SEL_2P_Q;
    else                      sel = SEL_P_2Q;
  end

  // Positions below s[5] do not reach the leading three result digits.
  wire unused_low = ^{s[6], s[7]};

endmodule
