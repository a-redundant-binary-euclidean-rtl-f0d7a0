// rbea_pkg: types and helper functions shared by the redundant binary
// Euclidean gcd datapath.
//
// A signed bit (redundant binary digit) takes the values -1, 0 and +1 and is
// held as a pos/neg bit pair: value = pos - neg. The pair {1,1} is never
// produced by any block. Numbers are arrays of digits with index 0 the most
// significant position; for a fraction b0.b1b2...bk index i has weight 2^-i,
// b0 being the complement bit.
//
// The encoding of the digit and of the term selection are this design's own
// choices; the three selectable terms are those of the algorithm.
package rbea_pkg;

  typedef struct packed {
    logic pos;
    logic neg;
  } sdig_t;

  localparam sdig_t SD_ZERO = '{pos: 1'b0, neg: 1'b0};

  // Term chosen by the digit selection for the next value of P.
  typedef enum logic [1:0] {
    SEL_P_Q  = 2'd0,  // P diff Q
    SEL_2P_Q = 2'd1,  // 2P diff Q
    SEL_P_2Q = 2'd2   // P diff 2Q
  } sel_t;

  function automatic sdig_t sd_neg(input sdig_t d);
    return '{pos: d.neg, neg: d.pos};
  endfunction

  function automatic logic sd_nz(input sdig_t d);
    return d.pos | d.neg;
  endfunction

  // True when a == -b and both are nonzero.
  function automatic logic sd_opp(input sdig_t a, input sdig_t b);
    return (a.pos & b.neg) | (a.neg & b.pos);
  endfunction

  // Signed value of one digit.
  function automatic logic signed [1:0] sd_val(input sdig_t d);
    return d.pos ? 2'sd1 : (d.neg ? -2'sd1 : 2'sd0);
  endfunction

  // Digit holding the value v, v in {-1, 0, 1}.
  function automatic sdig_t sd_from_int(input logic signed [4:0] v);
    return '{pos: (v == 5'sd1), neg: (v == -5'sd1)};
  endfunction

endpackage
