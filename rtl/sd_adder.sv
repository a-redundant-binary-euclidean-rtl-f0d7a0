// sd_adder: carry-free redundant binary adder (a row of 4-2 signed 1-bit
// adder cells).
//
// Each cell takes the two signed bits x[i], y[i] (four wires) and forms
// z = x[i] + y[i] in {-2..2}. It splits z into a transfer t[i] towards the
// next more significant position and an interim sum w[i], z = 2*t[i] + w[i].
// For z = +-1 the split looks one position down: if both digits there are
// non-negative (so that position can only send a transfer of 0 or +1) the cell
// chooses w = -1, otherwise w = +1. The result digit s = w[i] + t[i+1] then
// always lies in {-1, 0, 1}, so a transfer never travels more than one
// position and s[i] depends only on positions i, i+1 and i+2. The addition
// therefore takes constant time whatever W is, which is the property the gcd
// algorithm relies on.
//
// Interface: x, y are W digits with index 0 the most significant; s has W+1
// digits, s[0] being the transfer out of position 0 (one position above x[0]).
// The value of s equals x + y exactly. Purely combinational.
//
// The algorithm only asks for a constant-time signed-bit adder; the transfer
// rule used here is the classic one for such adders and is this design's
// choice.
module sd_adder
  import rbea_pkg::*;
#(
  parameter int unsigned W = 35
) (
  input  sdig_t x [W],
  input  sdig_t y [W],
  output sdig_t s [W+1]
);

  logic signed [2:0] z [W];
  logic signed [2:0] t [W+1];  // t[i] enters position i-1; t[W] is always 0
  logic signed [2:0] w [W];
  logic              lo_nonneg [W];

  always_comb begin
    for (int i = 0; i < W; i++) begin
      z[i] = 3'(sd_val(x[i])) + 3'(sd_val(y[i]));
      if (i == W - 1) lo_nonneg[i] = 1'b1;
      else            lo_nonneg[i] = !x[i+1].neg && !y[i+1].neg;
      unique case (z[i])
        3'sd2:   begin t[i] = 3'sd1;  w[i] = 3'sd0; end
        -3'sd2:  begin t[i] = -3'sd1; w[i] = 3'sd0; end
        3'sd1:   begin
                   if (lo_nonneg[i]) begin t[i] = 3'sd1; w[i] = -3'sd1; end
                   else              begin t[i] = 3'sd0; w[i] = 3'sd1;  end
                 end
        -3'sd1:  begin
                   if (lo_nonneg[i]) begin t[i] = 3'sd0;  w[i] = -3'sd1; end
                   else              begin t[i] = -3'sd1; w[i] = 3'sd1;  end
                 end
        default: begin t[i] = 3'sd0; w[i] = 3'sd0; end
      endcase
    end
    t[W] = 3'sd0;
    s[0] = sd_from_int(5'(t[0]));
    for (int i = 0; i < W; i++) begin
      s[i+1] = sd_from_int(5'(w[i] + t[i+1]));
    end
  end

endmodule
