// tb_sd_norm_detect: self-checking test of the normalization/sign detector.
//
// Walks all 27 combinations of the three leading signed bits and checks
// norm against the definition (exactly one of b0, b1 nonzero, and
// b2 != -b1 when b0 = 0) and neg against the sign of the leading nonzero of
// b0, b1. For random complete fractions (12 digits, with a nonzero b0 only
// where b0 and the rest differ in sign, so the number is a valid signed bit
// fraction) it also checks the magnitude ranges: normalized implies
// |v| > 1/4 and sign(v) matches neg; unnormalized with b0 = 0 implies
// |v| < 1/2.
module tb_sd_norm_detect;
  import rbea_pkg::*;

  localparam int K = 12;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sdig_t d [3];
  logic norm, neg;
  sdig_t f [K];

  sd_norm_detect dut (.d(d), .norm(norm), .neg(neg));

  function automatic sdig_t mk(input int v);
    return '{pos: (v == 1), neg: (v == -1)};
  endfunction

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, tail, b0, r;
    logic exp_norm, exp_neg;
    for (int a = -1; a <= 1; a++)
      for (int b = -1; b <= 1; b++)
        for (int c = -1; c <= 1; c++) begin
          d[0] = mk(a); d[1] = mk(b); d[2] = mk(c);
          #1;
          exp_norm = (a != 0) ? (b == 0) : (b != 0 && c != -b);
          exp_neg  = (a != 0) ? (a < 0) : (b < 0);
          checks++;
          if (norm !== exp_norm || (exp_norm && neg !== exp_neg)) begin
            failures++;
            $display("FAIL %0d.%0d%0d: norm=%0b neg=%0b", a, b, c, norm, neg);
          end
        end
    for (int k = 0; k < 20000; k++) begin
      // random fraction of K digits, value scaled by 2^(K-1)
      tail = 0;
      for (int i = 1; i < K; i++) begin
        r = int'($urandom_range(0, 2)) - 1;
        f[i] = mk(r);
        tail = 2 * tail + r;
      end
      b0 = 0;
      if (tail > 0 && $urandom_range(0, 1) == 1) b0 = -1;
      if (tail < 0 && $urandom_range(0, 1) == 1) b0 = 1;
      f[0] = mk(b0);
      v = b0 * (1 << (K - 1)) + tail;
      d[0] = f[0]; d[1] = f[1]; d[2] = f[2];
      #1;
      checks++;
      if (norm) begin
        if (!(4 * v > (1 << (K - 1)) || 4 * v < -(1 << (K - 1))) || (neg != (v < 0))) begin
          failures++;
          $display("FAIL normalized fraction of value %0d/2^%0d", v, K - 1);
        end
      end else if (b0 == 0) begin
        if (!(2 * v < (1 << (K - 1)) && 2 * v > -(1 << (K - 1)))) begin
          failures++;
          $display("FAIL unnormalized fraction of value %0d/2^%0d", v, K - 1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
