// tb_rbea_progress: measures how many diff (add/subtract) steps the gcd unit
// needs per bit of input, for operands of fixed lengths 8, 16, 24 and 32
// bits (top bit set), 2000 random pairs each, at the default N = 32.
//
// Every result is checked against a plain Euclidean gcd and every run
// against the bound of the algorithm (diff steps <= sum of the operand
// lengths). The average number of diff steps per input bit (counting both
// operands) is printed for each length; it must stay at or below 1, the
// bound, and is expected to lie near 0.4.
module tb_rbea_progress;

  localparam int N = 32;
  localparam int NPAIR = 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] p = '0, q = '0;
  logic busy, done;
  logic [N-1:0] gcd;
  logic [15:0] n_diff, n_cycles;

  int checks = 0;
  int failures = 0;

  rbea_gcd dut (.*);

  always #5 clk = ~clk;

  function automatic logic [N-1:0] ref_gcd(input logic [N-1:0] a, input logic [N-1:0] b);
    logic [N-1:0] x = a, y = b, t;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int len;
  longint diffs, cycles;
  logic [N-1:0] a, b, mask;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int li = 1; li <= 4; li++) begin
      len = 8 * li;
      mask = (len == N) ? '1 : ((N'(1) << len) - 1);
      diffs = 0;
      cycles = 0;
      for (int k = 0; k < NPAIR; k++) begin
        a = ($urandom() & mask) | (N'(1) << (len - 1));
        b = ($urandom() & mask) | (N'(1) << (len - 1));
        @(negedge clk);
        p = a; q = b; start = 1'b1;
        @(negedge clk);
        start = 1'b0;
        while (!done) @(negedge clk);
        checks++;
        if (gcd !== ref_gcd(a, b)) begin
          failures++;
          $display("FAIL gcd(%0d,%0d) = %0d", a, b, gcd);
        end
        checks++;
        if (int'(n_diff) > 2 * len) begin
          failures++;
          $display("FAIL gcd(%0d,%0d): %0d diff steps", a, b, n_diff);
        end
        diffs += longint'(n_diff);
        cycles += longint'(n_cycles);
      end
      $display("length %0d: %0d diff steps per 1000 input bits, %0d cycles per run on average",
               len, (diffs * 1000) / (longint'(NPAIR) * 2 * len), cycles / longint'(NPAIR));
      checks++;
      if (diffs > longint'(NPAIR) * 2 * len) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
