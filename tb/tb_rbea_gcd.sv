// tb_rbea_gcd: end-to-end test of the redundant binary gcd unit at its
// default size (N = 32).
//
// Runs directed cases (zero operands, equal operands, 1, powers of two,
// consecutive Fibonacci numbers, all-ones) and random pairs of random bit
// lengths, some with a forced large common factor. Each result is compared
// with a plain Euclidean gcd computed here. The number of diff steps is
// checked against the bound of the algorithm (at most the sum of the bit
// lengths of p and q) and the cycle count against 6N + 8, a bound of this
// implementation (one shift or diff per clock plus the final right shifts).
// It also counts how often each mechanism of the algorithm occurred (common
// initial shift, Q normalization, U_Q overflow, P shift, each of the three
// terms, each swap reason, absorbing shift, final right shift) and counts a
// failure for any that never happened. decomp and complement-form results
// are counted and printed only: with the adder's transfer rule a selected
// term never arrives with a nonzero complement bit or as 0.1 0 ... when the
// operands come from binary inputs, so these two cases are exercised by the
// rbea_diff test on general redundant operands instead.
module tb_rbea_gcd;
  import rbea_pkg::*;

  localparam int N = 32;
  localparam int NRAND = 20000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic [N-1:0] p = '0, q = '0;
  logic busy, done;
  logic [N-1:0] gcd;
  logic [15:0] n_diff, n_cycles;

  int checks = 0;
  int failures = 0;
  longint total_diffs = 0, total_bits = 0;

  rbea_gcd dut (.*);

  always #5 clk = ~clk;

  // mechanism counters
  int c_init, c_qsh, c_qover, c_psh, c_swu, c_sw2p, c_swd;
  int c_pq, c_2pq, c_p2q, c_decomp, c_compl, c_absorb, c_rsh;
  initial begin
    c_init = 0; c_qsh = 0; c_qover = 0; c_psh = 0; c_swu = 0; c_sw2p = 0;
    c_swd = 0; c_pq = 0; c_2pq = 0; c_p2q = 0; c_decomp = 0; c_compl = 0;
    c_absorb = 0; c_rsh = 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (dut.ev_init_shift)  c_init++;
    if (dut.ev_q_shift)     c_qsh++;
    if (dut.ev_q_over)      c_qover++;
    if (dut.ev_p_shift)     c_psh++;
    if (dut.ev_swap_unnorm) c_swu++;
    if (dut.ev_swap_2p)     c_sw2p++;
    if (dut.ev_swap_diff)   c_swd++;
    if (dut.ev_rshift)      c_rsh++;
    if (dut.ev_diff) begin
      if (dut.sel == SEL_P_Q)  c_pq++;
      if (dut.sel == SEL_2P_Q) c_2pq++;
      if (dut.sel == SEL_P_2Q) c_p2q++;
      if (dut.decomp_used)     c_decomp++;
      if (dut.complement_out)  c_compl++;
      if (dut.diff_abs)        c_absorb++;
    end
  end

  function automatic logic [N-1:0] ref_gcd(input logic [N-1:0] a, input logic [N-1:0] b);
    logic [N-1:0] x = a, y = b, t;
    while (y != 0) begin
      t = x % y;
      x = y;
      y = t;
    end
    return x;
  endfunction

  function automatic int bitlen(input logic [N-1:0] v);
    int l = 0;
    for (int i = 0; i < N; i++) if (v[i]) l = i + 1;
    return l;
  endfunction

  task automatic run(input logic [N-1:0] a, input logic [N-1:0] b);
    logic [N-1:0] expect_g;
    int cyc;
    expect_g = ref_gcd(a, b);
    @(negedge clk);
    p = a; q = b; start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    cyc = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
      if (cyc > 8 * N + 64) break;
    end
    checks++;
    if (!done || gcd !== expect_g) begin
      failures++;
      $display("FAIL gcd(%0d,%0d): got %0d expected %0d (done=%0b)", a, b, gcd, expect_g, done);
    end
    checks++;
    if (int'(n_diff) > bitlen(a) + bitlen(b)) begin
      failures++;
      $display("FAIL gcd(%0d,%0d): %0d diff steps exceed %0d", a, b, n_diff, bitlen(a) + bitlen(b));
    end
    checks++;
    if (int'(n_cycles) > 6 * N + 8) begin
      failures++;
      $display("FAIL gcd(%0d,%0d): %0d cycles", a, b, n_cycles);
    end
    total_diffs += longint'(n_diff);
    total_bits  += longint'(bitlen(a)) + longint'(bitlen(b));
  endtask

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] fa, fb, ft, a, b, g;
  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run(0, 0);
    run(0, 12345);
    run(98765, 0);
    run(1, 1);
    run(7, 7);
    run('1, '1);
    run('1, 1);
    run(1, '1);
    run('1, '1 - 1);
    run(32'h8000_0000, 32'h0000_0400);
    run(32'd3 << 20, 32'd9 << 20);
    run(48, 18);
    run(1071, 462);
    fa = 1; fb = 1;
    while (fb < 32'h6000_0000) begin
      ft = fa + fb; fa = fb; fb = ft;
    end
    run(fb, fa);
    run(fa, fb);
    for (int k = 0; k < NRAND; k++) begin
      a = $urandom() >> ($urandom_range(0, N - 1));
      b = $urandom() >> ($urandom_range(0, N - 1));
      if (k % 4 == 0) begin
        g = $urandom() >> ($urandom_range(16, N - 1));
        a = (a >> 16) * g;
        b = (b >> 16) * g;
      end
      run(a, b);
    end
    $display("diff steps per input bit: %0d/%0d", total_diffs, total_bits);
    $display("events: init=%0d qshift=%0d qover=%0d pshift=%0d swap_unnorm=%0d swap_2p=%0d swap_diff=%0d",
             c_init, c_qsh, c_qover, c_psh, c_swu, c_sw2p, c_swd);
    $display("events: PdQ=%0d 2PdQ=%0d Pd2Q=%0d decomp=%0d complement=%0d absorb=%0d rshift=%0d",
             c_pq, c_2pq, c_p2q, c_decomp, c_compl, c_absorb, c_rsh);
    checks++; if (c_init   == 0) begin failures++; $display("FAIL no initial common shift"); end
    checks++; if (c_qsh    == 0) begin failures++; $display("FAIL no Q shift"); end
    checks++; if (c_qover  == 0) begin failures++; $display("FAIL no UQ overflow"); end
    checks++; if (c_psh    == 0) begin failures++; $display("FAIL no P shift"); end
    checks++; if (c_swu    == 0) begin failures++; $display("FAIL no swap on unnormalized P"); end
    checks++; if (c_sw2p   == 0) begin failures++; $display("FAIL no swap instead of 2P diff Q"); end
    checks++; if (c_swd    == 0) begin failures++; $display("FAIL no swap after diff"); end
    checks++; if (c_pq     == 0) begin failures++; $display("FAIL no P diff Q"); end
    checks++; if (c_2pq    == 0) begin failures++; $display("FAIL no 2P diff Q"); end
    checks++; if (c_p2q    == 0) begin failures++; $display("FAIL no P diff 2Q"); end
    checks++; if (c_absorb == 0) begin failures++; $display("FAIL no absorbing shift"); end
    checks++; if (c_rsh    == 0) begin failures++; $display("FAIL no final right shift"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
