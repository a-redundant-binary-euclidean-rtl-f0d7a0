// tb_sd_simshift: self-checking test of the simplifying left shift.
//
// For random 33-digit fractions with b0 = 0 it checks that the result is
// exactly twice the input value, that the absorbed flag is set exactly when
// b1 != 0 and b2 = -b1, and that an unnormalized input never produces a
// nonzero complement bit. Directed cases cover 0.1 1bar ... (absorb),
// 0.0 ... (plain shift) and 0.1 0 1bar ... (shift into the complement bit).
module tb_sd_simshift;
  import rbea_pkg::*;

  localparam int N = 32;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sdig_t d [N+1], q [N+1];
  logic absorbed;

  sd_simshift #(.N(N)) dut (.d(d), .q(q), .absorbed(absorbed));

  function automatic sdig_t mk(input int v);
    return '{pos: (v == 1), neg: (v == -1)};
  endfunction
  function automatic int dv(input sdig_t a);
    return (a.pos ? 1 : 0) - (a.neg ? 1 : 0);
  endfunction
  function automatic longint val(input sdig_t a [N+1]);
    longint v = 0;
    for (int i = 0; i <= N; i++) v = 2 * v + longint'(dv(a[i]));
    return v;
  endfunction

  task automatic check(input string what);
    logic unnorm;
    #1;
    unnorm = (dv(d[1]) == 0) || (dv(d[2]) == -dv(d[1]));
    checks++;
    if (val(q) != 2 * val(d) || absorbed !== (dv(d[1]) != 0 && dv(d[2]) == -dv(d[1]))
        || (unnorm && dv(q[0]) != 0)) begin
      failures++;
      $display("FAIL %s: in %0d out %0d absorbed %0b", what, val(d), val(q), absorbed);
    end
  endtask

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i <= N; i++) d[i] = mk(0);
    d[1] = mk(1); d[2] = mk(-1); d[5] = mk(1);
    check("absorb");
    for (int i = 0; i <= N; i++) d[i] = mk(0);
    d[3] = mk(-1); d[N] = mk(1);
    check("plain");
    for (int i = 0; i <= N; i++) d[i] = mk(0);
    d[1] = mk(1); d[3] = mk(-1); d[4] = mk(-1);
    check("into complement bit");
    for (int k = 0; k < 20000; k++) begin
      d[0] = mk(0);
      for (int i = 1; i <= N; i++) d[i] = mk(int'($urandom_range(0, 2)) - 1);
      // the input must be unnormalized or below 1/2 in magnitude
      if (dv(d[1]) != 0 && dv(d[2]) == dv(d[1])) d[2] = mk(0);
      if (dv(d[1]) != 0 && dv(d[2]) == 0 && $urandom_range(0, 1) == 1) d[1] = mk(0);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
