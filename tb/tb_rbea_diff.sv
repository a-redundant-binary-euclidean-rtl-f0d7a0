// tb_rbea_diff: self-checking test of the combined diff / decomp / shift
// step.
//
// Random normalized 33-digit fractions P and Q (standard and complement
// form, either sign) are built here. For each of the three terms
// P diff Q, 2P diff Q and P diff 2Q whose exact value is below 1/2 in
// magnitude (the only terms the algorithm ever applies) the block's output
// must have exactly twice that value, the folded integer part must be in
// range, and a nonzero complement bit in the output must come with b1 = 0
// (normalized complement form). The decomp and complement-form cases must
// each occur at least once.
module tb_rbea_diff;
  import rbea_pkg::*;

  localparam int N = 32;
  localparam longint ONE = longint'(1) << N;

  int checks = 0;
  int failures = 0;
  int n_dec = 0, n_comp = 0, n_applied = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sdig_t p [N+1], q [N+1], r [N+1];
  sel_t sel;
  logic sub, fold_ok, decomp_used, complement_out, absorbed;

  rbea_diff #(.N(N)) dut (
    .p(p), .q(q), .sel(sel), .sub(sub), .r(r), .fold_ok(fold_ok),
    .decomp_used(decomp_used), .complement_out(complement_out), .absorbed(absorbed)
  );

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
  function automatic longint labs(input longint v);
    return (v < 0) ? -v : v;
  endfunction

  // Random normalized fraction into a, value returned (x 2^N).
  function automatic longint rnd_norm(output sdig_t a [N+1]);
    int dg [N+1];
    longint tail;
    forever begin
      for (int i = 0; i <= N; i++) dg[i] = int'($urandom_range(0, 2)) - 1;
      if ($urandom_range(0, 1) == 0) begin
        dg[1] = 0;
        tail = 0;
        for (int i = 1; i <= N; i++) tail = 2 * tail + longint'(dg[i]);
        if (tail == 0) continue;
        dg[0] = (tail > 0) ? -1 : 1;
      end else begin
        dg[0] = 0;
        if (dg[1] == 0 || dg[2] == -dg[1]) continue;
      end
      for (int i = 0; i <= N; i++) a[i] = mk(dg[i]);
      return val(a);
    end
  endfunction

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint pv, qv, tv;
    logic same;
    for (int k = 0; k < 20000; k++) begin
      pv = rnd_norm(p);
      qv = rnd_norm(q);
      same = (pv < 0) == (qv < 0);
      sub = same;
      for (int s = 0; s < 3; s++) begin
        sel = sel_t'(s);
        unique case (sel)
          SEL_P_Q:  tv = same ? pv - qv : pv + qv;
          SEL_2P_Q: tv = same ? 2 * pv - qv : 2 * pv + qv;
          default:  tv = same ? pv - 2 * qv : pv + 2 * qv;
        endcase
        if (!(2 * labs(tv) < ONE)) continue;
        #1;
        n_applied++;
        if (decomp_used) n_dec++;
        if (complement_out) n_comp++;
        checks++;
        if (!fold_ok || val(r) != 2 * tv || (dv(r[0]) != 0 && dv(r[1]) != 0)) begin
          failures++;
          $display("FAIL sel %0d: P=%0d Q=%0d term=%0d got %0d", s, pv, qv, tv, val(r));
        end
      end
    end
    $display("applied %0d, decomp %0d, complement-form results %0d", n_applied, n_dec, n_comp);
    checks++;
    if (n_dec == 0 || n_comp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
