// tb_digit_select: self-checking test of the five-position term selection.
//
// Random normalized fractions P and Q of 14 digits (standard and complement
// form, either sign) are built here; only their positions 0..4 reach the
// block. Their exact values are used to check the properties the selection
// must give:
//   pq_norm = 0  ->  |P diff Q| < 1/2
//   pq_norm = 1  ->  |P diff Q| > 1/4
//   SEL_2P_Q     ->  |P| < |Q| and |2P diff Q| < 1/2
//   SEL_P_2Q     ->  |P| > |Q| and |P diff 2Q| < 1/2
//   SEL_P_Q      ->  |P diff Q| < 1/2
// where a diff b = a - b for equal signs and a + b otherwise. It also checks
// that every one of the three terms is chosen at least once.
module tb_digit_select;
  import rbea_pkg::*;

  localparam int K = 14;
  localparam longint ONE = longint'(1) << (K - 1);  // value 1.0

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sdig_t p5 [5], q5 [5];
  logic sub, p_neg, pq_norm;
  sel_t sel;

  digit_select dut (.p5(p5), .q5(q5), .sub(sub), .p_neg(p_neg), .sel(sel), .pq_norm(pq_norm));

  function automatic sdig_t mk(input int v);
    return '{pos: (v == 1), neg: (v == -1)};
  endfunction

  function automatic longint labs(input longint v);
    return (v < 0) ? -v : v;
  endfunction

  // Random normalized fraction: digits in dg[0..K-1], value returned (x 2^(K-1)).
  function automatic longint rnd_norm(output int dg [K]);
    longint v;
    longint tail;
    forever begin
      for (int i = 0; i < K; i++) dg[i] = int'($urandom_range(0, 2)) - 1;
      if ($urandom_range(0, 2) == 0) begin
        // complement form: b1 = 0 and b0 opposite to the (nonzero) tail
        dg[1] = 0;
        tail = 0;
        for (int i = 1; i < K; i++) tail = 2 * tail + longint'(dg[i]);
        if (tail == 0) continue;
        dg[0] = (tail > 0) ? -1 : 1;
        v = longint'(dg[0]) * ONE + tail;
        return v;
      end else begin
        dg[0] = 0;
        if (dg[1] == 0 || dg[2] == -dg[1]) continue;
        v = 0;
        for (int i = 0; i < K; i++) v = 2 * v + longint'(dg[i]);
        return v;
      end
    end
  endfunction

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pd [K], qd [K];
    longint pv, qv, d1, d2p, dp2;
    int n_pq, n_2p, n_p2;
    logic same;
    n_pq = 0; n_2p = 0; n_p2 = 0;
    for (int k = 0; k < 30000; k++) begin
      pv = rnd_norm(pd);
      qv = rnd_norm(qd);
      for (int i = 0; i < 5; i++) begin p5[i] = mk(pd[i]); q5[i] = mk(qd[i]); end
      same  = (pv < 0) == (qv < 0);
      sub   = same;
      p_neg = (pv < 0);
      #1;
      d1  = same ? pv - qv : pv + qv;
      d2p = same ? 2 * pv - qv : 2 * pv + qv;
      dp2 = same ? pv - 2 * qv : pv + 2 * qv;
      checks++;
      if (!pq_norm && !(2 * labs(d1) < ONE)) begin
        failures++; $display("FAIL unnormalized P diff Q too large: %0d %0d", pv, qv);
      end
      checks++;
      if (pq_norm && !(4 * labs(d1) > ONE)) begin
        failures++; $display("FAIL normalized P diff Q too small: %0d %0d", pv, qv);
      end
      checks++;
      unique case (sel)
        SEL_P_Q: begin
          n_pq++;
          if (!(2 * labs(d1) < ONE)) begin failures++; $display("FAIL P diff Q %0d %0d", pv, qv); end
        end
        SEL_2P_Q: begin
          n_2p++;
          if (!(labs(pv) < labs(qv) && 2 * labs(d2p) < ONE)) begin
            failures++; $display("FAIL 2P diff Q %0d %0d", pv, qv);
          end
        end
        SEL_P_2Q: begin
          n_p2++;
          if (!(labs(pv) > labs(qv) && 2 * labs(dp2) < ONE)) begin
            failures++; $display("FAIL P diff 2Q %0d %0d", pv, qv);
          end
        end
        default: begin failures++; $display("FAIL illegal selection"); end
      endcase
    end
    $display("selections: P diff Q %0d, 2P diff Q %0d, P diff 2Q %0d", n_pq, n_2p, n_p2);
    checks++;
    if (n_pq == 0 || n_2p == 0 || n_p2 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
