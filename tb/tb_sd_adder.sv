// tb_sd_adder: self-checking test of the carry-free redundant binary adder.
//
// Drives random signed-bit operands (W = 35 digits, plus a 9-digit instance)
// and directed extremes (all +1, all -1, alternating signs), and checks that
// the integer value of the sum equals the sum of the operand values, that no
// output digit uses the illegal {pos,neg} = {1,1} code, and that changing
// operand digits three or more places below a position never changes that
// result digit (the limited transfer reach the algorithm relies on).
module tb_sd_adder;
  import rbea_pkg::*;

  localparam int W = 35;
  localparam int WS = 9;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  sdig_t x [W], y [W];
  sdig_t s [W+1];
  sdig_t xs [WS], ys [WS], xs2 [WS], ys2 [WS];
  sdig_t ss [WS+1], ss2 [WS+1];

  sd_adder #(.W(W))  dut   (.x(x), .y(y), .s(s));
  sd_adder #(.W(WS)) dut_s (.x(xs), .y(ys), .s(ss));
  sd_adder #(.W(WS)) dut_t (.x(xs2), .y(ys2), .s(ss2));

  function automatic sdig_t rdig();
    case ($urandom_range(0, 2))
      0: return '{pos: 1'b0, neg: 1'b0};
      1: return '{pos: 1'b1, neg: 1'b0};
      default: return '{pos: 1'b0, neg: 1'b1};
    endcase
  endfunction

  // value with digit i of an L-digit number weighted 2^(L-1-i)
  function automatic longint val_w(input sdig_t a [W]);
    longint v = 0;
    for (int i = 0; i < W; i++) v = 2 * v + (a[i].pos ? 1 : 0) - (a[i].neg ? 1 : 0);
    return v;
  endfunction
  function automatic longint val_w1(input sdig_t a [W+1]);
    longint v = 0;
    for (int i = 0; i <= W; i++) v = 2 * v + (a[i].pos ? 1 : 0) - (a[i].neg ? 1 : 0);
    return v;
  endfunction

  task automatic check_sum(input string what);
    logic bad;
    #1;
    bad = 1'b0;
    for (int i = 0; i <= W; i++) if (s[i].pos && s[i].neg) bad = 1'b1;
    checks++;
    if (bad || val_w1(s) != val_w(x) + val_w(y)) begin
      failures++;
      $display("FAIL %s: %0d + %0d gave %0d", what, val_w(x), val_w(y), val_w1(s));
    end
  endtask

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < W; i++) begin x[i] = '{1'b1, 1'b0}; y[i] = '{1'b1, 1'b0}; end
    check_sum("all ones");
    for (int i = 0; i < W; i++) begin x[i] = '{1'b0, 1'b1}; y[i] = '{1'b0, 1'b1}; end
    check_sum("all minus ones");
    for (int i = 0; i < W; i++) begin
      x[i] = (i % 2 == 0) ? '{1'b1, 1'b0} : '{1'b0, 1'b1};
      y[i] = (i % 3 == 0) ? '{1'b0, 1'b1} : '{1'b1, 1'b0};
    end
    check_sum("alternating");
    for (int k = 0; k < 20000; k++) begin
      for (int i = 0; i < W; i++) begin x[i] = rdig(); y[i] = rdig(); end
      check_sum("random");
    end
    // locality: digit j of the sum depends only on positions j-1 .. j+1 of
    // the operands (s has one extra leading position)
    for (int k = 0; k < 5000; k++) begin
      int j;
      for (int i = 0; i < WS; i++) begin xs[i] = rdig(); ys[i] = rdig(); end
      j = $urandom_range(0, WS - 3);
      xs2 = xs; ys2 = ys;
      for (int i = j + 2; i < WS; i++) begin xs2[i] = rdig(); ys2[i] = rdig(); end
      #1;
      for (int i = 0; i <= j; i++) begin
        checks++;
        if (ss[i] != ss2[i]) begin
          failures++;
          $display("FAIL locality: sum digit %0d changed by operand digits from %0d", i, j + 2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
