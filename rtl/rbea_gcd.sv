// rbea_gcd: greatest common divisor of two N-bit unsigned integers by the
// redundant binary Euclidean algorithm (RBEA).
//
// How it works. p and q are loaded into the digit registers P and Q as
// (N+1)-digit signed bit fractions 0.b1...bN (b0 is the complement bit, free
// for an overflow). The one-hot unit registers UP and UQ start at 1 and mark
// where the unit position of each number has moved to: every left shift of P
// (or Q) shifts UP (or UQ) too, so the integer held is P * 2^N / UP. The
// controller then runs the algorithm, one register transfer per clock:
//
//   INIT   while P and Q are both unnormalized: simshift both, shift UP, UQ
//   LOOPA  while Q is unnormalized: simshift Q, shift UQ;
//          if UQ overflows (Q = 0) the gcd is in P -> RSHIFT
//   LOOPB  if P is unnormalized: swap if UP = UQ, else simshift P, shift UP
//          else take the term chosen by digit_select:
//            2P diff Q with UP = UQ          -> swap (Q is the larger one)
//            otherwise P := shift(decomp(term)), UP shifted once more for 2P;
//            shift UP; if UP was equal to UQ -> swap
//   RSHIFT shift P right until UP = 1, then present |P| on gcd
//
// A swap exchanges P with Q and UP with UQ and returns to LOOPA; it is done
// in the same clock as the step that ends LOOPB. Each diff step uses one
// constant-time redundant addition (rbea_diff) selected by the 5-digit
// look-ahead (digit_select), so the run time is O(N) clocks; the number of
// diff steps is at most the sum of the bit lengths of p and q.
//
// Interface: start (one clock, while not busy) loads p and q; busy is high
// while running; done is high from the end of a run until the next start and
// gcd then holds gcd(p, q). n_diff counts the diff steps of the last run,
// n_cycles its clocks. gcd(0, 0), which the algorithm excludes, is returned
// as 0 without running. Synchronous active-low reset.
//
// The algorithm, register set, normalization, decomp, simshift, digit
// selection and unit-position tracking follow the published method. The
// clocking (one loop step per cycle), the in-cycle swap, the handshake,
// the reset, the binary output conversion and the default N = 32 are this
// design's choices.
module rbea_gcd
  import rbea_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  p,
  input  logic [N-1:0]  q,
  output logic          busy,
  output logic          done,
  output logic [N-1:0]  gcd,
  output logic [15:0]   n_diff,
  output logic [15:0]   n_cycles
);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_LOOPA, S_LOOPB, S_RSHIFT, S_DONE
  } state_t;

  state_t state;
  sdig_t  P [N+1];
  sdig_t  Q [N+1];
  logic [N:0] UP, UQ;

  // ---- datapath -------------------------------------------------------------
  logic p_norm, p_neg, q_norm, q_neg;
  sd_norm_detect u_pnorm (.d(P[0:2]), .norm(p_norm), .neg(p_neg));
  sd_norm_detect u_qnorm (.d(Q[0:2]), .norm(q_norm), .neg(q_neg));

  wire sub = (p_neg == q_neg);

  sdig_t p_sh [N+1];
  sdig_t q_sh [N+1];
  logic  p_abs, q_abs;
  sd_simshift #(.N(N)) u_pshift (.d(P), .q(p_sh), .absorbed(p_abs));
  sd_simshift #(.N(N)) u_qshift (.d(Q), .q(q_sh), .absorbed(q_abs));

  sel_t sel;
  logic pq_norm;
  digit_select u_sel (
    .p5(P[0:4]), .q5(Q[0:4]), .sub(sub), .p_neg(p_neg),
    .sel(sel), .pq_norm(pq_norm)
  );

  sdig_t p_diff [N+1];
  logic  fold_ok, decomp_used, complement_out, diff_abs;
  rbea_diff #(.N(N)) u_diff (
    .p(P), .q(Q), .sel(sel), .sub(sub), .r(p_diff), .fold_ok(fold_ok),
    .decomp_used(decomp_used), .complement_out(complement_out),
    .absorbed(diff_abs)
  );

  logic [N-1:0] gcd_mag;
  logic         gcd_neg;
  rb_to_bin #(.N(N)) u_conv (.d(P), .mag(gcd_mag), .is_neg(gcd_neg));

  // ---- controller -----------------------------------------------------------
  wire units_eq = (UP == UQ);
  // Unit of P once 2P has been formed (only used when UP < UQ).
  wire [N:0] up_2p = {UP[N-1:0], 1'b0};

  // Events of one clock, for the loop below and for observation.
  logic ev_init_shift, ev_q_shift, ev_q_over, ev_p_shift, ev_swap_unnorm;
  logic ev_diff, ev_swap_2p, ev_swap_diff, ev_rshift;

  always_comb begin
    ev_init_shift  = (state == S_INIT) && !p_norm && !q_norm;
    ev_q_shift     = (state == S_LOOPA) && !q_norm;
    ev_q_over      = ev_q_shift && UQ[N];
    ev_p_shift     = (state == S_LOOPB) && !p_norm && !units_eq;
    ev_swap_unnorm = (state == S_LOOPB) && !p_norm && units_eq;
    ev_swap_2p     = (state == S_LOOPB) && p_norm && (sel == SEL_2P_Q) && units_eq;
    ev_diff        = (state == S_LOOPB) && p_norm && !ev_swap_2p;
    ev_swap_diff   = ev_diff && ((sel == SEL_2P_Q) ? (up_2p == UQ) : units_eq);
    ev_rshift      = (state == S_RSHIFT) && !UP[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      busy     <= 1'b0;
      done     <= 1'b0;
      gcd      <= '0;
      n_diff   <= '0;
      n_cycles <= '0;
      UP       <= '0;
      UQ       <= '0;
      for (int i = 0; i <= N; i++) begin
        P[i] <= SD_ZERO;
        Q[i] <= SD_ZERO;
      end
    end else begin
      if (busy) n_cycles <= n_cycles + 16'd1;
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            P[0] <= SD_ZERO;
            Q[0] <= SD_ZERO;
            for (int i = 1; i <= N; i++) begin
              P[i] <= '{pos: p[N-i], neg: 1'b0};
              Q[i] <= '{pos: q[N-i], neg: 1'b0};
            end
            UP       <= (N+1)'(1);
            UQ       <= (N+1)'(1);
            n_diff   <= '0;
            n_cycles <= '0;
            done     <= 1'b0;
            gcd      <= '0;
            if (p == '0 && q == '0) begin
              state <= S_DONE;
              done  <= 1'b1;
            end else begin
              state <= S_INIT;
              busy  <= 1'b1;
            end
          end
        end

        S_INIT: begin
          if (ev_init_shift) begin
            P  <= p_sh;
            Q  <= q_sh;
            UP <= UP << 1;
            UQ <= UQ << 1;
          end else begin
            state <= S_LOOPA;
          end
        end

        S_LOOPA: begin
          if (ev_q_shift) begin
            Q  <= q_sh;
            UQ <= UQ << 1;
            if (ev_q_over) state <= S_RSHIFT;
          end else begin
            state <= S_LOOPB;
          end
        end

        S_LOOPB: begin
          if (ev_p_shift) begin
            P  <= p_sh;
            UP <= UP << 1;
          end else if (ev_swap_unnorm || ev_swap_2p) begin
            P     <= Q;
            Q     <= P;
            UP    <= UQ;
            UQ    <= UP;
            state <= S_LOOPA;
          end else begin
            // diff step: new P is twice the selected term
            n_diff <= n_diff + 16'd1;
            if (ev_swap_diff) begin
              P     <= Q;
              Q     <= p_diff;
              UP    <= UQ;
              UQ    <= (sel == SEL_2P_Q) ? (up_2p << 1) : (UP << 1);
              state <= S_LOOPA;
            end else begin
              P  <= p_diff;
              UP <= (sel == SEL_2P_Q) ? (up_2p << 1) : (UP << 1);
            end
          end
        end

        S_RSHIFT: begin
          if (ev_rshift) begin
            P[0] <= SD_ZERO;
            for (int i = 1; i <= N; i++) P[i] <= P[i-1];
            UP <= UP >> 1;
          end else begin
            state <= S_DONE;
            busy  <= 1'b0;
            done  <= 1'b1;
            gcd   <= gcd_mag;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // ---- checks of the invariants the algorithm guarantees --------------------
  // A shift is only applied to a fraction whose complement bit is zero.
  a_shift_b0: assert property (@(posedge clk) disable iff (!rst_n)
    (ev_init_shift || ev_p_shift) |-> !sd_nz(P[0]));
  a_qshift_b0: assert property (@(posedge clk) disable iff (!rst_n)
    (ev_init_shift || ev_q_shift) |-> !sd_nz(Q[0]));
  // The selected term has magnitude below 1/2, so its integer part folds.
  a_fold: assert property (@(posedge clk) disable iff (!rst_n)
    ev_diff |-> fold_ok);
  // P is never shifted past the unit position of Q.
  a_units: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_LOOPB) |-> (UP <= UQ));
  // gcd is a non-negative result of the conversion (sign only of P).
  wire unused_sig = ^{gcd_neg, complement_out, decomp_used, diff_abs, p_abs,
                      q_abs, pq_norm};

endmodule
