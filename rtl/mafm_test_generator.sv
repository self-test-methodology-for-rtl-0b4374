// mafm_test_generator -- Maximal Aggressor crosstalk test generator for an
// N-line bus.
//
// For every line i = 0..N-1 in turn, the line is made the victim and all
// other lines aggressors, and the six MA vectors are emitted, one per clock:
//   (victim,aggressor) = (0,0) (0,1) (1,1) (1,0) (0,1) (1,0)
// covering the positive glitch, negative glitch, falling delay and rising
// delay faults of that victim.  A full run therefore takes 6*N clocks.
//
// Structure (as in the published generator design): a Moore FSM S0..S6
// whose outputs are the victim value and the aggressor value, a victim
// counter of ceil(log2 N) bits, a log2N-to-N decoder producing the select
// lines q[i], and one 2:1 multiplexer per line, b[i] = q[i] ? victim :
// aggressor.  S0 waits for T_enable; on it the FSM resets the victim counter
// and goes to S1.  At S6 the FSM returns to S1 and advances the counter, or,
// when q[N-1] is set, returns to S0.
//
// Choices of this design, where the published description leaves them open:
//  * T_enable is level sensitive: while it stays high in S0 a new run starts,
//    and when it falls in any state the FSM returns to S0 on the next clock.
//  * agg_only suppresses the victim (all q[i] = 0) and makes the FSM cycle
//    S1..S6 until T_enable falls.  This is how a bus takes part as pure
//    aggressor when several buses are tested together.
//  * The counter wraps from N-1 to 0, so N need not be a power of two.
//  * rst_n is an active-low asynchronous reset to S0 and victim 0.
//
// Timing: the edge that samples T_enable high in S0 enters S1, so the first
// vector is on b in the cycle after that edge; each later edge launches the
// next vector.  b is decoded from registers only and is stable for the whole
// cycle, so a receiver samples it on the following edge (one-cycle,
// at-speed launch/capture).
module mafm_test_generator
  import xt_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         t_enable,   // start / keep running (from the controller)
  input  logic         agg_only,   // all lines aggressors, no victim
  output logic [N-1:0] b,          // test vector
  output logic         active,     // FSM is in S1..S6 (b carries a test vector)
  output logic         done        // one-cycle pulse: last vector (S6, q[N-1]) is on b
);

  localparam int unsigned CW = (N > 1) ? $clog2(N) : 1;

  tg_state_t       state, state_nx;
  logic [CW-1:0]   victim_cnt;
  logic            cnt_reset, cnt_enable;
  logic [N-1:0]    q;
  ma_values_t      vals;

  // ---------------- FSM ----------------
  always_comb begin
    state_nx   = state;
    cnt_reset  = 1'b0;
    cnt_enable = 1'b0;
    if (state == TG_S0) begin
      if (t_enable) begin
        state_nx  = TG_S1;
        cnt_reset = 1'b1;
      end
    end else if (!t_enable) begin
      state_nx = TG_S0;
    end else begin
      unique case (state)
        TG_S1: state_nx = TG_S2;
        TG_S2: state_nx = TG_S3;
        TG_S3: state_nx = TG_S4;
        TG_S4: state_nx = TG_S5;
        TG_S5: state_nx = TG_S6;
        TG_S6: begin
          if (agg_only || !q[N-1]) begin
            state_nx   = TG_S1;
            cnt_enable = 1'b1;
          end else begin
            state_nx = TG_S0;
          end
        end
        default: state_nx = TG_S0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= TG_S0;
    else        state <= state_nx;
  end

  // ---------------- victim counter ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      victim_cnt <= '0;
    end else if (cnt_reset) begin
      victim_cnt <= '0;
    end else if (cnt_enable) begin
      if (victim_cnt == CW'(N - 1)) victim_cnt <= '0;
      else                          victim_cnt <= victim_cnt + 1'b1;
    end
  end

  // ---------------- decoder and line multiplexers ----------------
  always_comb begin
    q = '0;
    if (!agg_only) q[victim_cnt] = 1'b1;
  end

  assign vals   = ma_vector(state);
  assign active = (state != TG_S0);
  assign done   = (state == TG_S6) && q[N-1] && !agg_only;

  always_comb begin
    for (int i = 0; i < N; i++) b[i] = q[i] ? vals.victim : vals.aggressor;
  end

  // The victim counter never leaves 0..N-1.
  a_cnt_range: assert property (@(posedge clk) disable iff (!rst_n) int'(victim_cnt) < int'(N))
    else $error("victim counter out of range");

endmodule
