// global_test_controller -- runs a schedule of bus test transactions and
// collects the error flags of the detectors.
//
// While T_mode is low the controller idles and every enable line is low, so
// the cores use the buses normally.  Raising T_mode starts the test: the FSM
// clears the transaction and vector counters (Trans Rst / Vector Rst), then
// in Wait drives the enable lines of the current transaction from the look-up
// table (LUT) and counts the clocked test vectors.  When the vector counter
// equals the LUT's vector count for the transaction ("next transaction"), the
// FSM either advances the transaction counter and clears the vector counter
// (Trans Inc / Vector Rst) or, if the transaction counter equals the
// last-transaction register ("transactions complete"), goes to Complete and
// raises test_complete.  Dropping T_mode returns the FSM to Idle from any
// state.  The detectors' flags are ORed; each flagged vector is written to
// the error log as (transaction, vector) and sets the interrupt.
//
// LUT: row t holds VEC_COUNT[t] (vectors to run) and ENABLES[t] (the global
// enable lines En_0..En_{EN_W-1}, which the system maps onto the endpoints'
// enable, mode and bus-splitting bits).  It is fixed by parameters because
// the schedule is worked out when the test is planned.
//
// Timing: the enables rise in the first Wait cycle; a generator started by
// them shows vector k in the (k+1)-th Wait cycle, when the vector counter
// reads k+1, and a detector flags that vector one cycle later.  The log
// therefore records the counters of the previous cycle, with the vector
// number reduced by one, so the logged number is the 0-based vector index.
// The enables drop for the one Trans Inc cycle between transactions, which
// returns every generator to S0 before the next transaction starts.
//
// The FSM states, the two counters, the two comparators, the LUT, the flag
// OR and the log follow the published controller.  Encodings, widths, the
// log depth, the interrupt being cleared by a new test, and the
// last_trans input that loads the last-transaction register are this
// design's choices.
module global_test_controller
  import xt_pkg::*;
#(
  parameter int unsigned NUM_TRANS = 4,
  parameter int unsigned EN_W      = 8,
  parameter int unsigned NUM_FLAGS = 4,
  parameter int unsigned VC_W      = 16,
  parameter int unsigned LOG_DEPTH = 16,
  parameter int unsigned TW        = (NUM_TRANS > 1) ? $clog2(NUM_TRANS) : 1,
  parameter logic [NUM_TRANS-1:0][VC_W-1:0] VEC_COUNT = {16'd48, 16'd48, 16'd96, 16'd96},
  parameter logic [NUM_TRANS-1:0][EN_W-1:0] ENABLES   = {8'hC0, 8'h30, 8'h0C, 8'h03}
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           t_mode,        // Tmod: 1 = run the self-test
  input  logic [TW-1:0]                  last_trans,    // number of the last transaction to run
  input  logic [NUM_FLAGS-1:0]           flags,         // analyzer error flags
  output logic [EN_W-1:0]                en,            // generator / analyzer global enables
  output logic                           test_complete,
  output logic                           interrupt,     // an error has been logged
  output logic [TW-1:0]                  cur_trans,
  output gc_state_t                      state,
  // error log read port
  input  logic [$clog2(LOG_DEPTH)-1:0]   log_rd_idx,
  output logic [TW-1:0]                  log_rd_trans,
  output logic [VC_W-1:0]                log_rd_vec,
  output logic [$clog2(LOG_DEPTH+1)-1:0] log_count,
  output logic                           log_overflow
);

  gc_state_t       state_nx;
  logic [TW-1:0]   trans_cnt, last_q;
  logic [VC_W-1:0] vec_cnt;
  logic            next_trans, trans_complete;
  logic            any_flag;

  // Comparators.
  assign next_trans     = (vec_cnt == VEC_COUNT[trans_cnt]);
  assign trans_complete = (trans_cnt == last_q);
  assign any_flag       = |flags;

  // ---------------- FSM ----------------
  always_comb begin
    state_nx = state;
    if (!t_mode) begin
      state_nx = GC_IDLE;
    end else begin
      unique case (state)
        GC_IDLE:      state_nx = GC_TRANS_RST;
        GC_TRANS_RST: state_nx = GC_WAIT;
        GC_WAIT:      if (next_trans) state_nx = trans_complete ? GC_COMPLETE : GC_TRANS_INC;
        GC_TRANS_INC: state_nx = GC_WAIT;
        GC_COMPLETE:  state_nx = GC_COMPLETE;
        default:      state_nx = GC_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= GC_IDLE;
    else        state <= state_nx;
  end

  // ---------------- transaction, last-transaction and vector counters -------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trans_cnt <= '0;
      last_q    <= '0;
      vec_cnt   <= '0;
    end else begin
      unique case (state)
        GC_TRANS_RST: begin
          trans_cnt <= '0;
          vec_cnt   <= '0;
          last_q    <= last_trans;
        end
        GC_WAIT:      vec_cnt <= vec_cnt + 1'b1;
        GC_TRANS_INC: begin
          trans_cnt <= trans_cnt + 1'b1;
          vec_cnt   <= '0;
        end
        default: ;
      endcase
    end
  end

  // ---------------- LUT enables ----------------
  assign en            = (state == GC_WAIT) ? ENABLES[trans_cnt] : '0;
  assign test_complete = (state == GC_COMPLETE);
  assign cur_trans     = trans_cnt;

  // ---------------- error logging ----------------
  // Counters of the cycle in which the flagged vector was on the bus.
  logic            run_d;
  logic [TW-1:0]   trans_d;
  logic [VC_W-1:0] vec_d;
  logic            log_wr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_d   <= 1'b0;
      trans_d <= '0;
      vec_d   <= '0;
    end else begin
      run_d   <= (state == GC_WAIT);
      trans_d <= trans_cnt;
      vec_d   <= vec_cnt;
    end
  end

  assign log_wr = run_d && any_flag && (state != GC_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                      interrupt <= 1'b0;
    else if (state == GC_TRANS_RST)  interrupt <= 1'b0;
    else if (log_wr)                 interrupt <= 1'b1;
  end

  test_log_buffer #(.DEPTH(LOG_DEPTH), .TW(TW), .VW(VC_W)) u_log (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (state == GC_TRANS_RST),
    .wr_en    (log_wr),
    .wr_trans (trans_d),
    .wr_vec   (vec_d - 1'b1),
    .rd_idx   (log_rd_idx),
    .rd_trans (log_rd_trans),
    .rd_vec   (log_rd_vec),
    .count    (log_count),
    .overflow (log_overflow)
  );

  // A transaction never runs past its vector count.
  a_vec_bound: assert property (@(posedge clk) disable iff (!rst_n)
      (state == GC_WAIT) |-> (vec_cnt <= VEC_COUNT[trans_cnt]))
    else $error("vector counter passed the LUT count");

endmodule
