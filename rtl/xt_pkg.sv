// xt_pkg -- shared types for the crosstalk self-test structures.
//
// Holds the state type of the Maximal Aggressor (MA) test generator, the
// 6-vector MA pattern, the state type of the global test controller and the
// per-endpoint enable bundle that the controller's look-up table drives.
//
// The MA pattern follows the six rows of the 6-vector test sequence: every
// vector has only two distinct values, one on the victim line and one shared
// by all aggressor lines:
//   S1 (0,0)  S2 (0,1)  S3 (1,1)  S4 (1,0)  S5 (0,1)  S6 (1,0)   (victim,aggressor)
// S1->S2 tests the positive glitch, S3->S4 the negative glitch, S4->S5 the
// falling delay and S5->S6 the rising delay of the victim.  The state
// encodings below are this design's own choice.
package xt_pkg;

  // Test generator FSM: S0 is idle, S1..S6 emit the six vectors.
  typedef enum logic [2:0] {
    TG_S0 = 3'd0,
    TG_S1 = 3'd1,
    TG_S2 = 3'd2,
    TG_S3 = 3'd3,
    TG_S4 = 3'd4,
    TG_S5 = 3'd5,
    TG_S6 = 3'd6
  } tg_state_t;

  // Victim and aggressor values emitted in one state.
  typedef struct packed {
    logic victim;
    logic aggressor;
  } ma_values_t;

  // Moore outputs of the test generator FSM (6-vector MA sequence).
  function automatic ma_values_t ma_vector(tg_state_t s);
    unique case (s)
      TG_S1:   return '{victim: 1'b0, aggressor: 1'b0};
      TG_S2:   return '{victim: 1'b0, aggressor: 1'b1};
      TG_S3:   return '{victim: 1'b1, aggressor: 1'b1};
      TG_S4:   return '{victim: 1'b1, aggressor: 1'b0};
      TG_S5:   return '{victim: 1'b0, aggressor: 1'b1};
      TG_S6:   return '{victim: 1'b1, aggressor: 1'b0};
      default: return '{victim: 1'b0, aggressor: 1'b0};
    endcase
  endfunction

  // Number of vectors in one victim's MA sequence.
  localparam int unsigned MA_VECTORS = 6;

  // Global test controller FSM.
  typedef enum logic [2:0] {
    GC_IDLE      = 3'd0,  // normal operation, test structures off
    GC_TRANS_RST = 3'd1,  // transaction counter and vector counter cleared
    GC_WAIT      = 3'd2,  // current transaction running, vectors counted
    GC_TRANS_INC = 3'd3,  // next transaction selected, vector counter cleared
    GC_COMPLETE  = 3'd4   // all transactions run
  } gc_state_t;

  // Control bits of one bus endpoint (TG/ED), as stored in the LUT.
  //   en       : T_enable of the endpoint's test generator
  //   gen      : 1 = act as generator (drive the bus), 0 = act as detector
  //   agg_only : no victim on this bus; all its lines carry the aggressor
  //              value (used when several buses are tested together)
  typedef struct packed {
    logic agg_only;
    logic gen;
    logic en;
  } ep_ctrl_t;

endpackage
