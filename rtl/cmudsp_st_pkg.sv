// cmudsp_st_pkg -- test-transaction schedule of the CMUDSP bus self-test.
//
// Names the bus endpoints that carry a test structure and builds the look-up
// table (LUT) that the global test controller steps through.
//
// Endpoints (each has an ep_ctrl_t field {agg_only, gen, en} in the LUT):
//   EP_ALU_XDB, EP_ALU_YDB : ALU TG/ED on the 24-bit X and Y data buses
//   EP_BSW_XDB, EP_BSW_YDB, EP_BSW_GDB : Bus Switch TG/ED on XDB, YDB, GDB
//   EP_AGU_GDB             : AGU TG/ED on the 24-bit global data bus GDB
//   EP_AGU_AB,  EP_PCU_AB  : AGU and PCU TG/EDs on a 16-bit bidirectional
//                            address link between the two units
//   EP_AGU_TG,  EP_PCU_DET : AGU generator and PCU detector on a 16-bit
//                            one-way address link from AGU to PCU
//
// Schedule (9 transactions, 6 vectors per victim line):
//   0..2  XDB, YDB, GDB towards the Bus Switch, the three buses tested
//         together: one bus carries the victim, the other two run as pure
//         aggressors, so every line sees all 71 other lines as aggressors
//   3..5  XDB, YDB, GDB from the Bus Switch back to ALU / AGU
//   6, 7  16-bit AGU<->PCU link in both directions
//   8     16-bit AGU->PCU link into the PCU detector
// Testing both directions of bidirectional buses and testing the three data
// buses together follow the published test requirements; the exact list and
// order of transactions is this design's own schedule.
package cmudsp_st_pkg;
  import xt_pkg::*;

  localparam int unsigned NUM_EP    = 10;
  localparam int unsigned NUM_TRANS = 9;
  localparam int unsigned EN_W      = 3 * NUM_EP;
  localparam int unsigned VC_W      = 10;

  localparam int unsigned EP_ALU_XDB = 0;
  localparam int unsigned EP_ALU_YDB = 1;
  localparam int unsigned EP_BSW_XDB = 2;
  localparam int unsigned EP_BSW_YDB = 3;
  localparam int unsigned EP_BSW_GDB = 4;
  localparam int unsigned EP_AGU_GDB = 5;
  localparam int unsigned EP_AGU_AB  = 6;
  localparam int unsigned EP_PCU_AB  = 7;
  localparam int unsigned EP_AGU_TG  = 8;
  localparam int unsigned EP_PCU_DET = 9;

  // Endpoint roles.
  localparam ep_ctrl_t OFF = '{agg_only: 1'b0, gen: 1'b0, en: 1'b0};
  localparam ep_ctrl_t GEN = '{agg_only: 1'b0, gen: 1'b1, en: 1'b1};  // generator, victim walk
  localparam ep_ctrl_t DET = '{agg_only: 1'b0, gen: 1'b0, en: 1'b1};  // detector, victim walk
  localparam ep_ctrl_t GAG = '{agg_only: 1'b1, gen: 1'b1, en: 1'b1};  // generator, aggressors only
  localparam ep_ctrl_t DAG = '{agg_only: 1'b1, gen: 1'b0, en: 1'b1};  // detector, aggressors only

  typedef ep_ctrl_t [NUM_EP-1:0] ep_row_t;

  // Endpoint controls of transaction t.
  function automatic ep_row_t sched_row(int unsigned t);
    ep_row_t r;
    r = '{default: OFF};
    case (t)
      0: begin r[EP_ALU_XDB] = GEN; r[EP_ALU_YDB] = GAG; r[EP_AGU_GDB] = GAG;
               r[EP_BSW_XDB] = DET; r[EP_BSW_YDB] = DAG; r[EP_BSW_GDB] = DAG; end
      1: begin r[EP_ALU_XDB] = GAG; r[EP_ALU_YDB] = GEN; r[EP_AGU_GDB] = GAG;
               r[EP_BSW_XDB] = DAG; r[EP_BSW_YDB] = DET; r[EP_BSW_GDB] = DAG; end
      2: begin r[EP_ALU_XDB] = GAG; r[EP_ALU_YDB] = GAG; r[EP_AGU_GDB] = GEN;
               r[EP_BSW_XDB] = DAG; r[EP_BSW_YDB] = DAG; r[EP_BSW_GDB] = DET; end
      3: begin r[EP_BSW_XDB] = GEN; r[EP_ALU_XDB] = DET; end
      4: begin r[EP_BSW_YDB] = GEN; r[EP_ALU_YDB] = DET; end
      5: begin r[EP_BSW_GDB] = GEN; r[EP_AGU_GDB] = DET; end
      6: begin r[EP_AGU_AB]  = GEN; r[EP_PCU_AB]  = DET; end
      7: begin r[EP_PCU_AB]  = GEN; r[EP_AGU_AB]  = DET; end
      8: begin r[EP_AGU_TG]  = GEN; r[EP_PCU_DET] = DET; end
      default: ;
    endcase
    return r;
  endfunction

  // Vector count of transaction t: 6 vectors per line of the victim bus.
  function automatic logic [VC_W-1:0] sched_count(int unsigned t, int unsigned dw, int unsigned aw);
    return (t <= 5) ? VC_W'(MA_VECTORS * dw) : VC_W'(MA_VECTORS * aw);
  endfunction

  function automatic logic [NUM_TRANS-1:0][EN_W-1:0] lut_enables();
    logic [NUM_TRANS-1:0][EN_W-1:0] l;
    for (int unsigned t = 0; t < NUM_TRANS; t++) l[t] = sched_row(t);
    return l;
  endfunction

  function automatic logic [NUM_TRANS-1:0][VC_W-1:0] lut_counts(int unsigned dw, int unsigned aw);
    logic [NUM_TRANS-1:0][VC_W-1:0] l;
    for (int unsigned t = 0; t < NUM_TRANS; t++) l[t] = sched_count(t, dw, aw);
    return l;
  endfunction

endpackage
