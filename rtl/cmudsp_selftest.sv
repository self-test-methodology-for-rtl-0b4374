// cmudsp_selftest -- crosstalk self-test structures of the CMUDSP bus system.
//
// The DSP's four units (ALU, AGU, Bus Switch, PCU) talk over 24-bit data
// buses and 16-bit address buses.  This module holds what the self-test adds
// to them: a TG/ED (combined generator/detector) at every bus interface that
// is tested in both directions, a stand-alone generator in the AGU and a
// stand-alone detector in the PCU for a one-way link, and the global test
// controller with the CMUDSP test schedule (cmudsp_st_pkg).
//
//   ALU   : TG/ED on XDB, TG/ED on YDB            (d index 0, 1)
//   Bus Sw: TG/ED on XDB, YDB, GDB                (d index 2, 3, 4)
//   AGU   : TG/ED on GDB                          (d index 5)
//           TG/ED on the AGU<->PCU address link   (a index 0)
//           generator on the AGU->PCU link        (u_*)
//   PCU   : TG/ED on the AGU<->PCU address link   (a index 1)
//           detector on the AGU->PCU link         (pcu_det_*)
//
// The units themselves and the bus wires are outside this module.  For each
// endpoint the core side (core_out/core_oe in, core_in out) and the bus side
// (bus_out/bus_oe to the tri-state driver, bus_in from the receiver) are
// ports, so the wires -- or a crosstalk fault model of them -- connect the
// endpoints outside.  XDB: d 0 <-> d 2, YDB: d 1 <-> d 3, GDB: d 5 <-> d 4,
// address link: a 0 <-> a 1, one-way link: u_bus_out -> pcu_det_bus_in.
//
// Operation: with t_mode low every endpoint passes its core's signals and
// the buses work normally.  Raising t_mode runs the nine transactions of the
// schedule at clock speed (6 vectors per line of the victim bus, one vector
// per clock, plus one clock per transaction change); test_complete rises at
// the end.  Every corrupted vector sets interrupt and is logged as
// (transaction, vector); victim line = vector / 6 of the bus that carries
// the victim in that transaction.
//
// Unit placement and bus widths follow the CMUDSP self-test description; the
// pairing of the 16-bit links and the schedule are this design's reading.
module cmudsp_selftest
  import xt_pkg::*;
  import cmudsp_st_pkg::*;
#(
  parameter int unsigned DW        = 24,  // data buses XDB, YDB, GDB
  parameter int unsigned AW        = 16,  // address links
  parameter int unsigned LOG_DEPTH = 16
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           t_mode,
  output logic                           test_complete,
  output logic                           interrupt,
  // 24-bit data bus endpoints
  input  logic [DW-1:0]                  d_core_out [6],
  input  logic [5:0]                     d_core_oe,
  output logic [DW-1:0]                  d_core_in  [6],
  output logic [DW-1:0]                  d_bus_out  [6],
  output logic [5:0]                     d_bus_oe,
  input  logic [DW-1:0]                  d_bus_in   [6],
  // 16-bit bidirectional address link endpoints (0 = AGU, 1 = PCU)
  input  logic [AW-1:0]                  a_core_out [2],
  input  logic [1:0]                     a_core_oe,
  output logic [AW-1:0]                  a_core_in  [2],
  output logic [AW-1:0]                  a_bus_out  [2],
  output logic [1:0]                     a_bus_oe,
  input  logic [AW-1:0]                  a_bus_in   [2],
  // 16-bit one-way link: AGU generator side and PCU detector side
  input  logic [AW-1:0]                  u_core_out,
  output logic [AW-1:0]                  u_bus_out,
  input  logic [AW-1:0]                  pcu_det_bus_in,
  // error log
  input  logic [$clog2(LOG_DEPTH)-1:0]   log_rd_idx,
  output logic [3:0]                     log_rd_trans,
  output logic [VC_W-1:0]                log_rd_vec,
  output logic [$clog2(LOG_DEPTH+1)-1:0] log_count,
  output logic                           log_overflow,
  output logic [3:0]                     cur_trans
);

  localparam int unsigned NUM_FLAGS = 9;
  localparam logic [NUM_TRANS-1:0][VC_W-1:0] LUT_COUNT  = lut_counts(DW, AW);
  localparam logic [NUM_TRANS-1:0][EN_W-1:0] LUT_ENABLE = lut_enables();

  logic [EN_W-1:0]      en;
  ep_row_t              ep;
  logic [NUM_FLAGS-1:0] flags;
  gc_state_t            gc_state;
  logic                 u_active, u_done, det_active;

  assign ep = ep_row_t'(en);

  // ---------------- data bus TG/EDs ----------------
  localparam int unsigned D_EP [6] = '{EP_ALU_XDB, EP_ALU_YDB, EP_BSW_XDB,
                                       EP_BSW_YDB, EP_BSW_GDB, EP_AGU_GDB};
  for (genvar i = 0; i < 6; i++) begin : g_d
    mafm_tg_ed #(.N(DW)) u_tged (
      .clk      (clk),
      .rst_n    (rst_n),
      .t_mode   (t_mode),
      .ctrl     (ep[D_EP[i]]),
      .core_out (d_core_out[i]),
      .core_oe  (d_core_oe[i]),
      .core_in  (d_core_in[i]),
      .bus_out  (d_bus_out[i]),
      .bus_oe   (d_bus_oe[i]),
      .bus_in   (d_bus_in[i]),
      .err_flag (flags[i])
    );
  end

  // ---------------- address link TG/EDs ----------------
  localparam int unsigned A_EP [2] = '{EP_AGU_AB, EP_PCU_AB};
  for (genvar i = 0; i < 2; i++) begin : g_a
    mafm_tg_ed #(.N(AW)) u_tged (
      .clk      (clk),
      .rst_n    (rst_n),
      .t_mode   (t_mode),
      .ctrl     (ep[A_EP[i]]),
      .core_out (a_core_out[i]),
      .core_oe  (a_core_oe[i]),
      .core_in  (a_core_in[i]),
      .bus_out  (a_bus_out[i]),
      .bus_oe   (a_bus_oe[i]),
      .bus_in   (a_bus_in[i]),
      .err_flag (flags[6 + i])
    );
  end

  // ---------------- one-way link: AGU generator, PCU detector -------------
  logic [AW-1:0] u_tg_vec;

  mafm_test_generator #(.N(AW)) u_agu_tg (
    .clk      (clk),
    .rst_n    (rst_n),
    .t_enable (t_mode && ep[EP_AGU_TG].en),
    .agg_only (ep[EP_AGU_TG].agg_only),
    .b        (u_tg_vec),
    .active   (u_active),
    .done     (u_done)
  );

  // T_mode multiplexer of the AGU output.
  assign u_bus_out = t_mode ? u_tg_vec : u_core_out;

  mafm_error_detector #(.N(AW)) u_pcu_det (
    .clk      (clk),
    .rst_n    (rst_n),
    .t_enable (t_mode && ep[EP_PCU_DET].en),
    .agg_only (ep[EP_PCU_DET].agg_only),
    .bus_in   (pcu_det_bus_in),
    .err_flag (flags[8]),
    .active   (det_active)
  );

  // ---------------- global test controller ----------------
  global_test_controller #(
    .NUM_TRANS (NUM_TRANS),
    .EN_W      (EN_W),
    .NUM_FLAGS (NUM_FLAGS),
    .VC_W      (VC_W),
    .LOG_DEPTH (LOG_DEPTH),
    .TW        (4),
    .VEC_COUNT (LUT_COUNT),
    .ENABLES   (LUT_ENABLE)
  ) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .t_mode        (t_mode),
    .last_trans    (4'(NUM_TRANS - 1)),
    .flags         (flags),
    .en            (en),
    .test_complete (test_complete),
    .interrupt     (interrupt),
    .cur_trans     (cur_trans),
    .state         (gc_state),
    .log_rd_idx    (log_rd_idx),
    .log_rd_trans  (log_rd_trans),
    .log_rd_vec    (log_rd_vec),
    .log_count     (log_count),
    .log_overflow  (log_overflow)
  );

endmodule
