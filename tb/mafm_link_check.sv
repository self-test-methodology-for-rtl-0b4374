// mafm_link_check -- testbench helper: one N-line link tested twice, once
// from a stand-alone generator into a stand-alone detector and once between
// two TG/EDs (A generates, B detects).  In each run one random vector gets
// one flipped line; the detector must flag exactly that vector, one clock
// later, and the run must last 6*N clocks.  Results are added to checks and
// failures.
module mafm_link_check
  import xt_pkg::*;
#(
  parameter int N = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic finished,
  output int   checks,
  output int   failures
);
  logic         en = 0;
  logic [N-1:0] tg_b, flip = '0, wire_tg, wire_ab;
  logic         tg_act, tg_done, ed_flag, ed_act;
  ep_ctrl_t     ca = '0, cb = '0;
  logic [N-1:0] a_out, b_out, a_in_unused, b_in_unused;
  logic         a_oe, b_oe, a_flag, b_flag;

  mafm_test_generator #(.N(N)) u_tg (.clk, .rst_n, .t_enable(en), .agg_only(1'b0), .b(tg_b),
                                     .active(tg_act), .done(tg_done));
  assign wire_tg = tg_b ^ flip;
  mafm_error_detector #(.N(N)) u_ed (.clk, .rst_n, .t_enable(en), .agg_only(1'b0), .bus_in(wire_tg),
                                     .err_flag(ed_flag), .active(ed_act));

  assign wire_ab = (a_oe ? a_out : b_out) ^ flip;
  mafm_tg_ed #(.N(N)) u_a (.clk, .rst_n, .t_mode(1'b1), .ctrl(ca), .core_out('0), .core_oe(1'b0),
                           .core_in(a_in_unused), .bus_out(a_out), .bus_oe(a_oe), .bus_in(wire_ab),
                           .err_flag(a_flag));
  mafm_tg_ed #(.N(N)) u_b (.clk, .rst_n, .t_mode(1'b1), .ctrl(cb), .core_out('0), .core_oe(1'b0),
                           .core_in(b_in_unused), .bus_out(b_out), .bus_oe(b_oe), .bus_in(wire_ab),
                           .err_flag(b_flag));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL N=%0d %s at %0t", N, what, $time);
    end
  endtask

  task automatic run(bit pair);
    int bad, cycles, nflag;
    bad = $urandom_range(0, 6 * N - 1);
    if (pair) begin
      ca = '{agg_only: 1'b0, gen: 1'b1, en: 1'b1};
      cb = '{agg_only: 1'b0, gen: 1'b0, en: 1'b1};
    end else en = 1;
    @(negedge clk);
    cycles = 0; nflag = 0;
    while ((pair ? (u_a.tg_active) : tg_act) && cycles < 1000) begin
      flip = (cycles == bad) ? (N'(1) << (bad % N)) : '0;
      nflag += int'(pair ? b_flag : ed_flag);
      if (pair ? b_flag : ed_flag) check(cycles - 1 == bad, "flag on the corrupted vector");
      @(negedge clk);
      cycles++;
    end
    flip = '0;
    nflag += int'(pair ? b_flag : ed_flag);
    if (pair ? b_flag : ed_flag) check(cycles - 1 == bad, "flag on the last vector");
    check(cycles == 6 * N, $sformatf("%s run length %0d", pair ? "TG/ED" : "TG->ED", cycles));
    check(nflag == 1, $sformatf("%s one error flagged (%0d)", pair ? "TG/ED" : "TG->ED", nflag));
    check(!a_flag, "generating TG/ED never flags");
    en = 0; ca = '0; cb = '0;
    @(negedge clk);
  endtask

  initial begin
    checks = 0; failures = 0; finished = 0;
    wait (start);
    @(negedge clk);
    run(1'b0);
    run(1'b1);
    finished = 1;
  end
endmodule
