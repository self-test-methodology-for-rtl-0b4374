// tb_mafm_tg_ed -- self-checking test of the combined test generator /
// error detector (N = 32, the default).
//
// Two TG/EDs face each other over a modelled bus wire: the wire carries the
// value of whichever endpoint enables its driver, and the testbench can flip
// one line of it in a chosen cycle to imitate a crosstalk error.  Checked:
// normal mode passes the core signals through; in test mode the generator
// side drives its own MA sequence (compared with an independent table) and
// the detector side flags exactly the corrupted vectors, one cycle later;
// the roles swap with the mode bit; the generator side never flags.
module tb_mafm_tg_ed;
  import xt_pkg::*;
  localparam int N = 32;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  localparam bit VICT [6] = '{0, 0, 1, 1, 0, 1};
  localparam bit AGGR [6] = '{0, 1, 1, 0, 1, 0};

  function automatic logic [N-1:0] ref_vec(int victim, int step);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = (i == victim) ? VICT[step] : AGGR[step];
    return v;
  endfunction

  logic         t_mode = 0;
  ep_ctrl_t     ctrl_a = '0, ctrl_b = '0;
  logic [N-1:0] core_out_a = '0, core_out_b = '0;
  logic         core_oe_a = 0, core_oe_b = 0;
  logic [N-1:0] core_in_a, core_in_b, bus_out_a, bus_out_b;
  logic         bus_oe_a, bus_oe_b, err_a, err_b;
  logic [N-1:0] wire_v, flip = '0;

  // Bus wire with optional injected error.
  always_comb begin
    wire_v = bus_oe_a ? bus_out_a : (bus_oe_b ? bus_out_b : '0);
    wire_v = wire_v ^ flip;
  end

  mafm_tg_ed dut_a (.clk, .rst_n, .t_mode, .ctrl(ctrl_a), .core_out(core_out_a), .core_oe(core_oe_a),
                    .core_in(core_in_a), .bus_out(bus_out_a), .bus_oe(bus_oe_a), .bus_in(wire_v),
                    .err_flag(err_a));
  mafm_tg_ed dut_b (.clk, .rst_n, .t_mode, .ctrl(ctrl_b), .core_out(core_out_b), .core_oe(core_oe_b),
                    .core_in(core_in_b), .bus_out(bus_out_b), .bus_oe(bus_oe_b), .bus_in(wire_v),
                    .err_flag(err_b));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One full transaction; a_sends selects the direction.  Errors are put on
  // vectors bad1 and bad2 (line = vector index mod N).
  task automatic transaction(bit a_sends, int bad1, int bad2);
    bit prev_bad;
    int nflag;
    logic [N-1:0] sent;
    ctrl_a = '{agg_only: 1'b0, gen: a_sends,  en: 1'b1};
    ctrl_b = '{agg_only: 1'b0, gen: !a_sends, en: 1'b1};
    @(negedge clk);
    prev_bad = 0;
    nflag = 0;
    for (int k = 0; k < 6 * N; k++) begin
      sent = a_sends ? bus_out_a : bus_out_b;
      check(sent == ref_vec(k / 6, k % 6), $sformatf("sent vector %0d", k));
      check(a_sends ? (bus_oe_a && !bus_oe_b) : (bus_oe_b && !bus_oe_a), "driver enables");
      flip = (k == bad1 || k == bad2) ? (N'(1) << (k % N)) : '0;
      check((a_sends ? err_b : err_a) == prev_bad, $sformatf("detector flag for vector %0d", k - 1));
      check(!(a_sends ? err_a : err_b), "generator side never flags");
      nflag += int'(a_sends ? err_b : err_a);
      prev_bad = (k == bad1 || k == bad2);
      @(negedge clk);
    end
    flip = '0;
    check((a_sends ? err_b : err_a) == prev_bad, "flag for the last vector");
    nflag += int'(a_sends ? err_b : err_a);
    check(nflag == 2, "two errors flagged");
    ctrl_a = '0; ctrl_b = '0;
    @(negedge clk);
    @(negedge clk);
    check(!err_a && !err_b, "quiet after the transaction");
  endtask

  initial begin : watchdog
    repeat (4000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Normal mode: core signals pass through, test logic idle.
    for (int k = 0; k < 20; k++) begin
      core_out_a = N'($urandom()); core_out_b = N'($urandom());
      core_oe_a = k[0]; core_oe_b = !k[0];
      ctrl_a = '{agg_only: 1'b0, gen: 1'b0, en: 1'b1};   // ignored without T_mode
      @(negedge clk);
      check(bus_out_a == core_out_a && bus_out_b == core_out_b, "normal-mode data path");
      check(bus_oe_a == core_oe_a && bus_oe_b == core_oe_b, "normal-mode output enable");
      check(core_in_a == wire_v && core_in_b == wire_v, "normal-mode receive path");
      check(!err_a && !err_b, "no flag in normal mode");
    end
    ctrl_a = '0;
    core_oe_a = 0; core_oe_b = 0;
    t_mode = 1;
    @(negedge clk);
    transaction(1'b1, 0, 77);     // A -> B
    transaction(1'b0, 5, 191);    // B -> A
    t_mode = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
