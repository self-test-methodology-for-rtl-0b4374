// tb_global_test_controller -- self-checking test of the global test
// controller with its default look-up table (4 transactions, 8 enable
// lines).
//
// The testbench keeps its own copy of the schedule and predicts, cycle by
// cycle, the enable lines: two set-up cycles after T_mode rises, then for
// each transaction count+1 cycles with the row's enables, one cycle with all
// enables low between transactions, and test_complete after the last.  It
// raises detector flags in chosen cycles and checks the log entries
// (transaction, vector index = counter of the previous cycle - 1), the
// interrupt, a shortened run through last_trans, abort by T_mode low, and
// clearing of the log and interrupt when a new test starts.
module tb_global_test_controller;
  import xt_pkg::*;
  localparam int NT = 4, EW = 8, NF = 4, VW = 16, LD = 16;
  localparam int CNT [NT] = '{96, 96, 48, 48};
  localparam logic [EW-1:0] ENS [NT] = '{8'h03, 8'h0C, 8'h30, 8'hC0};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic          t_mode = 0;
  logic [1:0]    last_trans = 2'd3;
  logic [NF-1:0] flags = '0;
  logic [EW-1:0] en;
  logic          test_complete, interrupt;
  logic [1:0]    cur_trans;
  gc_state_t     state;
  logic [3:0]    log_rd_idx = '0;
  logic [1:0]    log_rd_trans;
  logic [VW-1:0] log_rd_vec;
  logic [4:0]    log_count;
  logic          log_overflow;

  global_test_controller dut (.clk, .rst_n, .t_mode, .last_trans, .flags, .en, .test_complete,
                              .interrupt, .cur_trans, .state, .log_rd_idx, .log_rd_trans,
                              .log_rd_vec, .log_count, .log_overflow);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Flag raised in Wait cycle w of transaction t (w = -1: the cycle after
  // the transaction's last Wait cycle).
  function automatic bit flag_at(int t, int w);
    return (t == 0 && w == 2) || (t == 1 && w == 50) || (t == 2 && w == 48) ||
           (t == 3 && w == -1);
  endfunction

  int exp_t [$];
  int exp_v [$];

  // Run the schedule up to transaction `last`; flags as in flag_at.
  task automatic run(int last, bit use_flags);
    int cycles;
    exp_t.delete(); exp_v.delete();
    t_mode = 1;
    @(negedge clk);   // Trans Rst
    check(en == 0 && !test_complete, "no enables during reset of counters");
    @(negedge clk);   // first Wait cycle
    cycles = 0;
    for (int t = 0; t <= last; t++) begin
      for (int w = 0; w <= CNT[t]; w++) begin
        check(en == ENS[t], $sformatf("enables of transaction %0d cycle %0d", t, w));
        check(cur_trans == 2'(t), "current transaction");
        flags = (use_flags && flag_at(t, w)) ? 4'(1 << (t % NF)) : '0;
        if (flags != 0) begin exp_t.push_back(t); exp_v.push_back(w - 2); end
        @(negedge clk);
        cycles++;
      end
      flags = (use_flags && flag_at(t, -1)) ? 4'b1000 : '0;
      if (flags != 0) begin exp_t.push_back(t); exp_v.push_back(CNT[t] - 1); end
      if (t < last) begin
        check(en == 0, "enables low between transactions");
        check(!test_complete, "not complete yet");
        @(negedge clk);
        cycles++;
      end
    end
    check(test_complete, $sformatf("complete after %0d cycles", cycles));
    check(en == 0, "enables low when complete");
    @(negedge clk);
    flags = '0;
    check(test_complete, "complete holds");
    check(interrupt == (exp_t.size() > 0), "interrupt");
    check(int'(log_count) == exp_t.size(), $sformatf("log count %0d", log_count));
    for (int i = 0; i < exp_t.size(); i++) begin
      log_rd_idx = 4'(i);
      @(negedge clk);
      check(int'(log_rd_trans) == exp_t[i] && int'(log_rd_vec) == exp_v[i],
            $sformatf("log entry %0d: got (%0d,%0d) want (%0d,%0d)", i, log_rd_trans, log_rd_vec,
                      exp_t[i], exp_v[i]));
    end
    t_mode = 0;
    @(negedge clk);
    check(state == GC_IDLE && en == 0 && !test_complete, "back to idle");
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (3) @(negedge clk);
    check(state == GC_IDLE && en == 0, "idle while T_mode low");
    run(3, 1);
    // Shortened run without errors: the interrupt and log are cleared.
    last_trans = 2'd1;
    run(1, 0);
    // Abort in the middle of transaction 0.
    last_trans = 2'd3;
    t_mode = 1;
    repeat (30) @(negedge clk);
    check(en == ENS[0], "running before abort");
    t_mode = 0;
    @(negedge clk);
    check(state == GC_IDLE && en == 0, "T_mode low aborts the test");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
