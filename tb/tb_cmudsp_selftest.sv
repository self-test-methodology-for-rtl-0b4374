// tb_cmudsp_selftest -- end-to-end test of the CMUDSP bus self-test at its
// default sizes (24-bit data buses, 16-bit address links).
//
// The bus wires are modelled outside the design: a bus carries the value
// of the endpoint that enables its driver (0 when none does) and passes
// through xt_crosstalk_model, which can hold one crosstalk defect.  The three
// data buses form one 72-line wire set (they run side by side), the
// bidirectional address link and the one-way link one 16-line set each.
//
// Runs: normal mode pass-through; a fault-free self-test whose length is
// checked against 2 + sum(6*width+1) + (transactions-1) clocks; self-tests
// with a single defect of each kind on data lines, address-link lines and
// one-way-link lines, where the log must hold exactly the predicted
// (transaction, vector) entries; a strong defect that overflows the log;
// and an abort by T_mode.  The predicted entries come from the defect
// alone: a defect on data line L (bus L/24) shows once, in the transaction
// that walks the victim over L's bus towards the Bus Switch, at vector
// 6*(L mod 24) + step, step = 1, 3, 5, 4 for GP, GN, DR, DF.  It does not
// show when the bus is tested alone, because it needs all 71 other lines
// switching.  Each mechanism (three buses tested together, both directions
// of every bidirectional bus, error logging and interrupt, log overflow,
// abort, normal mode) is counted and must occur.
module tb_cmudsp_selftest;
  localparam int DW = 24, AW = 16, NT = 9;
  localparam int STEP [4] = '{1, 3, 5, 4};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic            t_mode = 0;
  logic            test_complete, interrupt;
  logic [DW-1:0]   d_core_out [6];
  logic [5:0]      d_core_oe = '0;
  logic [DW-1:0]   d_core_in  [6];
  logic [DW-1:0]   d_bus_out  [6];
  logic [5:0]      d_bus_oe;
  logic [DW-1:0]   d_bus_in   [6];
  logic [AW-1:0]   a_core_out [2];
  logic [1:0]      a_core_oe = '0;
  logic [AW-1:0]   a_core_in  [2];
  logic [AW-1:0]   a_bus_out  [2];
  logic [1:0]      a_bus_oe;
  logic [AW-1:0]   a_bus_in   [2];
  logic [AW-1:0]   u_core_out = '0, u_bus_out, pcu_det_bus_in;
  logic [3:0]      log_rd_idx = '0;
  logic [3:0]      log_rd_trans;
  logic [9:0]      log_rd_vec;
  logic [4:0]      log_count;
  logic            log_overflow;
  logic [3:0]      cur_trans;

  cmudsp_selftest dut (.*);

  // ---------------- bus wires ----------------
  logic [DW-1:0] xdb, ydb, gdb;
  logic [3*DW-1:0] d_rcv;
  logic [AW-1:0] a_drv, a_rcv;
  int   fd_line = -1, fd_kind = 0, fd_th = 71, fd_hits;
  int   fa_line = -1, fa_kind = 0, fa_th = 15, fa_hits;
  int   fu_line = -1, fu_kind = 0, fu_th = 15, fu_hits;
  logic fd_en = 0, fa_en = 0, fu_en = 0;

  always_comb begin
    xdb   = d_bus_oe[0] ? d_bus_out[0] : (d_bus_oe[2] ? d_bus_out[2] : '0);
    ydb   = d_bus_oe[1] ? d_bus_out[1] : (d_bus_oe[3] ? d_bus_out[3] : '0);
    gdb   = d_bus_oe[5] ? d_bus_out[5] : (d_bus_oe[4] ? d_bus_out[4] : '0);
    a_drv = a_bus_oe[0] ? a_bus_out[0] : (a_bus_oe[1] ? a_bus_out[1] : '0);
  end

  xt_crosstalk_model #(.W(3 * DW)) m_data (.clk, .drv({gdb, ydb, xdb}), .rcv(d_rcv), .f_en(fd_en),
      .f_line(fd_line), .f_kind(fd_kind), .f_thresh(fd_th), .n_hits(fd_hits));
  xt_crosstalk_model #(.W(AW)) m_alink (.clk, .drv(a_drv), .rcv(a_rcv), .f_en(fa_en),
      .f_line(fa_line), .f_kind(fa_kind), .f_thresh(fa_th), .n_hits(fa_hits));
  xt_crosstalk_model #(.W(AW)) m_ulink (.clk, .drv(u_bus_out), .rcv(pcu_det_bus_in), .f_en(fu_en),
      .f_line(fu_line), .f_kind(fu_kind), .f_thresh(fu_th), .n_hits(fu_hits));

  always_comb begin
    d_bus_in[0] = d_rcv[DW-1:0];      d_bus_in[2] = d_rcv[DW-1:0];
    d_bus_in[1] = d_rcv[2*DW-1:DW];   d_bus_in[3] = d_rcv[2*DW-1:DW];
    d_bus_in[5] = d_rcv[3*DW-1:2*DW]; d_bus_in[4] = d_rcv[3*DW-1:2*DW];
    a_bus_in[0] = a_rcv;              a_bus_in[1] = a_rcv;
  end

  // ---------------- mechanism counters ----------------
  int n_multibus = 0, n_to_bsw = 0, n_from_bsw = 0, n_a_fwd = 0, n_a_rev = 0, n_ulink = 0;
  int n_logged_runs = 0, n_overflow = 0, n_abort = 0, n_normal = 0;
  always @(posedge clk) if (t_mode) begin
    if (d_bus_oe[0] && d_bus_oe[1] && d_bus_oe[5]) n_multibus++;
    if (d_bus_oe[0] || d_bus_oe[1] || d_bus_oe[5]) n_to_bsw++;
    if (d_bus_oe[2] || d_bus_oe[3] || d_bus_oe[4]) n_from_bsw++;
    if (a_bus_oe[0]) n_a_fwd++;
    if (a_bus_oe[1]) n_a_rev++;
    if (cur_trans == 4'd8 && u_bus_out != 0) n_ulink++;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 15) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic int widths(int t);
    return (t <= 5) ? DW : AW;
  endfunction

  int exp_t [$];
  int exp_v [$];

  // Full self-test; checks length, interrupt and log against exp_t/exp_v.
  task automatic self_test(string name);
    int cycles, expect_cycles;
    expect_cycles = 2 + (NT - 1);
    for (int t = 0; t < NT; t++) expect_cycles += 6 * widths(t) + 1;
    t_mode = 1;
    cycles = 0;
    while (!test_complete && cycles < 5000) begin
      @(negedge clk);
      cycles++;
    end
    check(cycles == expect_cycles, $sformatf("%s: %0d cycles, want %0d", name, cycles, expect_cycles));
    @(negedge clk);
    check(interrupt == (exp_t.size() > 0), $sformatf("%s: interrupt", name));
    check(int'(log_count) == exp_t.size(), $sformatf("%s: log count %0d want %0d", name, log_count, exp_t.size()));
    if (interrupt) n_logged_runs++;
    for (int i = 0; i < exp_t.size() && i < int'(log_count); i++) begin
      log_rd_idx = 4'(i);
      @(negedge clk);
      check(int'(log_rd_trans) == exp_t[i] && int'(log_rd_vec) == exp_v[i],
            $sformatf("%s: log %0d = (%0d,%0d) want (%0d,%0d)", name, i, log_rd_trans, log_rd_vec,
                      exp_t[i], exp_v[i]));
      // Diagnosis: line and fault from the logged vector number.
      check(int'(log_rd_vec) / 6 == exp_v[i] / 6, $sformatf("%s: diagnosed line", name));
    end
    t_mode = 0;
    @(negedge clk);
    exp_t.delete(); exp_v.delete();
  endtask

  initial begin : watchdog
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) d_core_out[i] = '0;
    for (int i = 0; i < 2; i++) a_core_out[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // Normal mode: the cores own the buses.
    for (int k = 0; k < 12; k++) begin
      for (int i = 0; i < 6; i++) d_core_out[i] = DW'($urandom());
      a_core_out[0] = AW'($urandom()); a_core_out[1] = AW'($urandom());
      u_core_out = AW'($urandom());
      d_core_oe = 6'b100011 << (k % 2);  // one side of each data bus
      a_core_oe = 2'b01 << (k % 2);
      @(negedge clk);
      for (int i = 0; i < 6; i++) begin
        check(d_bus_out[i] == d_core_out[i] && d_bus_oe[i] == d_core_oe[i], "normal data path");
        check(d_core_in[i] == d_bus_in[i], "normal receive path");
      end
      check(a_bus_out[0] == a_core_out[0] && a_bus_out[1] == a_core_out[1] && a_bus_oe == a_core_oe,
            "normal address path");
      check(u_bus_out == u_core_out, "normal one-way link");
      check(!interrupt && !test_complete, "no test activity in normal mode");
      n_normal++;
    end
    d_core_oe = '0; a_core_oe = '0;
    @(negedge clk);

    // Fault-free self-test.
    self_test("fault-free");

    // One defect of each kind on random data lines (Maximal Aggressor strength).
    for (int kind = 0; kind < 4; kind++) begin
      int hits0;
      hits0 = fd_hits;
      fd_en = 1; fd_kind = kind; fd_line = $urandom_range(0, 3 * DW - 1); fd_th = 3 * DW - 1;
      exp_t.push_back(fd_line / DW);
      exp_v.push_back(6 * (fd_line % DW) + STEP[kind]);
      self_test($sformatf("data defect kind %0d line %0d", kind, fd_line));
      check(fd_hits - hits0 == 1, "data defect hit once");
      fd_en = 0;
      @(negedge clk);
    end
    // A weaker data defect (own-bus aggressors suffice) also shows when the
    // bus is driven back from the Bus Switch.
    fd_en = 1; fd_kind = 0; fd_line = 30; fd_th = DW - 1;
    exp_t.push_back(1); exp_v.push_back(6 * 6 + 1);
    exp_t.push_back(4); exp_v.push_back(6 * 6 + 1);
    self_test("weak data defect");
    fd_en = 0;

    // Address link defects: seen in both directions of the link.
    for (int kind = 0; kind < 4; kind++) begin
      fa_en = 1; fa_kind = kind; fa_line = $urandom_range(0, AW - 1); fa_th = AW - 1;
      exp_t.push_back(6); exp_v.push_back(6 * fa_line + STEP[kind]);
      exp_t.push_back(7); exp_v.push_back(6 * fa_line + STEP[kind]);
      self_test($sformatf("address-link defect kind %0d line %0d", kind, fa_line));
      fa_en = 0;
    end

    // One-way link defect into the PCU detector.
    fu_en = 1; fu_kind = 2; fu_line = 15; fu_th = AW - 1;
    exp_t.push_back(8); exp_v.push_back(6 * 15 + 5);
    self_test("one-way link defect");
    fu_en = 0;

    // Strong defect: a data line that rises late whenever any other line
    // falls.  It hits on many vectors and overflows the 16-entry log.
    begin
      int hits0;
      hits0 = fd_hits;
      fd_en = 1; fd_kind = 2; fd_line = 3; fd_th = 1;
      t_mode = 1;
      while (!test_complete) @(negedge clk);
      @(negedge clk);
      check(log_overflow && log_count == 5'd16 && interrupt, "log overflow");
      check(fd_hits - hits0 > 16, "strong defect produced more errors than log entries");
      if (log_overflow) n_overflow++;
      t_mode = 0;
      fd_en = 0;
    end
    @(negedge clk);

    // Abort in the middle of the test.
    t_mode = 1;
    repeat (300) @(negedge clk);
    check(!test_complete && d_bus_oe != 0, "test running");
    t_mode = 0;
    @(negedge clk);
    check(d_bus_oe == d_core_oe && !test_complete, "abort hands the buses back");
    n_abort++;

    // Every mechanism must have happened.
    check(n_multibus > 0, "three data buses tested together");
    check(n_to_bsw > 0 && n_from_bsw > 0, "data buses tested in both directions");
    check(n_a_fwd > 0 && n_a_rev > 0, "address link tested in both directions");
    check(n_ulink > 0, "one-way link tested");
    check(n_logged_runs > 0, "errors logged with interrupt");
    check(n_overflow > 0, "log overflow");
    check(n_abort > 0, "abort");
    check(n_normal > 0, "normal mode");
    $display("mechanisms: multibus=%0d to_bsw=%0d from_bsw=%0d a_fwd=%0d a_rev=%0d ulink=%0d logged=%0d overflow=%0d abort=%0d normal=%0d",
             n_multibus, n_to_bsw, n_from_bsw, n_a_fwd, n_a_rev, n_ulink, n_logged_runs, n_overflow,
             n_abort, n_normal);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
