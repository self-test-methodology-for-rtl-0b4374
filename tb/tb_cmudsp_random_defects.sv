// tb_cmudsp_random_defects -- validation of the CMUDSP bus self-test with
// randomly drawn crosstalk defects (default sizes).
//
// Each of 8 runs draws one defect per wire set -- the 72 data lines, the
// 16-line address link and the 16-line one-way link -- with a random line,
// a random kind (GP, GN, DR, DF) and a random coupling strength, given as
// the number of switching aggressors the defect needs (2..71 for the data
// lines, 2..15 for the links).  All three defects are present during the
// same self-test.  The expected log follows from the defects alone:
//   data line L (bus b = L/24): entry (b, 6*(L mod 24)+step) always, since
//     the three data buses are tested together with all 71 other lines as
//     aggressors; and entry (3+b, same vector) when the strength needed is
//     at most 23, the aggressors of the bus alone (reverse direction test);
//   address link line L: entries (6, 6L+step) and (7, 6L+step);
//   one-way link line L: entry (8, 6L+step);
// with step = 1, 3, 5, 4 for GP, GN, DR, DF.  The test length, the
// interrupt and every log entry are checked.
module tb_cmudsp_random_defects;
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
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_reverse = 0;

  initial begin
    for (int i = 0; i < 6; i++) d_core_out[i] = '0;
    for (int i = 0; i < 2; i++) a_core_out[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int run = 0; run < 8; run++) begin
      fd_en = 1; fd_line = $urandom_range(0, 3 * DW - 1); fd_kind = $urandom_range(0, 3);
      fd_th = $urandom_range(2, 3 * DW - 1);
      fa_en = 1; fa_line = $urandom_range(0, AW - 1); fa_kind = $urandom_range(0, 3);
      fa_th = $urandom_range(2, AW - 1);
      fu_en = 1; fu_line = $urandom_range(0, AW - 1); fu_kind = $urandom_range(0, 3);
      fu_th = $urandom_range(2, AW - 1);
      exp_t.push_back(fd_line / DW); exp_v.push_back(6 * (fd_line % DW) + STEP[fd_kind]);
      if (fd_th <= DW - 1) begin
        exp_t.push_back(3 + fd_line / DW); exp_v.push_back(6 * (fd_line % DW) + STEP[fd_kind]);
        n_reverse++;
      end
      exp_t.push_back(6); exp_v.push_back(6 * fa_line + STEP[fa_kind]);
      exp_t.push_back(7); exp_v.push_back(6 * fa_line + STEP[fa_kind]);
      exp_t.push_back(8); exp_v.push_back(6 * fu_line + STEP[fu_kind]);
      self_test($sformatf("run %0d: data %0d/%0d/%0d link %0d/%0d/%0d one-way %0d/%0d/%0d", run,
                          fd_line, fd_kind, fd_th, fa_line, fa_kind, fa_th, fu_line, fu_kind, fu_th));
    end
    fd_en = 0; fa_en = 0; fu_en = 0;
    $display("runs with a data defect also seen in the reverse test: %0d of 8", n_reverse);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
