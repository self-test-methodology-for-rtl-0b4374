// tb_mafm_test_generator -- self-checking test of the Maximal Aggressor test
// generator at N = 32 (the default) and N = 24 (not a power of two).
//
// The expected vectors come from an independent table of the six
// (victim, aggressor) values.  Checked: the full 6*N-vector sequence, one
// vector per clock, the done pulse on the last vector, return to idle when
// T_enable falls, abort in the middle of a run, and the aggressor-only mode
// running past 6*N vectors with no victim line.
module tb_mafm_test_generator;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  // Independent reference: values of the six MA vectors.
  localparam bit VICT [6] = '{0, 0, 1, 1, 0, 1};
  localparam bit AGGR [6] = '{0, 1, 1, 0, 1, 0};

  function automatic logic [31:0] ref_vec(int n, int victim, int step, bit aggonly);
    logic [31:0] v;
    v = '0;
    for (int i = 0; i < n; i++) v[i] = (!aggonly && i == victim) ? VICT[step] : AGGR[step];
    return v;
  endfunction

  logic        en32 = 0, ag32 = 0, en24 = 0, ag24 = 0;
  logic [31:0] b32;
  logic [23:0] b24;
  logic        act32, done32, act24, done24;

  mafm_test_generator dut32 (.clk, .rst_n, .t_enable(en32), .agg_only(ag32),
                             .b(b32), .active(act32), .done(done32));
  mafm_test_generator #(.N(24)) dut24 (.clk, .rst_n, .t_enable(en24), .agg_only(ag24),
                                       .b(b24), .active(act24), .done(done24));

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Run one full sequence on the selected instance and check every vector.
  task automatic run_full(int n);
    int k;
    logic [31:0] got;
    bit act, dn;
    @(negedge clk);
    if (n == 32) en32 = 1; else en24 = 1;
    @(negedge clk);                       // edge sampled T_enable: S1 entered
    for (k = 0; k < 6 * n; k++) begin
      got = (n == 32) ? b32 : {8'h0, b24};
      act = (n == 32) ? act32 : act24;
      dn  = (n == 32) ? done32 : done24;
      check(act, $sformatf("N=%0d active at vector %0d", n, k));
      check(got == ref_vec(n, k / 6, k % 6, 0), $sformatf("N=%0d vector %0d", n, k));
      check(dn == (k == 6 * n - 1), $sformatf("N=%0d done at vector %0d", n, k));
      if (k == 6 * n - 1) begin
        if (n == 32) en32 = 0; else en24 = 0;
      end
      @(negedge clk);
    end
    act = (n == 32) ? act32 : act24;
    check(!act, $sformatf("N=%0d idle after the run", n));
    repeat (3) @(negedge clk);
    act = (n == 32) ? act32 : act24;
    check(!act, $sformatf("N=%0d stays idle", n));
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
    check(!act32 && !act24, "idle after reset");
    run_full(32);
    run_full(24);

    // Abort: drop T_enable in the middle of a run.
    en32 = 1;
    repeat (20) @(negedge clk);
    check(act32, "running before abort");
    en32 = 0;
    @(negedge clk);
    check(!act32, "abort returns to S0");

    // Restart after abort begins again at victim 0.
    en32 = 1;
    @(negedge clk);
    check(b32 == ref_vec(32, 0, 0, 0), "restart vector 0");
    @(negedge clk);
    check(b32 == ref_vec(32, 0, 1, 0), "restart vector 1");
    en32 = 0;
    @(negedge clk);

    // Aggressor-only: all lines equal, continues beyond 6*N vectors.
    ag24 = 1; en24 = 1;
    @(negedge clk);
    for (int k = 0; k < 2 * 6 * 24; k++) begin
      check(act24 && b24 == ref_vec(24, 0, k % 6, 1)[23:0], $sformatf("aggressor-only vector %0d", k));
      check(!done24, "no done in aggressor-only mode");
      @(negedge clk);
    end
    en24 = 0; ag24 = 0;
    @(negedge clk);
    check(!act24, "aggressor-only stops on T_enable low");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
