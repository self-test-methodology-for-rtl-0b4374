// tb_mafm_error_detector -- self-checking test of the MA error detector
// (N = 32, the default).
//
// The testbench plays the remote sender: it drives the bus with vectors
// from its own table of the six (victim, aggressor) values, one per clock,
// starting in the cycle after T_enable is sampled, and flips one line in a
// few chosen vectors.  err_flag must be high exactly in the cycle after each
// corrupted vector and low otherwise.  Also checked: no flag while idle with
// garbage on the bus, and aggressor-only checking.
module tb_mafm_error_detector;
  localparam int N = 32;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0, flagged = 0;

  always #5 clk = ~clk;

  localparam bit VICT [6] = '{0, 0, 1, 1, 0, 1};
  localparam bit AGGR [6] = '{0, 1, 1, 0, 1, 0};

  function automatic logic [N-1:0] ref_vec(int victim, int step, bit aggonly);
    logic [N-1:0] v;
    for (int i = 0; i < N; i++) v[i] = (!aggonly && i == victim) ? VICT[step] : AGGR[step];
    return v;
  endfunction

  logic         t_enable = 0, agg_only = 0;
  logic [N-1:0] bus_in = '0;
  logic         err_flag, active;

  mafm_error_detector dut (.clk, .rst_n, .t_enable, .agg_only, .bus_in, .err_flag, .active);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Corrupted vectors: index -> line flipped.
  function automatic int bad_line(int k);
    case (k)
      1:   return 0;     // positive glitch on victim 0
      9:   return 1;     // negative glitch seen on victim 1
      64:  return 20;    // aggressor line hit during victim 10
      191: return 31;    // last vector, rising delay of victim 31
      default: return -1;
    endcase
  endfunction

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit prev_bad;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Idle: no flag whatever the bus carries.
    for (int k = 0; k < 5; k++) begin
      bus_in = N'($urandom());
      @(negedge clk);
      check(!err_flag, "no flag while idle");
    end

    t_enable = 1;
    @(negedge clk);                  // local generator now in S1
    prev_bad = 0;
    for (int k = 0; k < 6 * N; k++) begin
      bus_in = ref_vec(k / 6, k % 6, 0);
      if (bad_line(k) >= 0) bus_in[bad_line(k)] = ~bus_in[bad_line(k)];
      check(active, $sformatf("active at vector %0d", k));
      // flag reports the previous vector
      check(err_flag == prev_bad, $sformatf("flag for vector %0d", k - 1));
      if (err_flag) flagged++;
      prev_bad = (bad_line(k) >= 0);
      @(negedge clk);
    end
    t_enable = 0;
    check(err_flag == prev_bad, "flag for the last vector");
    if (err_flag) flagged++;
    check(flagged == 4, "four errors flagged");
    check(!active, "idle after run");

    // Aggressor-only: every line must carry the aggressor value.
    agg_only = 1; t_enable = 1;
    @(negedge clk);
    prev_bad = 0;
    for (int k = 0; k < 30; k++) begin
      bus_in = ref_vec(0, k % 6, 1);
      if (k == 13) bus_in[5] = ~bus_in[5];
      check(err_flag == prev_bad, $sformatf("aggressor-only flag %0d", k - 1));
      prev_bad = (k == 13);
      @(negedge clk);
    end
    t_enable = 0; agg_only = 0;
    @(negedge clk);
    @(negedge clk);
    check(!err_flag, "no flag after stop");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
