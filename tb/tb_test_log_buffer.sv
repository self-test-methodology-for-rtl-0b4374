// tb_test_log_buffer -- self-checking test of the error log (DEPTH = 16,
// the default).
//
// Writes random (transaction, vector) pairs with random gaps, keeps its own
// copy in a queue and reads every entry back through the index port.  Also
// checked: the count, that writes beyond DEPTH are dropped and set overflow,
// and that clear empties the log.
module tb_test_log_buffer;
  localparam int DEPTH = 16, TW = 4, VW = 16;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  logic                       clear = 0, wr_en = 0;
  logic [TW-1:0]              wr_trans = '0;
  logic [VW-1:0]              wr_vec = '0;
  logic [$clog2(DEPTH)-1:0]   rd_idx = '0;
  logic [TW-1:0]              rd_trans;
  logic [VW-1:0]              rd_vec;
  logic [$clog2(DEPTH+1)-1:0] count;
  logic                       overflow;

  test_log_buffer dut (.clk, .rst_n, .clear, .wr_en, .wr_trans, .wr_vec, .rd_idx,
                       .rd_trans, .rd_vec, .count, .overflow);

  logic [TW+VW-1:0] model [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic read_all();
    for (int i = 0; i < model.size(); i++) begin
      rd_idx = ($clog2(DEPTH))'(i);
      @(negedge clk);
      check({rd_trans, rd_vec} == model[i], $sformatf("entry %0d", i));
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    check(count == 0 && !overflow, "empty after reset");
    for (int round = 0; round < 2; round++) begin
      // 20 writes into 16 entries
      for (int n = 0; n < 20; n++) begin
        wr_en = 1;
        wr_trans = TW'($urandom());
        wr_vec   = VW'($urandom());
        if (model.size() < DEPTH) model.push_back({wr_trans, wr_vec});
        @(negedge clk);
        wr_en = 0;
        check(int'(count) == model.size(), "count follows writes");
        check(overflow == (n >= DEPTH), "overflow only when full");
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      read_all();
      clear = 1;
      @(negedge clk);
      clear = 0;
      check(count == 0 && !overflow, "clear empties the log");
      model.delete();
    end
    // a few writes after clear land at index 0 onwards
    for (int n = 0; n < 3; n++) begin
      wr_en = 1; wr_trans = TW'(n + 1); wr_vec = VW'(100 * n);
      model.push_back({wr_trans, wr_vec});
      @(negedge clk);
    end
    wr_en = 0;
    check(count == 3, "three entries");
    read_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
