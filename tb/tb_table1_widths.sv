// tb_table1_widths -- the test structures at the three bus widths 8, 16 and
// 32 lines: for each width a generator-to-detector link and a TG/ED pair
// run a full Maximal Aggressor test with one injected error (see
// mafm_link_check).  The three widths run side by side.
module tb_table1_widths;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic start = 1'b0;
  logic fin8, fin16, fin32;
  int   c8, c16, c32, f8, f16, f32;
  int   checks, failures;

  always #5 clk = ~clk;

  mafm_link_check #(.N(8))  w8  (.clk, .rst_n, .start, .finished(fin8),  .checks(c8),  .failures(f8));
  mafm_link_check #(.N(16)) w16 (.clk, .rst_n, .start, .finished(fin16), .checks(c16), .failures(f16));
  mafm_link_check #(.N(32)) w32 (.clk, .rst_n, .start, .finished(fin32), .checks(c32), .failures(f32));

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c8 + c16 + c32, f8 + f16 + f32 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    start = 1;
    wait (fin8 && fin16 && fin32);
    checks   = c8 + c16 + c32;
    failures = f8 + f16 + f32;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
