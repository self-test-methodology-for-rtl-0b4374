// test_log_buffer -- error log of the global test controller ("test and
// vector counter log").
//
// Each write stores the number of the running test transaction and the
// number of the failing vector within it.  From the pair, the failing line
// and fault follow: victim line = vector / 6, MA vector pair = vector mod 6.
// Entries are kept in arrival order in a DEPTH-entry register array; once it
// is full further errors are dropped and the sticky overflow bit is set.
// clear empties the log.  Entries are read through an index port.
//
// Timing: a write in cycle c is visible in count and on the read port from
// cycle c+1.  The log itself follows the published controller; its depth,
// the drop-when-full policy and the read port are this design's choices.
module test_log_buffer #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned TW    = 4,    // transaction number width
  parameter int unsigned VW    = 16    // vector number width
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       wr_en,
  input  logic [TW-1:0]              wr_trans,
  input  logic [VW-1:0]              wr_vec,
  input  logic [$clog2(DEPTH)-1:0]   rd_idx,
  output logic [TW-1:0]              rd_trans,
  output logic [VW-1:0]              rd_vec,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                       overflow
);

  logic [TW-1:0] trans_mem [DEPTH];
  logic [VW-1:0] vec_mem   [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (clear) begin
      count    <= '0;
      overflow <= 1'b0;
    end else if (wr_en) begin
      if (count == ($clog2(DEPTH+1))'(DEPTH)) overflow <= 1'b1;
      else                                     count    <= count + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (!clear && wr_en && count != ($clog2(DEPTH+1))'(DEPTH)) begin
      trans_mem[count[$clog2(DEPTH)-1:0]] <= wr_trans;
      vec_mem[count[$clog2(DEPTH)-1:0]]   <= wr_vec;
    end
  end

  assign rd_trans = trans_mem[rd_idx];
  assign rd_vec   = vec_mem[rd_idx];

endmodule
