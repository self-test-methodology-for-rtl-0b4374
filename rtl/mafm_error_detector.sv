// mafm_error_detector -- receiving end of a Maximal Aggressor crosstalk test.
//
// The detector holds a local test generator identical to the one at the
// sending end.  Both are started by the same T_enable, so in every cycle the
// local generator shows the vector that the sender launched on the bus at the
// same clock edge.  The analyzer is an XOR per line followed by an OR over
// all lines; its result is captured by the next clock edge, which is the
// capture edge of the at-speed launch/capture pair.  A set err_flag thus
// means "the vector on the bus in the previous cycle arrived corrupted".
//
// Interface: bus_in is the received N-line bus, t_enable/agg_only are the
// generator controls from the global test controller, err_flag is the
// per-vector error flag reported to it.
//
// Timing: vector k is on the bus in cycle c; err_flag for it is high in
// cycle c+1.  err_flag is zero whenever the local generator is idle.
// The local generator and the XOR/OR analyzer follow the published design.
// This design's choices: the flag is registered, it is only raised while
// T_enable is high (a bus released between transactions is not checked),
// and agg_only makes the detector expect the aggressor value on every line.
module mafm_error_detector
  import xt_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         t_enable,
  input  logic         agg_only,
  input  logic [N-1:0] bus_in,
  output logic         err_flag,
  output logic         active      // local generator running
);

  logic [N-1:0] expected;
  logic         tg_done;

  mafm_test_generator #(.N(N)) u_local_tg (
    .clk      (clk),
    .rst_n    (rst_n),
    .t_enable (t_enable),
    .agg_only (agg_only),
    .b        (expected),
    .active   (active),
    .done     (tg_done)
  );

  // Analyzer: XOR network and OR, captured on the next edge.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_flag <= 1'b0;
    else        err_flag <= t_enable && active && (|(bus_in ^ expected));
  end

endmodule
