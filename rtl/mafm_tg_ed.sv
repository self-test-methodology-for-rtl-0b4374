// mafm_tg_ed -- combined test generator / error detector (TG/ED) for the
// interface of a core to a bidirectional bus.
//
// One Maximal Aggressor test generator is shared between the two roles.  In
// test mode (t_mode = 1) with gen = 1 the generator's vectors replace the
// core output through the T_mode multiplexer and the bus driver is enabled;
// with gen = 0 the driver is off and the analyzer (XOR per line, OR over
// the lines) compares the received bus with the generator, which runs in step
// with the remote sender.  With t_mode = 0 the core's own output and output
// enable pass to the bus and the test logic stays idle.
//
// Interface: core_out/core_oe come from the core, bus_out/bus_oe go to the
// (tri-state) bus driver, bus_in comes from the bus receiver and is also
// handed to the core as core_in.  en, gen and agg_only are this endpoint's
// control bits from the global test controller; err_flag goes back to it.
//
// Timing: as in mafm_test_generator and mafm_error_detector; a flag in cycle
// c+1 reports the vector received in cycle c.  The shared generator, the
// T_mode multiplexer, the analyzer and the mode bit follow the published
// design; the separate output enable and the agg_only input are this
// design's choices.
module mafm_tg_ed
  import xt_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         t_mode,     // global test mode (T_mode)
  input  ep_ctrl_t     ctrl,       // en, gen, agg_only from the controller LUT
  // core side
  input  logic [N-1:0] core_out,
  input  logic         core_oe,
  output logic [N-1:0] core_in,
  // bus side
  output logic [N-1:0] bus_out,
  output logic         bus_oe,
  input  logic [N-1:0] bus_in,
  output logic         err_flag
);

  logic [N-1:0] tg_vec;
  logic         tg_active, tg_done;
  logic         detect;

  mafm_test_generator #(.N(N)) u_tg (
    .clk      (clk),
    .rst_n    (rst_n),
    .t_enable (t_mode && ctrl.en),
    .agg_only (ctrl.agg_only),
    .b        (tg_vec),
    .active   (tg_active),
    .done     (tg_done)
  );

  // T_mode multiplexer and driver enable.
  assign bus_out = t_mode ? tg_vec : core_out;
  assign bus_oe  = t_mode ? (ctrl.en && ctrl.gen) : core_oe;
  assign core_in = bus_in;

  // Analyzer, used when the mode bit selects detection.
  assign detect = t_mode && ctrl.en && !ctrl.gen && tg_active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err_flag <= 1'b0;
    else        err_flag <= detect && (|(bus_in ^ tg_vec));
  end

endmodule
