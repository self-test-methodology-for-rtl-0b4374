// xt_crosstalk_model -- behavioural, digital model of a set of bus wires
// with at most one injected crosstalk defect (testbench only).
//
// The wires pass the driven value unchanged, except on the defective victim
// line when the clock-to-clock transition matches the defect:
//   GP  victim stays 0, at least THRESH other lines rise  -> victim reads 1
//   GN  victim stays 1, at least THRESH other lines fall  -> victim reads 0
//   DR  victim rises,   at least THRESH other lines fall  -> victim reads 0
//   DF  victim falls,   at least THRESH other lines rise  -> victim reads 1
// i.e. a positive or negative glitch, or a rising or falling transition too
// late for the capture edge.  THRESH stands for the coupling strength: with
// THRESH = W-1 the error needs every other line of the set switching
// against the victim, which is exactly the Maximal Aggressor condition.
// The previous value is the value driven in the previous clock cycle.
module xt_crosstalk_model #(
  parameter int W = 24
) (
  input  logic         clk,
  input  logic [W-1:0] drv,
  output logic [W-1:0] rcv,
  // defect
  input  logic         f_en,
  input  int           f_line,
  input  int           f_kind,    // 0 GP, 1 GN, 2 DR, 3 DF
  input  int           f_thresh,
  output int           n_hits     // errors produced so far
);
  logic [W-1:0] prev = '0;
  int           rise, fall;
  logic         hit;

  always_ff @(posedge clk) prev <= drv;

  always_comb begin
    rise = 0;
    fall = 0;
    for (int i = 0; i < W; i++) begin
      if (i != f_line) begin
        rise += int'(!prev[i] && drv[i]);
        fall += int'(prev[i] && !drv[i]);
      end
    end
    hit = 1'b0;
    if (f_en && f_line >= 0 && f_line < W) begin
      case (f_kind)
        0: hit = !prev[f_line] && !drv[f_line] && rise >= f_thresh;
        1: hit =  prev[f_line] &&  drv[f_line] && fall >= f_thresh;
        2: hit = !prev[f_line] &&  drv[f_line] && fall >= f_thresh;
        3: hit =  prev[f_line] && !drv[f_line] && rise >= f_thresh;
        default: hit = 1'b0;
      endcase
    end
    rcv = drv;
    if (hit) rcv[f_line] = ~drv[f_line];
  end

  initial n_hits = 0;
  always @(posedge clk) if (hit) n_hits <= n_hits + 1;
endmodule
