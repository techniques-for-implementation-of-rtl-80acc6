// step_ctrl: control-step sequencer of the shared datapath.
//
// Each iteration of the unfolded filter takes two clock cycles, ST_OUT then
// ST_STATE (see lin_pkg::cstep_t). The sequencer alternates the two steps
// from reset, asks the environment for a new input pair once per iteration
// and flags the cycles in which a new output pair is valid.
//
// Interface and timing:
//   step      current control step; ST_OUT in the first cycle after reset.
//   take_in   high in every ST_STATE cycle: the input pair present on the
//             inputs is sampled at the end of that cycle.
//   out_valid high in the ST_OUT cycle in which the output pair of an input
//             pair taken LATENCY cycles earlier first appears (counted from
//             the sampling edge to the edge that loads the output). The flag
//             is held low until the first such pair has travelled through
//             the pipeline.
// The number of control steps, the sampling point and the fill counter are
// this design's choices; the text fixes only that additions are scheduled
// onto shared adders and that the control logic is scanned separately.
module step_ctrl
  import lin_pkg::*;
#(
  parameter int LATENCY = 4   // sampling edge to output-load edge, in cycles
) (
  input  logic   clk,
  input  logic   rst_n,
  output cstep_t step,
  output logic   take_in,
  output logic   out_valid
);

  // Number of ST_STATE edges that must have passed before an output is valid:
  // the first real pair is sampled on the first one, and its output loads on
  // the edge LATENCY cycles later, which is again an ST_STATE edge.
  localparam int FILL = LATENCY / 2 + 1;
  localparam int CW   = $clog2(FILL + 1);

  if (LATENCY % 2 != 0) begin : g_lat
    $error("step_ctrl: LATENCY must be a whole number of iterations");
  end

  cstep_t        step_q;
  logic [CW-1:0] fill_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q <= ST_OUT;
      fill_q <= '0;
    end else begin
      step_q <= (step_q == ST_OUT) ? ST_STATE : ST_OUT;
      if (step_q == ST_STATE && fill_q != CW'(FILL)) fill_q <= fill_q + 1'b1;
    end
  end

  assign step      = step_q;
  assign take_in   = (step_q == ST_STATE);
  assign out_valid = (step_q == ST_OUT) && (fill_q == CW'(FILL));

endmodule
