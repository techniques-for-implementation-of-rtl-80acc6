// par_iir_serial: the testable parallel IIR filter with one input pin set and
// one output pin set, one sample per clock.
//
// Unfolding doubles the number of primary inputs and outputs of the filter
// (a pair of samples per iteration), but the two inputs of a pair never need
// to be on the pins at the same time: the first sample of a pair arrives in
// the ST_OUT cycle and is delayed by one register, the second arrives in the
// ST_STATE cycle and goes straight to the filter, which samples the pair at
// the end of that cycle. On the output side the two samples of a pair take
// turns on the same pins in the two cycles the pair is held.
//
// Interface and timing:
//   in_sample   one input sample every clock cycle, in order.
//   in_first    high when the sample on in_sample is the first of a pair
//               (informational: the filter paces the stream, one sample per
//               clock, starting with the first cycle after reset).
//   out_sample  one output sample per clock once the pipeline has filled.
//   out_valid   out_sample holds a valid output sample.
// Every output sample appears 6 clock cycles after its input sample was on
// in_sample. Sharing the pins follows the text; the cycle assignment is this
// design's choice.
module par_iir_serial
  import lin_pkg::*;
#(
  parameter int DATA_W  = 11,
  parameter int COEF_W  = 11,
  parameter int COEF_F  = 8,
  parameter int TCOEF_W = COEF_W + 2,
  parameter int NSECT   = 4,
  parameter int K       = 128,
  parameter int D       = 64,
  // per section {B0, A1, B1, A2}, 16-bit two's-complement fields, section 0 first
  parameter logic [0:NSECT-1][0:3][15:0] SEC = '{'{16'sd128, 16'sd192, 16'sd64, -16'sd128},
                                                 '{16'sd96, -16'sd128, -16'sd32, -16'sd64},
                                                 '{16'sd64, 16'sd256, 16'sd32, -16'sd160},
                                                 '{-16'sd64, 16'sd64, 16'sd128, 16'sd96}}
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] in_sample,
  output logic                     in_first,
  output logic signed [DATA_W-1:0] out_sample,
  output logic                     out_valid
);

  logic                     take_in, pair_valid, second_q;
  logic signed [DATA_W-1:0] first_q;
  logic signed [DATA_W-1:0] out1, out2;

  par_iir #(
    .DATA_W (DATA_W),
    .COEF_W (COEF_W),
    .COEF_F (COEF_F),
    .TCOEF_W(TCOEF_W),
    .NSECT  (NSECT),
    .K      (K),
    .D      (D),
    .SEC    (SEC)
  ) u_filter (
    .clk      (clk),
    .rst_n    (rst_n),
    .in1      (first_q),
    .in2      (in_sample),
    .take_in  (take_in),
    .out1     (out1),
    .out2     (out2),
    .out_valid(pair_valid)
  );

  // Pin sample of the previous cycle: in an ST_STATE cycle it is the first
  // sample of the pair (the filter reads it only then), so no load enable.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      first_q  <= '0;
      second_q <= 1'b0;
    end else begin
      first_q  <= in_sample;
      second_q <= pair_valid;
    end
  end

  assign in_first   = !take_in;
  // The pair stays on out1/out2 for two cycles: out1 in the first, out2 in the second.
  assign out_sample = pair_valid ? out1 : out2;
  assign out_valid  = pair_valid || second_q;

endmodule
