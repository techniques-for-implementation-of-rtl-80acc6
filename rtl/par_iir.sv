// par_iir: IIR filter in parallel form (eighth order by default), built from NSECT
// second-order sections that are each unfolded twice and scheduled for
// at-speed testability (tsect), so the whole filter needs no scan registers.
//
// Function (per sample n, coefficients with COEF_F fraction bits):
//   u[n]   = K * in[n]
//   out[n] = D * u[n] + sum over sections s of y_s[n],
//   section s: w[n] = u[n] + A1*w[n-1] + A2*w[n-2],
//              y_s[n] = B0*w[n] + B1*w[n-1]
// SEC[s] lists a section's coefficients in the order B0, A1, B1, A2 (the
// forward tap on w, the feedback tap on w[n-1], the forward tap on w[n-1],
// the feedback tap on w[n-2]). The parallel sections never interact, so
// unfolding costs no extra hardware between them.
//
// Unfolding by two makes each iteration take a pair of consecutive samples
// (in1 = the earlier, in2 = the later) and return a pair (out1, out2). The
// input gain K and the direct path D are duplicated once per sample of the
// pair, and each output of the pair has its own summation chain.
//
// Interface and timing: an iteration is two clock cycles (step_ctrl). The
// pair on in1/in2 is sampled at the end of every cycle in which take_in is
// high. Its output pair is loaded 4 cycles after that sampling edge and is
// presented, with out_valid high for one cycle, from the next cycle on; it
// stays on out1/out2 for two cycles. Throughput: one sample per clock.
// Default coefficients are an example stable filter; word length 11 is the
// one reported for the parallel structure. Quantisation is floor with
// two's-complement wrap-around everywhere (this design's choice).
module par_iir
  import lin_pkg::*;
#(
  parameter int DATA_W  = 11,
  parameter int COEF_W  = 11,
  parameter int COEF_F  = 8,
  parameter int TCOEF_W = COEF_W + 2,
  parameter int NSECT   = 4,
  parameter int K       = 128,
  parameter int D       = 64,
  // Section coefficients, 16-bit two's-complement fields, section 0 first.
  parameter logic [0:NSECT-1][0:3][15:0] SEC = '{'{16'sd128, 16'sd192, 16'sd64, -16'sd128},
                                                 '{16'sd96, -16'sd128, -16'sd32, -16'sd64},
                                                 '{16'sd64, 16'sd256, 16'sd32, -16'sd160},
                                                 '{-16'sd64, 16'sd64, 16'sd128, 16'sd96}}
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] in1,
  input  logic signed [DATA_W-1:0] in2,
  output logic                     take_in,
  output logic signed [DATA_W-1:0] out1,
  output logic signed [DATA_W-1:0] out2,
  output logic                     out_valid
);

  localparam int PW  = DATA_W + COEF_W;          // gain product
  localparam int SUMW = DATA_W + $clog2(NSECT + 2);

  if (!(fits_signed(K, COEF_W) && fits_signed(D, COEF_W))) begin : g_range
    $error("par_iir: K or D does not fit COEF_W bits");
  end

  // Back to a data word: drop the fraction bits (floor), wrap to DATA_W.
  function automatic logic signed [DATA_W-1:0] requant(logic signed [PW-1:0] v);
    return DATA_W'(v >>> COEF_F);
  endfunction

  // ------------------------------------------------------------ sequencing
  cstep_t step;
  logic   take;

  step_ctrl #(.LATENCY(4)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .step     (step),
    .take_in  (take),
    .out_valid(out_valid)
  );
  assign take_in = take;

  // ----------------------------------------------- input pair and gain K
  logic signed [DATA_W-1:0] in_q [UNFOLD];
  logic signed [DATA_W-1:0] u    [UNFOLD];
  logic signed [DATA_W-1:0] dp_q [UNFOLD];    // direct path D*u, one iteration late

  always_comb begin
    for (int i = 0; i < UNFOLD; i++)
      u[i] = requant(PW'(in_q[i]) * PW'(signed'(COEF_W'(K))));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q <= '{default: '0};
      dp_q <= '{default: '0};
    end else if (take) begin
      in_q[0] <= in1;
      in_q[1] <= in2;
      for (int i = 0; i < UNFOLD; i++)
        dp_q[i] <= requant(PW'(u[i]) * PW'(signed'(COEF_W'(D))));
    end
  end

  // ---------------------------------------------------- parallel sections
  logic signed [DATA_W-1:0] ys0 [NSECT];
  logic signed [DATA_W-1:0] ys1 [NSECT];

  for (genvar s = 0; s < NSECT; s++) begin : g_sect
    localparam int SB0 = int'(signed'(SEC[s][0]));
    localparam int SA1 = int'(signed'(SEC[s][1]));
    localparam int SB1 = int'(signed'(SEC[s][2]));
    localparam int SA2 = int'(signed'(SEC[s][3]));
    tsect #(
      .DATA_W (DATA_W),
      .COEF_W (COEF_W),
      .COEF_F (COEF_F),
      .TCOEF_W(TCOEF_W),
      .B0     (SB0),
      .A1     (SA1),
      .B1     (SB1),
      .A2     (SA2)
    ) u_sect (
      .clk  (clk),
      .rst_n(rst_n),
      .step (step),
      .x0   (u[0]),
      .x1   (u[1]),
      .y0   (ys0[s]),
      .y1   (ys1[s]),
      .s1   (),
      .s2   ()
    );
  end

  // ------------------------------------------------- output summation chains
  logic signed [SUMW-1:0] sum0, sum1;
  always_comb begin
    sum0 = SUMW'(dp_q[0]);
    sum1 = SUMW'(dp_q[1]);
    for (int s = 0; s < NSECT; s++) begin
      sum0 = sum0 + SUMW'(ys0[s]);
      sum1 = sum1 + SUMW'(ys1[s]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out1 <= '0;
      out2 <= '0;
    end else if (take) begin
      out1 <= sum0[DATA_W-1:0];
      out2 <= sum1[DATA_W-1:0];
    end
  end

endmodule
