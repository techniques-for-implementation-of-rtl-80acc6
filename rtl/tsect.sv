// tsect: one second-order recursive section, unfolded twice and scheduled so
// that every register of its datapath can be loaded from the primary inputs.
//
// Function. Per iteration the section takes an input pair (x0, x1) and
// produces the output pair (y0, y1) of the section
//   w[n] = x[n] + A1*w[n-1] + A2*w[n-2],   y[n] = B0*w[n] + B1*w[n-1]
// using the unfolded equations of lin_pkg::unfold2 (16 constant multipliers,
// four balanced trees of three additions, one tree per output and per state).
//
// Structure and schedule (two clock cycles per iteration, step from step_ctrl):
// adder trees for the outputs and for the two states are balanced, and the
// first addition of each output tree joins the two input products only. Two
// adders are shared, each fed by two single-register dedicated register files:
//   adder A (R1, R2): ST_OUT   -> c1*x0 + c2*x1 of the y0 tree
//                     ST_STATE -> final addition of the S1 tree
//   adder B (R3, R4): ST_OUT   -> c5*x0 + c6*x1 of the y1 tree
//                     ST_STATE -> final addition of the S2 tree
// In ST_OUT the register files load the two partial sums of the S1 and S2
// trees; in ST_STATE they load the four input-only products, so each of R1..R4
// and, through adders A and B, the state registers S1 and S2 is controllable
// from the primary inputs. The state-dependent half of each output tree is
// held in a pipeline register (O1, O2) for one iteration. The other eight
// adders are not shared; six of them (state halves and output roots) never
// add input-only values. Sharing more of them would need at least three
// control steps per iteration; two steps and one sample per clock are kept.
//
// Timing. x0/x1 must be stable for both cycles of an iteration (ST_OUT then
// ST_STATE); an assertion checks this and the alternation of the steps. S1/S2 are updated at the end of ST_STATE. The outputs of an
// iteration are registered at the end of the next iteration's ST_OUT cycle,
// i.e. they are visible from the third cycle after the iteration began and
// stay for two cycles. Throughput: two samples every two cycles.
//
// Arithmetic. Products and sums are kept at full precision; a tree result is
// brought back to DATA_W bits by an arithmetic shift of COEF_F bits (floor)
// and two's-complement wrap-around, which keeps the datapath linear modulo
// 2^DATA_W. The shared-adder/register-file assignment follows the published
// example; the two-cycle schedule, the widths, the floor quantisation and the
// asynchronous active-low reset are this design's choices.
module tsect
  import lin_pkg::*;
#(
  parameter int DATA_W  = 11,          // data and state word length
  parameter int COEF_W  = 11,          // section coefficient word length
  parameter int COEF_F  = 8,           // fractional bits of every coefficient
  parameter int TCOEF_W = COEF_W + 2,  // word length of the unfolded constants
  parameter int B0 = 128,              // section coefficients, COEF_F fraction bits
  parameter int A1 = 192,
  parameter int B1 = 64,
  parameter int A2 = -128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cstep_t                   step,
  input  logic signed [DATA_W-1:0] x0,   // first input of the pair (In1)
  input  logic signed [DATA_W-1:0] x1,   // second input of the pair (In2)
  output logic signed [DATA_W-1:0] y0,   // Out1
  output logic signed [DATA_W-1:0] y1,   // Out2
  output logic signed [DATA_W-1:0] s1,   // state S1 (newest w)
  output logic signed [DATA_W-1:0] s2    // state S2
);

  localparam int PW  = DATA_W + TCOEF_W;  // one product
  localparam int PSW = PW + 1;            // sum of two products
  localparam int FSW = PW + 2;            // sum of four products

  if (!(fits_signed(B0, COEF_W) && fits_signed(A1, COEF_W) &&
        fits_signed(B1, COEF_W) && fits_signed(A2, COEF_W))) begin : g_sec_range
    $error("tsect: a section coefficient does not fit COEF_W bits");
  end

  // Back to a data word: drop the fraction bits, wrap to DATA_W.
  function automatic logic signed [DATA_W-1:0] requant(logic signed [FSW-1:0] v);
    return DATA_W'(v >>> COEF_F);
  endfunction

  // ---------------------------------------------------------------- registers
  logic signed [DATA_W-1:0] s1_q, s2_q;        // state
  logic signed [PSW-1:0]    rf [4];            // register files R1..R4
  logic signed [PSW-1:0]    o1_q, o2_q;        // state half of the output trees
  logic signed [DATA_W-1:0] y0_q, y1_q;

  // ------------------------------------------------ 16 constant multipliers
  logic signed [DATA_W-1:0] opnd [NTERM];
  logic signed [PW-1:0]     p    [NTREE][NTERM];

  always_comb begin
    opnd[TERM_U0] = x0;
    opnd[TERM_U1] = x1;
    opnd[TERM_S1] = s1_q;
    opnd[TERM_S2] = s2_q;
  end

  for (genvar r = 0; r < NTREE; r++) begin : g_row
    for (genvar t = 0; t < NTERM; t++) begin : g_term
      localparam int CRT = unfold2(B0, A1, B1, A2, COEF_F, r, t);
      localparam logic signed [TCOEF_W-1:0] KRT = TCOEF_W'(CRT);
      if (!fits_signed(CRT, TCOEF_W)) begin : g_range
        $error("tsect: an unfolded coefficient does not fit TCOEF_W bits");
      end
      assign p[r][t] = PW'(opnd[t]) * PW'(KRT);
    end
  end

  // ----------------------------------------------------- dedicated adders
  // State half of the output trees, and the first level of the state trees.
  logic signed [PSW-1:0] o1_sum, o2_sum, s1a, s1b, s2a, s2b;
  always_comb begin
    o1_sum = PSW'(p[ROW_Y0][TERM_S1]) + PSW'(p[ROW_Y0][TERM_S2]);
    o2_sum = PSW'(p[ROW_Y1][TERM_S1]) + PSW'(p[ROW_Y1][TERM_S2]);
    s1a    = PSW'(p[ROW_S1][TERM_U0]) + PSW'(p[ROW_S1][TERM_U1]);
    s1b    = PSW'(p[ROW_S1][TERM_S1]) + PSW'(p[ROW_S1][TERM_S2]);
    s2a    = PSW'(p[ROW_S2][TERM_U0]) + PSW'(p[ROW_S2][TERM_U1]);
    s2b    = PSW'(p[ROW_S2][TERM_S1]) + PSW'(p[ROW_S2][TERM_S2]);
  end

  // ------------------------------------------------------ shared adders A, B
  logic signed [FSW-1:0] add_a, add_b;
  always_comb begin
    add_a = FSW'(rf[0]) + FSW'(rf[1]);
    add_b = FSW'(rf[2]) + FSW'(rf[3]);
  end

  // Root adders of the two output trees.
  logic signed [FSW-1:0] y0_sum, y1_sum;
  always_comb begin
    y0_sum = add_a + FSW'(o1_q);
    y1_sum = add_b + FSW'(o2_q);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_q <= '0;
      s2_q <= '0;
      rf   <= '{default: '0};
      o1_q <= '0;
      o2_q <= '0;
      y0_q <= '0;
      y1_q <= '0;
    end else if (step == ST_OUT) begin
      // adders A/B finish the previous iteration's outputs
      y0_q  <= requant(y0_sum);
      y1_q  <= requant(y1_sum);
      // register files take the partial sums of the state trees
      rf[0] <= s1a;
      rf[1] <= s1b;
      rf[2] <= s2a;
      rf[3] <= s2b;
      o1_q  <= o1_sum;
      o2_q  <= o2_sum;
    end else begin
      // adders A/B finish the state trees
      s1_q  <= requant(add_a);
      s2_q  <= requant(add_b);
      // register files take the input-only products
      rf[0] <= PSW'(p[ROW_Y0][TERM_U0]);
      rf[1] <= PSW'(p[ROW_Y0][TERM_U1]);
      rf[2] <= PSW'(p[ROW_Y1][TERM_U0]);
      rf[3] <= PSW'(p[ROW_Y1][TERM_U1]);
    end
  end

  // Schedule rules: the input pair is held for both steps of an iteration,
  // and the steps alternate.
  a_in_held: assert property (@(posedge clk) disable iff (!rst_n)
    (step == ST_STATE) |-> ($stable(x0) && $stable(x1)))
    else $error("tsect: input pair changed inside an iteration");
  a_alternate: assert property (@(posedge clk) disable iff (!rst_n)
    (step == ST_STATE) |=> (step == ST_OUT))
    else $error("tsect: ST_STATE not followed by ST_OUT");

  assign y0 = y0_q;
  assign y1 = y1_q;
  assign s1 = s1_q;
  assign s2 = s2_q;

endmodule
