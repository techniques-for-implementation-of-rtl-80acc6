// tsect_tb: self-checking testbench of the unfolded, testable second-order
// section.
//
// Two sections with different coefficients are driven with random input
// pairs; the control step alternates ST_OUT / ST_STATE as step_ctrl does.
// The expected values come from a model written here: the unfolded
// coefficients are derived with real arithmetic from the section
// coefficients and the unfolded equations are evaluated with integer
// arithmetic (floor, wrap to the data width). Checked each iteration:
//   - next state S1/S2 after the ST_STATE edge,
//   - register files R1..R4 holding the input-only products after the
//     ST_STATE edge (the controllability property),
//   - output pair exactly in the cycle after the next ST_OUT edge, and the
//     previous pair still present one cycle before (latency),
//   - outputs against a sample-by-sample real-valued run of the original,
//     not unfolded section, within a small tolerance (the transformation
//     keeps the function),
//   - that one input pair applied from the reset state sets the state
//     registers to any chosen value (controllability without scan).
module tsect_tb;
  import lin_pkg::*;

  localparam int W  = 11;
  localparam int F  = 8;
  localparam int NITER = 400;
  localparam real TOL = 4.0;   // LSBs allowed between fixed and real model

  localparam int NDUT = 2;
  localparam int CB0 [NDUT] = '{128, 64};
  localparam int CA1 [NDUT] = '{192, 256};
  localparam int CB1 [NDUT] = '{64, 32};
  localparam int CA2 [NDUT] = '{-128, -160};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  cstep_t step = ST_OUT;
  logic signed [W-1:0] x0 = '0, x1 = '0;
  logic signed [W-1:0] y0 [NDUT], y1 [NDUT], s1 [NDUT], s2 [NDUT];

  always #5 clk = ~clk;

  tsect #(.B0(CB0[0]), .A1(CA1[0]), .B1(CB1[0]), .A2(CA2[0])) dut0 (
    .clk, .rst_n, .step, .x0, .x1, .y0(y0[0]), .y1(y1[0]), .s1(s1[0]), .s2(s2[0]));
  tsect #(.B0(CB0[1]), .A1(CA1[1]), .B1(CB1[1]), .A2(CA2[1])) dut1 (
    .clk, .rst_n, .step, .x0, .x1, .y0(y0[1]), .y1(y1[1]), .s1(s1[1]), .s2(s2[1]));

  int checks = 0;
  int failures = 0;

  // --------------------------------------------------------- reference model
  longint cm [NDUT][4][4];

  function automatic longint qround(real v);
    return longint'($floor(v * 256.0 + 0.5));
  endfunction

  function automatic longint wrapw(longint v);
    longint m;
    m = v & ((longint'(1) << W) - 1);
    if (m >= (longint'(1) << (W - 1))) m -= (longint'(1) << W);
    return m;
  endfunction

  function automatic longint q(longint acc);
    return wrapw(acc >>> F);
  endfunction

  task automatic build_coefs();
    for (int d = 0; d < NDUT; d++) begin
      real b0, a1, b1, a2;
      b0 = CB0[d] / 256.0; a1 = CA1[d] / 256.0; b1 = CB1[d] / 256.0; a2 = CA2[d] / 256.0;
      // rows: y0, y1, S1', S2'; columns: u0, u1, S1, S2
      cm[d][0] = '{qround(b0), 0, qround(b0 * a1 + b1), qround(b0 * a2)};
      cm[d][1] = '{qround(b0 * a1 + b1), qround(b0),
                   qround(b0 * (a1 * a1 + a2) + b1 * a1), qround((b0 * a1 + b1) * a2)};
      cm[d][2] = '{qround(a1), qround(1.0), qround(a1 * a1 + a2), qround(a1 * a2)};
      cm[d][3] = '{qround(1.0), 0, qround(a1), qround(a2)};
    end
  endtask

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // ------------------------------------------------------------------- test
  longint ms1 [NDUT], ms2 [NDUT];       // model state
  longint my0 [NDUT], my1 [NDUT];       // model outputs of the last iteration
  longint py0 [NDUT], py1 [NDUT];       // and of the one before
  real    rw1 [NDUT], rw2 [NDUT];       // real-valued original section
  real    ry0 [NDUT], ry1 [NDUT];
  real    maxerr = 0.0;
  int     n_set = 0;

  initial begin
    build_coefs();
    for (int d = 0; d < NDUT; d++) begin
      ms1[d] = 0; ms2[d] = 0; my0[d] = 0; my1[d] = 0; py0[d] = 0; py1[d] = 0;
      rw1[d] = 0.0; rw2[d] = 0.0; ry0[d] = 0.0; ry1[d] = 0.0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < NITER; it++) begin
      longint u0, u1;
      // drive the pair for this iteration; zero pairs at the end let it ring out
      u0 = (it < NITER - 40) ? longint'($urandom_range(240)) - 120 : 0;
      u1 = (it < NITER - 40) ? longint'($urandom_range(240)) - 120 : 0;
      x0 = W'(u0);
      x1 = W'(u1);
      step = ST_OUT;
      @(negedge clk);
      // after the ST_OUT edge: outputs of the previous iteration are visible
      if (it > 0)
        for (int d = 0; d < NDUT; d++) begin
          real e0, e1;
          check("y0", y0[d], my0[d]);
          check("y1", y1[d], my1[d]);
          e0 = (y0[d] - ry0[d]); if (e0 < 0) e0 = -e0;
          e1 = (y1[d] - ry1[d]); if (e1 < 0) e1 = -e1;
          if (e0 > maxerr) maxerr = e0;
          if (e1 > maxerr) maxerr = e1;
          checks++;
          if (e0 > TOL || e1 > TOL) begin
            failures++;
            $display("FAIL real-model distance %f %f at iteration %0d", e0, e1, it);
          end
        end
      step = ST_STATE;
      @(negedge clk);
      // after the ST_STATE edge: state updated, register files hold input products,
      // outputs still those of the previous iteration (they change on the next ST_OUT edge)
      for (int d = 0; d < NDUT; d++) begin
        longint op [4];
        real w0r, w1r;
        op = '{u0, u1, ms1[d], ms2[d]};
        py0[d] = my0[d]; py1[d] = my1[d];
        my0[d] = 0; my1[d] = 0;
        begin
          longint a0, a1, a2, a3;
          a0 = 0; a1 = 0; a2 = 0; a3 = 0;
          for (int t = 0; t < 4; t++) begin
            a0 += cm[d][0][t] * op[t];
            a1 += cm[d][1][t] * op[t];
            a2 += cm[d][2][t] * op[t];
            a3 += cm[d][3][t] * op[t];
          end
          my0[d] = q(a0); my1[d] = q(a1);
          ms1[d] = q(a2); ms2[d] = q(a3);
        end
        // original section, one sample at a time, real arithmetic
        w0r = real'(u0) + CA1[d] / 256.0 * rw1[d] + CA2[d] / 256.0 * rw2[d];
        ry0[d] = CB0[d] / 256.0 * w0r + CB1[d] / 256.0 * rw1[d];
        w1r = real'(u1) + CA1[d] / 256.0 * w0r + CA2[d] / 256.0 * rw1[d];
        ry1[d] = CB0[d] / 256.0 * w1r + CB1[d] / 256.0 * w0r;
        rw2[d] = w0r; rw1[d] = w1r;
        check("s1", s1[d], ms1[d]);
        check("s2", s2[d], ms2[d]);
        check("y0 held", y0[d], py0[d]);
        check("y1 held", y1[d], py1[d]);
      end
      check("R1 = c1*In1", longint'(dut0.rf[0]), cm[0][0][0] * u0);
      check("R2 = c2*In2", longint'(dut0.rf[1]), cm[0][0][1] * u1);
      check("R3 = c5*In1", longint'(dut0.rf[2]), cm[0][1][0] * u0);
      check("R4 = c6*In2", longint'(dut0.rf[3]), cm[0][1][1] * u1);
    end
    // Controllability: from the reset state, one input pair sets the state to
    // any chosen value. With S1 = S2 = 0 the section gives S2' = u0 and
    // S1' = u1 + floor(A1*u0 / 2^F), so u0 = t2 and u1 = t1 - floor(A1*t2 / 2^F).
    for (int trial = 0; trial < 40; trial++) begin
      longint t1, t2, u0, u1;
      step = ST_OUT;
      rst_n = 1'b0;
      @(negedge clk);
      rst_n = 1'b1;
      t2 = longint'($urandom_range(1000)) - 500;
      t1 = longint'($urandom_range(600)) - 300;
      u0 = t2;
      u1 = t1 - ((CA1[0] * t2) >>> F);
      x0 = W'(u0);
      x1 = W'(u1);
      step = ST_OUT;
      @(negedge clk);
      step = ST_STATE;
      @(negedge clk);
      check("S1 set from inputs", s1[0], t1);
      check("S2 set from inputs", s2[0], t2);
      n_set++;
    end
    checks++;
    if (n_set == 0) failures++;
    $display("largest distance to the real-valued original section: %f LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20 * NITER + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
