// par_iir_tb: end-to-end test of the eighth-order parallel filter at its
// default parameters.
//
// The testbench feeds sample pairs whenever take_in asks for one: an impulse,
// a step, then random samples, then silence so the filter rings out. Every
// output pair flagged by out_valid is compared with
//   - a bit-exact model written here (input gain, direct path and four
//     unfolded sections evaluated with integer arithmetic, coefficients of
//     the unfolded sections derived with real arithmetic), and
//   - a real-valued sample-by-sample run of the original parallel filter,
//     within a tolerance (the transformations keep the function).
// It also checks the latency (output pair visible 5 cycles after its
// sampling edge) and the rate (one output pair every two cycles), and
// counts the mechanisms of the design: input pairs taken, output pairs,
// additions of input-only products on the shared adders, state additions
// on the shared adders, register-file loads from the primary inputs, a
// mid-run reset. Each must have happened at least once.
module par_iir_tb;
  import lin_pkg::*;

  localparam int W = 11;
  localparam int F = 8;
  localparam int NS = 4;
  localparam int NPAIRS = 1500;
  localparam real TOL = 8.0;
  // same coefficients as the filter's defaults, kept here independently
  localparam int KG = 128;
  localparam int DG = 64;
  localparam int SB0 [NS] = '{128, 96, 64, -64};
  localparam int SA1 [NS] = '{192, -128, 256, 64};
  localparam int SB1 [NS] = '{64, -32, 32, 128};
  localparam int SA2 [NS] = '{-128, -64, -160, 96};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [W-1:0] in1 = '0, in2 = '0;
  logic take_in, out_valid;
  logic signed [W-1:0] out1, out2;

  always #5 clk = ~clk;

  par_iir dut (.clk, .rst_n, .in1, .in2, .take_in, .out1, .out2, .out_valid);

  int checks = 0;
  int failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // ------------------------------------------------------------ fixed model
  longint cm [NS][4][4];
  longint ms1 [NS], ms2 [NS];
  real    rw1 [NS], rw2 [NS];

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

  task automatic model_reset();
    for (int s = 0; s < NS; s++) begin
      ms1[s] = 0; ms2[s] = 0; rw1[s] = 0.0; rw2[s] = 0.0;
    end
  endtask

  initial begin
    for (int s = 0; s < NS; s++) begin
      real b0, a1, b1, a2;
      b0 = SB0[s] / 256.0; a1 = SA1[s] / 256.0; b1 = SB1[s] / 256.0; a2 = SA2[s] / 256.0;
      cm[s][0] = '{qround(b0), 0, qround(b0 * a1 + b1), qround(b0 * a2)};
      cm[s][1] = '{qround(b0 * a1 + b1), qround(b0),
                   qround(b0 * (a1 * a1 + a2) + b1 * a1), qround((b0 * a1 + b1) * a2)};
      cm[s][2] = '{qround(a1), qround(1.0), qround(a1 * a1 + a2), qround(a1 * a2)};
      cm[s][3] = '{qround(1.0), 0, qround(a1), qround(a2)};
    end
  end

  // One pair through the fixed-point model and the real-valued original.
  task automatic model_pair(input longint i0, input longint i1,
                            output longint o0, output longint o1,
                            output real r0, output real r1);
    longint u0, u1, acc0, acc1;
    real ur0, ur1;
    u0 = q(KG * i0);
    u1 = q(KG * i1);
    acc0 = q(DG * u0);
    acc1 = q(DG * u1);
    ur0 = KG / 256.0 * real'(i0);
    ur1 = KG / 256.0 * real'(i1);
    r0 = DG / 256.0 * ur0;
    r1 = DG / 256.0 * ur1;
    for (int s = 0; s < NS; s++) begin
      longint op [4];
      longint a [4];
      real w0, w1;
      op = '{u0, u1, ms1[s], ms2[s]};
      a = '{0, 0, 0, 0};
      for (int r = 0; r < 4; r++)
        for (int t = 0; t < 4; t++)
          a[r] += cm[s][r][t] * op[t];
      acc0 += q(a[0]);
      acc1 += q(a[1]);
      ms1[s] = q(a[2]);
      ms2[s] = q(a[3]);
      w0 = ur0 + SA1[s] / 256.0 * rw1[s] + SA2[s] / 256.0 * rw2[s];
      w1 = ur1 + SA1[s] / 256.0 * w0 + SA2[s] / 256.0 * rw1[s];
      r0 += SB0[s] / 256.0 * w0 + SB1[s] / 256.0 * rw1[s];
      r1 += SB0[s] / 256.0 * w1 + SB1[s] / 256.0 * w0;
      rw2[s] = w0;
      rw1[s] = w1;
    end
    o0 = wrapw(acc0);
    o1 = wrapw(acc1);
  endtask

  // ------------------------------------------------------------- stimulus
  function automatic longint stim(int k);
    if (k == 0) return 400;                 // impulse
    if (k < 40) return 0;
    if (k < 120) return 150;                // step
    if (k < NPAIRS * 2 - 200) return longint'($urandom_range(500)) - 250;
    return 0;
  endfunction

  // ------------------------------------------------------------ bookkeeping
  longint exp0 [$], exp1 [$];
  real    rexp0 [$], rexp1 [$];
  int     tsample [$];
  int     cyc = 0;
  int     n_take = 0, n_out = 0, n_add_in = 0, n_add_state = 0, n_rf_load = 0, n_reset = 0;
  int     last_out = -1;
  real    maxerr = 0.0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (dut.step == ST_OUT) n_add_in++;
      else n_add_state++;
      if (dut.step == ST_STATE) n_rf_load++;
    end
  end

  task automatic run_pairs(int npairs, int pair_base);
    int sent;
    int got;
    sent = 0;
    got = 0;
    while (got < npairs) begin
      @(negedge clk);
      if (out_valid) begin
        real e0, e1;
        int ts;
        n_out++;
        ts = tsample.pop_front();
        check("latency", cyc - ts, 5);
        if (last_out >= 0) check("rate", cyc - last_out, 2);
        last_out = cyc;
        check("out1", out1, exp0.pop_front());
        check("out2", out2, exp1.pop_front());
        e0 = out1 - rexp0.pop_front(); if (e0 < 0) e0 = -e0;
        e1 = out2 - rexp1.pop_front(); if (e1 < 0) e1 = -e1;
        if (e0 > maxerr) maxerr = e0;
        if (e1 > maxerr) maxerr = e1;
        checks++;
        if (e0 > TOL || e1 > TOL) begin
          failures++;
          $display("FAIL distance to real-valued filter %f %f", e0, e1);
        end
        got++;
      end
      if (take_in && sent < npairs) begin
        longint i0, i1, o0, o1;
        real r0, r1;
        i0 = stim(2 * (pair_base + sent));
        i1 = stim(2 * (pair_base + sent) + 1);
        in1 = W'(i0);
        in2 = W'(i1);
        model_pair(i0, i1, o0, o1, r0, r1);
        exp0.push_back(o0); exp1.push_back(o1);
        rexp0.push_back(r0); rexp1.push_back(r1);
        tsample.push_back(cyc);   // sampled at the end of this cycle
        n_take++;
        sent++;
      end
    end
  endtask

  initial begin
    model_reset();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_pairs(NPAIRS, 0);
    // reset in the middle of operation: state and pipeline must restart clean
    @(negedge clk);
    rst_n = 1'b0;
    n_reset++;
    model_reset();
    last_out = -1;
    @(negedge clk);
    rst_n = 1'b1;
    run_pairs(60, 0);
    $display("largest distance to the real-valued original filter: %f LSB", maxerr);
    $display("pairs taken %0d, output pairs %0d, input-only additions %0d, state additions %0d, register-file loads from inputs %0d, resets %0d",
             n_take, n_out, n_add_in, n_add_state, n_rf_load, n_reset);
    checks++; if (n_take == 0) failures++;
    checks++; if (n_out == 0) failures++;
    checks++; if (n_add_in == 0) failures++;
    checks++; if (n_add_state == 0) failures++;
    checks++; if (n_rf_load == 0) failures++;
    checks++; if (n_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NPAIRS + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
