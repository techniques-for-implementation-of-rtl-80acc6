// par_iir_serial_tb: end-to-end test of the whole design, the filter with
// shared input and output pins, at its default parameters.
//
// One input sample is driven every clock: an impulse, a step, random samples,
// then silence so the filter rings out. Every output sample is compared with
//   - a bit-exact model written here (input gain, direct path and four
//     unfolded sections evaluated with integer arithmetic on sample pairs,
//     coefficients of the unfolded sections derived with real arithmetic), and
//   - a real-valued sample-by-sample run of the original parallel filter,
//     within a tolerance (the transformations keep the function).
// It checks the latency (6 cycles from input sample to output sample) and
// that one sample leaves per clock, and counts the mechanisms of the design:
// first and second samples of a pair sharing the input pins, both samples of
// a pair sharing the output pins, input-only and state additions on the
// shared adders of every section, register-file loads from the inputs, and a
// mid-run reset. Each must happen at least once.
module par_iir_serial_tb;
  import lin_pkg::*;

  localparam int W = 11;
  localparam int F = 8;
  localparam int NS = 4;
  localparam int NSAMP = 4000;
  localparam real TOL = 8.0;
  localparam int LAT = 6;
  // same coefficients as the filter's defaults, kept here independently
  localparam int KG = 128;
  localparam int DG = 64;
  localparam int SB0 [NS] = '{128, 96, 64, -64};
  localparam int SA1 [NS] = '{192, -128, 256, 64};
  localparam int SB1 [NS] = '{64, -32, 32, 128};
  localparam int SA2 [NS] = '{-128, -64, -160, 96};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [W-1:0] in_sample = '0;
  logic in_first, out_valid;
  logic signed [W-1:0] out_sample;

  always #5 clk = ~clk;

  par_iir_serial dut (.clk, .rst_n, .in_sample, .in_first, .out_sample, .out_valid);

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

  function automatic longint stim(int k);
    if (k == 0) return 400;                 // impulse
    if (k < 40) return 0;
    if (k < 120) return 150;                // step
    if (k < NSAMP - 200) return longint'($urandom_range(500)) - 250;
    return 0;
  endfunction

  longint exps [$];
  real    rexps [$];
  int     tin [$];
  int     cyc = 0;
  int     n_in = 0, n_first = 0, n_second = 0, n_out = 0, n_out_pair2 = 0;
  int     n_add_in = 0, n_add_state = 0, n_rf_load = 0, n_reset = 0;
  int     last_out = -1;
  real    maxerr = 0.0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      // every section's shared adders: input-only in ST_OUT, state in ST_STATE
      if (dut.u_filter.u_ctrl.step == ST_OUT) n_add_in += NS;
      else begin
        n_add_state += NS;
        n_rf_load += NS;
      end
    end
  end

  task automatic run_samples(int nsamp);
    int sent;
    int got;
    longint first;
    sent = 0;
    got = 0;
    first = 0;
    // called right at a falling edge in the first cycle after reset
    while (got < nsamp) begin
      if (out_valid) begin
        real e;
        check("latency", cyc - tin.pop_front(), LAT);
        if (last_out >= 0) check("one sample per clock", cyc - last_out, 1);
        last_out = cyc;
        if (dut.second_q) n_out_pair2++;
        check("out_sample", out_sample, exps.pop_front());
        e = out_sample - rexps.pop_front();
        if (e < 0) e = -e;
        if (e > maxerr) maxerr = e;
        checks++;
        if (e > TOL) begin
          failures++;
          $display("FAIL distance to real-valued filter %f", e);
        end
        n_out++;
        got++;
      end
      if (sent < nsamp) begin
        longint x;
        x = stim(sent);
        in_sample = W'(x);
        tin.push_back(cyc);
        n_in++;
        check("pair position", in_first, (sent % 2 == 0));
        if (in_first) begin
          n_first++;
          first = x;
        end else begin
          longint o0, o1;
          real r0, r1;
          n_second++;
          model_pair(first, x, o0, o1, r0, r1);
          exps.push_back(o0); exps.push_back(o1);
          rexps.push_back(r0); rexps.push_back(r1);
        end
        sent++;
      end else begin
        in_sample = '0;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    model_reset();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run_samples(NSAMP);
    // reset in the middle of operation
    @(negedge clk);
    rst_n = 1'b0;
    n_reset++;
    model_reset();
    tin.delete();
    last_out = -1;
    @(negedge clk);
    rst_n = 1'b1;
    run_samples(100);
    $display("largest distance to the real-valued original filter: %f LSB", maxerr);
    $display("samples in %0d (first of pair %0d, second of pair %0d), samples out %0d (second of pair %0d)",
             n_in, n_first, n_second, n_out, n_out_pair2);
    $display("shared-adder input-only additions %0d, state additions %0d, register-file loads from inputs %0d, resets %0d",
             n_add_in, n_add_state, n_rf_load, n_reset);
    checks++; if (n_first == 0) failures++;
    checks++; if (n_second == 0) failures++;
    checks++; if (n_out_pair2 == 0) failures++;
    checks++; if (n_add_in == 0) failures++;
    checks++; if (n_add_state == 0) failures++;
    checks++; if (n_rf_load == 0) failures++;
    checks++; if (n_reset == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NSAMP + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
