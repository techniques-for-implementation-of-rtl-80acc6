// par_iir_harness: drives one par_iir instance of any order with random
// sample pairs and checks every output pair against a bit-exact integer
// model and a real-valued run of the original parallel filter. Used by
// par_iir_orders_tb to run several filter orders side by side.
//
// The model is written independently of the RTL: unfolded constants are
// derived with real arithmetic, quantisation is floor plus wrap-around to
// the data width. Latency (output visible 5 cycles after its sampling edge)
// and rate (one pair per two cycles) are checked too. done rises after
// NPAIRS output pairs. The allowed distance to the real-valued filter grows
// with the number of sections, since every section and every sum adds its
// own floor error (TOL default: 4 LSB plus 1 LSB per section).
module par_iir_harness #(
  parameter int NSECT  = 5,
  parameter logic [0:8][0:3][15:0] SEC = '0,  // sections 0..NSECT-1 used
  parameter int K      = 128,
  parameter int D      = 64,
  parameter int NPAIRS = 300,
  parameter int AMP    = 250,
  parameter real TOL   = 4.0 + 1.0 * NSECT
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output int   pairs,
  output bit   done
);
  localparam int W = 11;
  localparam int F = 8;

  logic signed [W-1:0] in1 = '0, in2 = '0;
  logic take_in, out_valid;
  logic signed [W-1:0] out1, out2;

  par_iir #(.NSECT(NSECT), .SEC(SEC[0:NSECT-1]), .K(K), .D(D)) dut (
    .clk, .rst_n, .in1, .in2, .take_in, .out1, .out2, .out_valid);

  longint cm [NSECT][4][4];
  longint ms1 [NSECT], ms2 [NSECT];
  real    rw1 [NSECT], rw2 [NSECT];
  real    cb0 [NSECT], ca1 [NSECT], cb1 [NSECT], ca2 [NSECT];

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

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL order %0d %s: got %0d expected %0d", 2 * NSECT, what, got, exp);
    end
  endtask

  task automatic model_pair(input longint i0, input longint i1,
                            output longint o0, output longint o1,
                            output real r0, output real r1);
    longint u0, u1, acc0, acc1;
    real ur0, ur1;
    u0 = q(K * i0);
    u1 = q(K * i1);
    acc0 = q(D * u0);
    acc1 = q(D * u1);
    ur0 = K / 256.0 * real'(i0);
    ur1 = K / 256.0 * real'(i1);
    r0 = D / 256.0 * ur0;
    r1 = D / 256.0 * ur1;
    for (int s = 0; s < NSECT; s++) begin
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
      w0 = ur0 + ca1[s] * rw1[s] + ca2[s] * rw2[s];
      w1 = ur1 + ca1[s] * w0 + ca2[s] * rw1[s];
      r0 += cb0[s] * w0 + cb1[s] * rw1[s];
      r1 += cb0[s] * w1 + cb1[s] * w0;
      rw2[s] = w0;
      rw1[s] = w1;
    end
    o0 = wrapw(acc0);
    o1 = wrapw(acc1);
  endtask

  longint exp0 [$], exp1 [$];
  real    rexp0 [$], rexp1 [$];
  int     tsample [$];
  int     cyc = 0;
  real    emax = 0.0;
  int     last_out = -1;
  int     sent = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    checks = 0;
    failures = 0;
    pairs = 0;
    done = 1'b0;
    for (int s = 0; s < NSECT; s++) begin
      cb0[s] = real'(int'(signed'(SEC[s][0]))) / 256.0;
      ca1[s] = real'(int'(signed'(SEC[s][1]))) / 256.0;
      cb1[s] = real'(int'(signed'(SEC[s][2]))) / 256.0;
      ca2[s] = real'(int'(signed'(SEC[s][3]))) / 256.0;
      cm[s][0] = '{qround(cb0[s]), 0, qround(cb0[s] * ca1[s] + cb1[s]), qround(cb0[s] * ca2[s])};
      cm[s][1] = '{qround(cb0[s] * ca1[s] + cb1[s]), qround(cb0[s]),
                   qround(cb0[s] * (ca1[s] * ca1[s] + ca2[s]) + cb1[s] * ca1[s]),
                   qround((cb0[s] * ca1[s] + cb1[s]) * ca2[s])};
      cm[s][2] = '{qround(ca1[s]), qround(1.0), qround(ca1[s] * ca1[s] + ca2[s]), qround(ca1[s] * ca2[s])};
      cm[s][3] = '{qround(1.0), 0, qround(ca1[s]), qround(ca2[s])};
      ms1[s] = 0; ms2[s] = 0; rw1[s] = 0.0; rw2[s] = 0.0;
    end
    @(posedge rst_n);
    while (pairs < NPAIRS) begin
      @(negedge clk);
      if (out_valid) begin
        real e0, e1;
        check("latency", cyc - tsample.pop_front(), 5);
        if (last_out >= 0) check("rate", cyc - last_out, 2);
        last_out = cyc;
        check("out1", out1, exp0.pop_front());
        check("out2", out2, exp1.pop_front());
        e0 = out1 - rexp0.pop_front(); if (e0 < 0) e0 = -e0;
        e1 = out2 - rexp1.pop_front(); if (e1 < 0) e1 = -e1;
        checks++;
        if (e0 > emax) emax = e0;
        if (e1 > emax) emax = e1;
        if (e0 > TOL || e1 > TOL) begin
          failures++;
          $display("FAIL %0d sections: distance to real-valued filter %f %f", NSECT, e0, e1);
        end
        pairs++;
      end
      if (take_in) begin
        longint i0, i1, o0, o1;
        real r0, r1;
        i0 = (sent < NPAIRS - 40) ? longint'($urandom_range(2 * AMP)) - AMP : 0;
        i1 = (sent < NPAIRS - 40) ? longint'($urandom_range(2 * AMP)) - AMP : 0;
        in1 = W'(i0);
        in2 = W'(i1);
        model_pair(i0, i1, o0, o1, r0, r1);
        exp0.push_back(o0); exp1.push_back(o1);
        rexp0.push_back(r0); rexp1.push_back(r1);
        tsample.push_back(cyc);
        sent++;
      end
    end
    $display("%0d sections: largest distance to real-valued filter %f LSB (bound %f)", NSECT, emax, TOL);
    done = 1'b1;
  end

endmodule
