// par_iir_orders_tb: runs the parallel filter at other orders: 5th order
// (two second-order sections and one first-order section, A2 = B1 = 0) and
// 10th, 12th and 18th order (5, 6 and 9 second-order sections), each with its
// own stable example coefficients, side by side on one clock. Each instance is checked by par_iir_harness
// (bit-exact model, real-valued original filter, latency and rate).
module par_iir_orders_tb;
  localparam int NPAIRS = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int c5, f5, p5, c10, f10, p10, c12, f12, p12, c18, f18, p18;
  bit d5, d10, d12, d18;

  par_iir_harness #(
    .NSECT(3), .NPAIRS(NPAIRS),
    .SEC('{0: '{16'sd48, 16'sd160, -16'sd16, -16'sd96},
           1: '{-16'sd32, -16'sd120, 16'sd24, -16'sd64},
           2: '{16'sd40, 16'sd200, 16'sd0, 16'sd0},
           default: '0})
  ) h5 (.clk, .rst_n, .checks(c5), .failures(f5), .pairs(p5), .done(d5));

  par_iir_harness #(
    .NSECT(5), .NPAIRS(NPAIRS),
    .SEC('{0: '{-16'sd24, -16'sd184, -16'sd16, -16'sd96},
           1: '{16'sd16, 16'sd152, 16'sd16, -16'sd160},
           2: '{-16'sd32, -16'sd184, 16'sd8, 16'sd32},
           3: '{-16'sd24, -16'sd312, 16'sd24, -16'sd160},
           4: '{16'sd16, -16'sd152, 16'sd24, -16'sd160},
           default: '0})
  ) h10 (.clk, .rst_n, .checks(c10), .failures(f10), .pairs(p10), .done(d10));

  par_iir_harness #(
    .NSECT(6), .NPAIRS(NPAIRS),
    .SEC('{0: '{16'sd16, 16'sd184, 16'sd8, -16'sd160},
           1: '{-16'sd32, -16'sd184, 16'sd24, 16'sd32},
           2: '{16'sd16, -16'sd168, 16'sd8, -16'sd160},
           3: '{16'sd24, 16'sd88, -16'sd16, -16'sd96},
           4: '{-16'sd32, -16'sd56, 16'sd8, 16'sd32},
           5: '{-16'sd32, 16'sd200, 16'sd8, -16'sd160},
           default: '0})
  ) h12 (.clk, .rst_n, .checks(c12), .failures(f12), .pairs(p12), .done(d12));

  par_iir_harness #(
    .NSECT(9), .NPAIRS(NPAIRS),
    .SEC('{0: '{-16'sd32, -16'sd232, -16'sd16, -16'sd96},
           1: '{-16'sd32, -16'sd184, 16'sd8, 16'sd32},
           2: '{-16'sd24, 16'sd248, 16'sd16, -16'sd64},
           3: '{16'sd32, 16'sd168, 16'sd16, -16'sd64},
           4: '{16'sd24, -16'sd184, -16'sd16, -16'sd128},
           5: '{-16'sd32, -16'sd56, 16'sd24, 16'sd32},
           6: '{16'sd32, 16'sd120, -16'sd16, -16'sd96},
           7: '{-16'sd24, 16'sd120, 16'sd8, -16'sd160},
           8: '{-16'sd24, -16'sd184, 16'sd24, -16'sd96},
           default: '0})
  ) h18 (.clk, .rst_n, .checks(c18), .failures(f18), .pairs(p18), .done(d18));

  int checks;
  int failures;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    wait (d5 && d10 && d12 && d18);
    checks = c5 + c10 + c12 + c18 + 4;
    failures = f5 + f10 + f12 + f18;
    // every order must have produced all its output pairs
    if (p5 != NPAIRS) failures++;
    if (p10 != NPAIRS) failures++;
    if (p12 != NPAIRS) failures++;
    if (p18 != NPAIRS) failures++;
    $display("output pairs checked: 5th order %0d, 10th order %0d, 12th order %0d, 18th order %0d", p5, p10, p12, p18);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NPAIRS + 1000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c5 + c10 + c12 + c18, f5 + f10 + f12 + f18 + 1);
    $finish;
  end

endmodule
