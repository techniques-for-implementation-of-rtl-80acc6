// step_ctrl_tb: self-checking testbench of the control-step sequencer.
//
// From reset the sequencer must start in ST_OUT and alternate the two
// steps every cycle; take_in must be high exactly in ST_STATE cycles; and
// out_valid must first rise in the ST_OUT cycle that follows the edge on
// which the output of the first sampled pair is loaded (LATENCY cycles after
// the first sampling edge), then pulse once every iteration. A second reset
// in the middle of the run must restart the fill count.
module step_ctrl_tb;
  import lin_pkg::*;

  localparam int LAT = 4;

  logic   clk = 1'b0;
  logic   rst_n = 1'b0;
  cstep_t step;
  logic   take_in, out_valid;

  always #5 clk = ~clk;

  step_ctrl #(.LATENCY(LAT)) dut (.clk, .rst_n, .step, .take_in, .out_valid);

  int checks = 0;
  int failures = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Run n cycles after a reset and compare with the expected sequence.
  task automatic run_from_reset(int n);
    int first_take;
    first_take = -1;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < n; c++) begin
      bit exp_valid;
      check("step", step, (c % 2 == 1) ? ST_STATE : ST_OUT);
      check("take_in", take_in, (c % 2 == 1));
      if (take_in && first_take < 0) first_take = c;
      // first pair sampled at the end of cycle first_take, its output loaded at
      // the end of cycle first_take + LAT, valid from the next cycle on
      exp_valid = (first_take >= 0) && (c >= first_take + LAT + 1) && (c % 2 == 0);
      check("out_valid", out_valid, exp_valid);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    run_from_reset(40);
    run_from_reset(13);
    run_from_reset(30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
