// tb_trig_identity_checker: feeds exact (cos, sin) pairs, pairs nudged just
// inside and just outside the 1 +/- gamma window, and corrupted pairs; the
// flag must follow the window two cycles later, with out_valid.
module tb_trig_identity_checker;
  import hma_pkg::*;

  localparam int W     = DATA_W;
  localparam int FRAC  = TFRAC;
  localparam int GAMMA = GAMMA_LSB;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, out_valid, err;
  logic signed [W-1:0] c, s;

  trig_identity_checker dut (.*);

  int checks = 0, failures = 0;

  // Expected flag from the exact sum of the truncated squares.
  function automatic logic want_err(input logic signed [W-1:0] cc, ss);
    real sum;
    sum = $floor(real'(cc) * real'(cc) / (2.0 ** FRAC)) + $floor(real'(ss) * real'(ss) / (2.0 ** FRAC));
    return (sum < (2.0 ** FRAC) - GAMMA) || (sum > (2.0 ** FRAC) + GAMMA);
  endfunction

  task automatic check_one(input logic signed [W-1:0] cc, ss);
    @(negedge clk);
    c = cc; s = ss; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    @(negedge clk);
    checks += 2;
    if (!out_valid) begin failures++; $display("FAIL: no out_valid"); end
    if (err !== want_err(cc, ss)) begin
      failures++;
      $display("FAIL: c=%0d s=%0d err=%b", cc, ss, err);
    end
  endtask

  function automatic logic signed [W-1:0] fx(input real v);
    return W'(to_fix(v, FRAC));
  endfunction

  initial begin
    c = '0; s = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_one(fx(1.0), fx(0.0));
    check_one(fx(0.0), fx(-1.0));
    check_one(fx(1.0) + W'(GAMMA / 4), '0);        // inside the window
    check_one(fx(1.0) + W'(GAMMA), '0);            // 1 + 2 gamma: outside
    check_one(fx(1.0) - W'(GAMMA), '0);            // 1 - 2 gamma: outside
    check_one(fx(0.5), fx(0.5));                    // sum 0.5
    check_one('0, '0);
    for (int i = 0; i < 200; i++) begin
      real a;
      a = real'($urandom) / 4294967296.0 * 2.0 * PI;
      check_one(fx($cos(a)), fx($sin(a)));
      check_one(fx($cos(a)) ^ (W'(1) << ($urandom_range(W - 1, 20))), fx($sin(a)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
