// tb_const_scaler: checks the constant multiplier with its default constant
// (sqrt(pitch^2/(lambda L)) divided by the CORDIC gain) against floating
// point, for random positive and negative words, and its one-cycle latency.
module tb_const_scaler;
  import hma_pkg::*;

  localparam int  W     = DATA_W;
  localparam real SCALE = $sqrt(PHASE_PER_PX2) / cordic_gain(ITER);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, out_valid;
  logic signed [W-1:0] din, dout;

  const_scaler dut (.*);

  int checks = 0, failures = 0;

  task automatic check_one(input longint v);
    real want, got;
    @(negedge clk);
    din = W'(v);
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    want = real'(v) * SCALE / (2.0 ** VFRAC);
    got  = real'(dout) / (2.0 ** VFRAC);
    checks += 2;
    if (!out_valid) begin failures++; $display("FAIL: no out_valid after one cycle"); end
    if (got - want > 2.0 ** (-VFRAC + 1) || want - got > 2.0 ** (-VFRAC + 1)) begin
      failures++;
      $display("FAIL: %0d -> %g, want %g", v, got, want);
    end
  endtask

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_one(0);
    check_one(longint'(1) << VFRAC);
    check_one(-(longint'(1) << VFRAC));
    check_one((longint'(1) << (W - 3)) - 1);
    for (int i = 0; i < 200; i++)
      check_one(longint'({$urandom, $urandom}) >>> (64 - W + 2));
    @(negedge clk);
    checks++;
    if (out_valid) begin failures++; $display("FAIL: out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
