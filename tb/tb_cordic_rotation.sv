// tb_cordic_rotation: checks the full-range rotation CORDIC against floating
// point. Starting from (1/K, 0) it must return (cos z, sin z) for angles in
// every quadrant, including the +/- pi and +/- pi/2 boundaries, with a
// latency of ITER+1 cycles.
module tb_cordic_rotation;
  import hma_pkg::*;

  localparam int  W    = DATA_W;
  localparam int  FRAC = TFRAC;
  localparam int  LAT  = cordic_latency(ITER);
  localparam real TOL  = 1.0e-9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, out_valid;
  logic signed [W-1:0] x_in, y_in, x_out, y_out, z_in, z_out;

  cordic_rotation dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  real c_q[$], s_q[$];
  int  t_q[$];
  real worst = 0.0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real ec, es;
      ec = real'(x_out) / (2.0 ** FRAC) - c_q.pop_front();
      es = real'(y_out) / (2.0 ** FRAC) - s_q.pop_front();
      if (ec < 0) ec = -ec;
      if (es < 0) es = -es;
      if (ec > worst) worst = ec;
      if (es > worst) worst = es;
      checks += 3;
      if (ec > TOL) begin failures++; $display("FAIL cos err %g", ec); end
      if (es > TOL) begin failures++; $display("FAIL sin err %g", es); end
      if (cycle - t_q.pop_front() != LAT) begin failures++; $display("FAIL latency"); end
    end
  end

  // Angle given as a fraction of pi in [-1, 1).
  task automatic send_angle(input logic signed [W-1:0] z);
    real a;
    @(negedge clk);
    a = real'(z) / (2.0 ** (W - 1)) * PI;
    x_in = W'(to_fix(1.0 / cordic_gain(ITER), FRAC));
    y_in = '0;
    z_in = z;
    in_valid = 1'b1;
    c_q.push_back($cos(a));
    s_q.push_back($sin(a));
    t_q.push_back(cycle);
  endtask

  initial begin
    x_in = '0; y_in = '0; z_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send_angle('0);
    send_angle({1'b1, {(W-1){1'b0}}});            // -pi
    send_angle({2'b01, {(W-2){1'b0}}});           // +pi/2
    send_angle({2'b11, {(W-2){1'b0}}});           // -pi/2
    send_angle({2'b00, {(W-2){1'b1}}});           // just below pi/2
    send_angle({1'b0, {(W-1){1'b1}}});            // just below pi
    for (int i = 0; i < 300; i++) send_angle({$urandom, $urandom});
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (c_q.size() != 0) begin failures++; $display("FAIL %0d missing", c_q.size()); end
    $display("worst error %g", worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
