// tb_calc_unit_prot: self-checking test of one protected calculation unit.
//
// Streams random (pixel, bright bit) coordinate pairs, one per cycle, and
// compares every cosine term with cos(pi * d^2 * pitch^2 / (lambda L))
// computed in floating point. Checks the pipeline latency, that no
// detection flag rises while the unit is fault-free, and that a fault forced
// into one distance replica and one into the cosine CORDIC are detected.
module tb_calc_unit_prot;
  import hma_pkg::*;

  localparam int  W    = DATA_W;
  localparam int  LAT  = calc_latency(ITER);
  localparam int  NVEC = 400;
  localparam int  R    = 300;          // coordinate range +/- R pixels
  // Tolerance: the scaled distance d*sqrt(pitch^2/(lambda L)) may deviate by
  // DEV; the cosine argument pi*ds^2 then moves by about 2*pi*ds*DEV.
  localparam real DEV  = 4.0e-6;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0;
  coord_t alpha, beta, x, y;
  logic out_valid;
  logic signed [W-1:0] cos_out;
  unit_err_t err;

  calc_unit_prot dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  real exp_q[$];
  real tol_q[$];
  int  t_q[$];
  real max_err = 0.0;
  int  n_err1 = 0, n_err2 = 0, n_err3 = 0;
  logic expect_faults = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic real ref_cos(input int a, b, xx, yy);
    real d2;
    d2 = real'((a - xx) * (a - xx) + (b - yy) * (b - yy));
    return $cos(PI * PHASE_PER_PX2 * d2);
  endfunction

  // Output checker.
  always @(posedge clk) begin
    if (rst_n) begin
      if (out_valid) begin
        real e, got;
        got = real'(cos_out) / (2.0 ** (W - 2));
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("FAIL: unexpected output");
        end else begin
          e = got - exp_q.pop_front();
          if (e < 0) e = -e;
          if (e > max_err) max_err = e;
          if (e > tol_q.pop_front() && !expect_faults) begin
            failures++;
            $display("FAIL: cos error %g", e);
          end
          checks++;
          if (cycle - t_q.pop_front() != LAT) begin
            failures++;
            $display("FAIL: latency %0d", cycle);
          end
        end
      end
      if (err.dmr1) n_err1++;
      if (err.dmr2) n_err2++;
      if (err.dmr3) n_err3++;
    end
  end

  // Inputs change on the falling edge, away from the sampling edge.
  task automatic send(input int a, b, xx, yy);
    @(negedge clk);
    alpha = coord_t'(a); beta = coord_t'(b);
    x = coord_t'(xx);    y = coord_t'(yy);
    in_valid = 1'b1;
    exp_q.push_back(ref_cos(a, b, xx, yy));
    tol_q.push_back(1.0e-6 + 2.0 * PI * DEV *
                    $sqrt(PHASE_PER_PX2 * real'((a - xx) * (a - xx) + (b - yy) * (b - yy))));
    t_q.push_back(cycle);
  endtask

  task automatic idle(input int n);
    @(negedge clk);
    in_valid = 1'b0;
    repeat (n) @(posedge clk);
  endtask

  function automatic int rnd();
    return int'($urandom_range(2 * R)) - R;
  endfunction

  initial begin
    alpha = '0; beta = '0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // corner cases: zero distance, axis-aligned, negative differences
    send(0, 0, 0, 0);
    send(5, 0, 0, 0);
    send(0, -7, 0, 0);
    send(-R, -R, R, R);
    send(R, -R, -R, R);
    for (int i = 0; i < NVEC; i++) send(rnd(), rnd(), rnd(), rnd());
    idle(LAT + 5);
    checks++;
    if (n_err1 + n_err2 + n_err3 != 0) begin
      failures++;
      $display("FAIL: false alarms dmr1=%0d dmr2=%0d dmr3=%0d", n_err1, n_err2, n_err3);
    end
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", exp_q.size());
    end
    $display("max |cos error| = %g", max_err);

    // Fault in distance replica 0: its scaled distance gets a bit flipped.
    expect_faults = 1'b1;
    force dut.u_dist.g_rep[0].u_scale.dout[3] = 1'b1;
    for (int i = 0; i < 20; i++) send(rnd(), rnd(), rnd(), rnd());
    idle(LAT + 5);
    release dut.u_dist.g_rep[0].u_scale.dout[3];
    checks++;
    if (n_err1 == 0 || n_err2 == 0) begin
      failures++;
      $display("FAIL: distance fault missed dmr1=%0d dmr2=%0d", n_err1, n_err2);
    end
    // Fault in the cosine CORDIC: one stage output bit stuck.
    force dut.u_cos.u_cordic.x_out[W-4] = 1'b1;
    for (int i = 0; i < 20; i++) send(rnd(), rnd(), rnd(), rnd());
    idle(LAT + 5);
    release dut.u_cos.u_cordic.x_out[W-4];
    checks++;
    if (n_err3 == 0) begin
      failures++;
      $display("FAIL: cosine fault missed");
    end
    $display("flags: dmr1=%0d dmr2=%0d dmr3=%0d", n_err1, n_err2, n_err3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
