// tb_distance_unit_prot: checks the protected distance unit.
//
// For random pixel/bright-bit pairs the argument must equal
// d^2 * pitch^2 / (lambda L) modulo 2 (units of pi) within the precision of
// the fixed-point path, with the documented latency and no false alarm.
// Then a bit of replica 0's CORDIC output is forced: DMR1 and DMR2 must
// fire, while a fault confined to replica 0's squarer fires only DMR2.
module tb_distance_unit_prot;
  import hma_pkg::*;

  localparam int  W   = DATA_W;
  localparam int  LAT = distance_latency(ITER);
  localparam real DEV = 4.0e-6;     // allowed error of the scaled distance
  localparam int  R   = 500;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, out_valid, err_dmr1, err_dmr2;
  coord_t alpha, beta, x, y;
  logic signed [W-1:0] phase;

  distance_unit_prot dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n1 = 0, n2 = 0;
  logic faulty = 1'b0;
  real p_q[$], tol_q[$];
  int  t_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (err_dmr1) n1++;
      if (err_dmr2) n2++;
      if (out_valid && !faulty) begin
        real e;
        e = real'(phase) / (2.0 ** (W - 1)) - p_q.pop_front();
        e = e - 2.0 * $floor((e + 1.0) / 2.0);   // wrap to [-1, 1)
        if (e < 0) e = -e;
        checks += 2;
        if (e > tol_q.pop_front()) begin failures++; $display("FAIL phase err %g", e); end
        if (cycle - t_q.pop_front() != LAT) begin failures++; $display("FAIL latency"); end
      end
    end
  end

  task automatic send(input int a, b, xx, yy);
    real d2;
    @(negedge clk);
    alpha = coord_t'(a); beta = coord_t'(b); x = coord_t'(xx); y = coord_t'(yy);
    in_valid = 1'b1;
    d2 = real'((a - xx) * (a - xx) + (b - yy) * (b - yy));
    p_q.push_back(d2 * PHASE_PER_PX2);
    tol_q.push_back(1.0e-9 + 2.0 * DEV * $sqrt(d2 * PHASE_PER_PX2));
    t_q.push_back(cycle);
  endtask

  task automatic idle(input int n);
    @(negedge clk) in_valid = 1'b0;
    repeat (n) @(posedge clk);
  endtask

  function automatic int rnd();
    return int'($urandom_range(2 * R)) - R;
  endfunction

  initial begin
    alpha = '0; beta = '0; x = '0; y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(0, 0, 0, 0);
    send(10, 0, 0, 0);
    send(-10, 0, 0, 0);
    send(0, 0, 3, 4);
    for (int i = 0; i < 300; i++) send(rnd(), rnd(), rnd(), rnd());
    idle(LAT + 4);
    checks += 2;
    if (p_q.size() != 0) begin failures++; $display("FAIL %0d missing", p_q.size()); end
    if (n1 + n2 != 0) begin failures++; $display("FAIL false alarm %0d %0d", n1, n2); end

    // Fault in replica 0 before the scaler: both comparators see it.
    faulty = 1'b1;
    force dut.mag[0][VFRAC + 2] = 1'b1;
    for (int i = 0; i < 20; i++) send(rnd(), rnd(), rnd(), rnd());
    idle(LAT + 4);
    release dut.mag[0][VFRAC + 2];
    checks += 2;
    if (n1 == 0) begin failures++; $display("FAIL DMR1 missed"); end
    if (n2 == 0) begin failures++; $display("FAIL DMR2 missed"); end

    // Fault in replica 0's squarer only: DMR2 alone.
    n1 = 0; n2 = 0;
    faulty = 1'b1;
    force dut.g_rep[0].u_square.phase[W - 3] = 1'b1;
    for (int i = 0; i < 20; i++) send(rnd(), rnd(), rnd(), rnd());
    idle(LAT + 4);
    release dut.g_rep[0].u_square.phase[W - 3];
    checks += 2;
    if (n1 != 0) begin failures++; $display("FAIL DMR1 raised by a squarer fault"); end
    if (n2 == 0) begin failures++; $display("FAIL DMR2 missed squarer fault"); end
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
