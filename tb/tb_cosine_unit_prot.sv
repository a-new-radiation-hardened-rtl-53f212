// tb_cosine_unit_prot: checks the protected cosine unit.
//
// The argument comes from a phase accumulator (z <- z + P each cycle, the
// arrangement used to characterise a CORDIC sine/cosine generator), plus
// random angles. cos_out and sin_out must match floating point, appear
// cosine_latency cycles after the argument, and never raise the identity
// flag. It also reports how far cos^2 + sin^2 strays from 1, the basis of
// the gamma tolerance. Finally a bit of the CORDIC's sine output is forced
// and the flag must rise.
module tb_cosine_unit_prot;
  import hma_pkg::*;

  localparam int  W    = DATA_W;
  localparam int  LAT  = cosine_latency(ITER);
  localparam real TOL  = 1.0e-9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, out_valid, err_dmr3;
  logic signed [W-1:0] phase, cos_out, sin_out;

  cosine_unit_prot dut (.*);

  int checks = 0, failures = 0, cycle = 0, n3 = 0;
  real c_q[$], s_q[$];
  int  t_q[$];
  longint worst_dev = 0;
  logic faulty = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (err_dmr3) n3++;
      if (dut.u_check.v1) begin
        longint dev;
        dev = longint'(dut.u_check.sum) - (longint'(1) << TFRAC);
        if (dev < 0) dev = -dev;
        if (dev > worst_dev) worst_dev = dev;
      end
      if (out_valid && !faulty) begin
        real ec, es;
        ec = real'(cos_out) / (2.0 ** TFRAC) - c_q.pop_front();
        es = real'(sin_out) / (2.0 ** TFRAC) - s_q.pop_front();
        checks += 3;
        if (ec > TOL || ec < -TOL) begin failures++; $display("FAIL cos err %g", ec); end
        if (es > TOL || es < -TOL) begin failures++; $display("FAIL sin err %g", es); end
        if (cycle - t_q.pop_front() != LAT) begin failures++; $display("FAIL latency"); end
      end
    end
  end

  task automatic send(input logic signed [W-1:0] z);
    real a;
    @(negedge clk);
    phase = z;
    in_valid = 1'b1;
    a = real'(z) / (2.0 ** (W - 1)) * PI;
    c_q.push_back($cos(a));
    s_q.push_back($sin(a));
    t_q.push_back(cycle);
  endtask

  task automatic idle(input int n);
    @(negedge clk) in_valid = 1'b0;
    repeat (n) @(posedge clk);
  endtask

  initial begin
    logic signed [W-1:0] acc;
    phase = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // phase accumulator sweep: step P = 1/64 of pi, over more than one turn
    acc = '0;
    for (int i = 0; i < 200; i++) begin
      send(acc);
      acc = acc + (W'(1) <<< (W - 7));
    end
    for (int i = 0; i < 200; i++) send(W'({$urandom, $urandom}));
    idle(LAT + 4);
    checks += 2;
    if (c_q.size() != 0) begin failures++; $display("FAIL %0d missing", c_q.size()); end
    if (n3 != 0) begin failures++; $display("FAIL %0d false alarms", n3); end
    $display("worst |cos^2+sin^2-1| = %0d LSB of 2^-%0d", worst_dev, TFRAC);

    faulty = 1'b1;
    force dut.u_cordic.y_out[W - 6] = 1'b1;
    for (int i = 0; i < 50; i++) send(W'({$urandom, $urandom}));
    idle(LAT + 4);
    release dut.u_cordic.y_out[W - 6];
    checks++;
    if (n3 == 0) begin failures++; $display("FAIL fault not detected"); end
    $display("detected %0d of 50 faulty results", n3);
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
