// tb_sincos_generator_prot: checks the stand-alone protected sine/cosine
// generator.
//
// With step P the n-th enabled cycle must produce cos(n*P*pi) and
// sin(n*P*pi) (floating-point reference, within 1e-9), exactly
// 1 + cosine_latency cycles later, with no alarm. Two steps are run: P = 1/64
// of pi over several turns, and a step that is not a power of two. Then a
// bit of the CORDIC's cosine output is forced and the identity check must
// raise err.
module tb_sincos_generator_prot;
  import hma_pkg::*;

  localparam int  W   = DATA_W;
  localparam int  LAT = 1 + cosine_latency(ITER);
  localparam real TOL = 1.0e-9;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic en = 1'b0, out_valid, err;
  logic [W-1:0] step = '0;
  logic signed [W-1:0] cos_out, sin_out;

  sincos_generator_prot dut (.*);

  int checks = 0, failures = 0, cycle = 0, n_err = 0;
  real c_q[$], s_q[$];
  int  t_q[$];
  logic [W-1:0] model = '0;
  logic faulty = 1'b0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (err) n_err++;
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

  // One enabled cycle: the model phase advances like the accumulator.
  task automatic run(input int n, input logic [W-1:0] p);
    for (int i = 0; i < n; i++) begin
      real a;
      @(negedge clk);
      en = 1'b1;
      step = p;
      model = model + p;
      a = real'($signed(model)) / (2.0 ** (W - 1)) * PI;
      c_q.push_back($cos(a));
      s_q.push_back($sin(a));
      t_q.push_back(cycle);
    end
    @(negedge clk) en = 1'b0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run(300, W'(1) << (W - 7));
    repeat (5) @(posedge clk);
    run(200, W'(40'h0123456789));
    repeat (LAT + 4) @(posedge clk);
    checks += 2;
    if (c_q.size() != 0) begin failures++; $display("FAIL %0d missing", c_q.size()); end
    if (n_err != 0) begin failures++; $display("FAIL %0d false alarms", n_err); end

    faulty = 1'b1;
    force dut.u_cos.u_cordic.x_out[W - 8] = 1'b0;
    run(50, W'(40'h0123456789));
    repeat (LAT + 4) @(posedge clk);
    release dut.u_cos.u_cordic.x_out[W - 8];
    checks++;
    if (n_err == 0) begin failures++; $display("FAIL fault not detected"); end
    $display("detected %0d of 50 faulty results", n_err);
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
