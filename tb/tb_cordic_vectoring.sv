// tb_cordic_vectoring: checks the vectoring CORDIC against floating point.
//
// Random vectors in all four quadrants (and the axes) go in one per cycle;
// x_out must equal K * |v| and z_out the angle atan2(y, x) (units of pi),
// y_out must be near zero, and every result must take ITER+1 cycles.
module tb_cordic_vectoring;
  import hma_pkg::*;

  localparam int  W    = DATA_W;
  localparam int  FRAC = VFRAC;
  localparam int  LAT  = cordic_latency(ITER);
  localparam real GAIN = cordic_gain(ITER);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, out_valid;
  logic signed [W-1:0] x_in, y_in, x_out, y_out, z_in, z_out;

  cordic_vectoring dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  real ex_q[$], ez_q[$];
  int  t_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real m, z, em, ez;
      m  = real'(x_out) / (2.0 ** FRAC);
      z  = real'(z_out) / (2.0 ** (W - 1));
      em = m - ex_q.pop_front();
      ez = z - ez_q.pop_front();
      if (ez > 1.0) ez -= 2.0;       // angles wrap at +/- pi
      if (ez < -1.0) ez += 2.0;
      checks += 4;
      if (em > 1.0e-4 || em < -1.0e-4) begin failures++; $display("FAIL mag err %g", em); end
      if (ez > 1.0e-6 || ez < -1.0e-6) begin failures++; $display("FAIL angle err %g", ez); end
      if (y_out > 64 || y_out < -64)   begin failures++; $display("FAIL residual y %0d", y_out); end
      if (cycle - t_q.pop_front() != LAT) begin failures++; $display("FAIL latency"); end
    end
  end

  task automatic send(input int a, b);
    @(negedge clk);
    x_in = W'(a) <<< FRAC;
    y_in = W'(b) <<< FRAC;
    z_in = '0;
    in_valid = 1'b1;
    ex_q.push_back(GAIN * $sqrt(real'(a) * a + real'(b) * b));
    ez_q.push_back($atan2(real'(b), real'(a)) / PI);
    t_q.push_back(cycle);
  endtask

  initial begin
    x_in = '0; y_in = '0; z_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    send(3, 4); send(-3, 4); send(-3, -4); send(3, -4);
    send(1000, 0); send(0, 1000); send(-1000, 1); send(0, -1000);
    send(65535, 65535); send(-65536, -65536);
    for (int i = 0; i < 300; i++)
      send(int'($urandom_range(131071)) - 65536, int'($urandom_range(131071)) - 65536);
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (ex_q.size() != 0) begin failures++; $display("FAIL %0d missing", ex_q.size()); end
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
