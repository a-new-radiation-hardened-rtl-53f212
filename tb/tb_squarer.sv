// tb_squarer: checks that the squarer returns d^2 modulo 2 (i.e. the
// argument modulo 2*pi, in units of pi) as a signed binary angle, computed
// here with exact integer arithmetic, and its one-cycle latency.
module tb_squarer;
  import hma_pkg::*;

  localparam int W = DATA_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, out_valid;
  logic signed [W-1:0] din, phase;

  squarer dut (.*);

  int checks = 0, failures = 0;

  task automatic check_one(input logic signed [W-1:0] v);
    logic [2*W-1:0] sq;
    logic [W-1:0]   want;
    @(negedge clk);
    din = v;
    in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    // exact square by shift-and-add of the magnitude
    sq = '0;
    for (int i = 0; i < W; i++)
      if ((v < 0 ? -v : v) >> i & 1) sq += (2*W)'(v < 0 ? -v : v) << i;
    want = sq[2*VFRAC-(W-1) +: W];
    checks += 2;
    if (!out_valid) begin failures++; $display("FAIL: no out_valid"); end
    if (phase !== want) begin
      failures++;
      $display("FAIL: %0d -> %h, want %h", v, phase, want);
    end
  endtask

  initial begin
    din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_one('0);
    check_one(W'(1) <<< VFRAC);                    // 1^2 = 1 -> pi
    check_one(-(W'(1) <<< VFRAC));
    check_one(W'(3) <<< (VFRAC - 1));              // 1.5^2 = 2.25 -> 0.25
    for (int i = 0; i < 200; i++) check_one(W'({$urandom, $urandom}) >>> 4);
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
