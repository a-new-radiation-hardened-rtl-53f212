// tb_dmr_comparator: the flag must rise exactly when the two words differ on
// a valid cycle (single-bit and multi-bit differences, equal words, and
// differences while idle), one cycle later.
module tb_dmr_comparator;
  localparam int W = hma_pkg::DATA_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, err;
  logic [W-1:0] a, b;

  dmr_comparator dut (.*);

  int checks = 0, failures = 0;

  task automatic check_one(input logic v, input logic [W-1:0] x, y);
    @(negedge clk);
    in_valid = v; a = x; b = y;
    @(negedge clk);
    checks++;
    if (err !== (v && (x != y))) begin
      failures++;
      $display("FAIL: v=%b a=%h b=%h err=%b", v, x, y, err);
    end
  endtask

  initial begin
    a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check_one(1'b1, '0, '0);
    check_one(1'b1, '0, W'(1));
    check_one(1'b1, {1'b1, {(W-1){1'b0}}}, '0);
    check_one(1'b0, '0, '1);
    for (int i = 0; i < W; i++) begin
      logic [W-1:0] r;
      r = W'({$urandom, $urandom});
      check_one(1'b1, r, r ^ (W'(1) << i));
      check_one(1'b1, r, r);
    end
    for (int i = 0; i < 100; i++)
      check_one(1'($urandom), W'({$urandom, $urandom}), W'({$urandom, $urandom}));
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
