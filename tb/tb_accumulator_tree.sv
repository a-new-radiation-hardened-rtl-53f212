// tb_accumulator_tree: random terms and lane masks are streamed one pass per
// cycle, grouped into pixels of 1 to 4 passes. Each pixel's H must equal
// the exact integer sum of its enabled terms, appear tree_latency cycles
// after its last pass, and no output may appear for non-final passes.
module tb_accumulator_tree;
  import hma_pkg::*;

  localparam int W     = DATA_W;
  localparam int ACC_W = DATA_W + $clog2(MAX_BRIGHT);
  localparam int LAT   = tree_latency(B_N);

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0, first, last, out_valid;
  logic [B_N-1:0] lane_en;
  logic signed [W-1:0] terms [B_N];
  logic signed [ACC_W-1:0] h;

  accumulator_tree dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  longint h_q[$];
  int t_q[$];

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 2;
      if (h_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        if (longint'(h) != h_q.pop_front()) begin failures++; $display("FAIL sum"); end
        if (cycle - t_q.pop_front() != LAT) begin failures++; $display("FAIL latency"); end
      end
    end
  end

  initial begin
    for (int k = 0; k < B_N; k++) terms[k] = '0;
    first = 1'b0; last = 1'b0; lane_en = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int px = 0; px < 200; px++) begin
      int passes;
      longint sum;
      passes = 1 + (px % 4);
      sum = 0;
      for (int p = 0; p < passes; p++) begin
        @(negedge clk);
        in_valid = 1'b1;
        first = (p == 0);
        last  = (p == passes - 1);
        lane_en = (px % 5 == 0) ? '1 : B_N'($urandom);
        for (int k = 0; k < B_N; k++) begin
          // cosine-sized terms, |t| <= 1.0 with TFRAC fraction bits
          terms[k] = W'(longint'({$urandom, $urandom}) >>> (64 - TFRAC - 1));
          if (lane_en[k]) sum += longint'(terms[k]);
        end
        if (last) begin h_q.push_back(sum); t_q.push_back(cycle); end
      end
      if (px % 7 == 0) begin @(negedge clk) in_valid = 1'b0; end
    end
    @(negedge clk) in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (h_q.size() != 0) begin failures++; $display("FAIL %0d missing", h_q.size()); end
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
