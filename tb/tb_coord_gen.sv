// tb_coord_gen: a small (5 x 3) frame scanned with "next" pulses that come
// back-to-back and with gaps. Every pixel must appear exactly once, in raster
// order, centred on the axis, with last_pixel on the final one; the
// generator must then go idle and ignore next until the following start.
module tb_coord_gen;
  import hma_pkg::*;

  localparam int HW = 5, HH = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 1'b0, next = 1'b0, active, last_pixel;
  coord_t alpha, beta;

  coord_gen #(.HOLO_W(HW), .HOLO_H(HH)) dut (.*);

  int checks = 0, failures = 0;

  task automatic frame(input int gap);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    for (int r = 0; r < HH; r++) begin
      for (int c = 0; c < HW; c++) begin
        checks += 3;
        if (!active) begin failures++; $display("FAIL not active at %0d,%0d", c, r); end
        if (alpha != coord_t'(c - HW / 2) || beta != coord_t'(r - HH / 2)) begin
          failures++;
          $display("FAIL pixel (%0d,%0d) shows (%0d,%0d)", c, r, alpha, beta);
        end
        if (last_pixel != (r == HH - 1 && c == HW - 1)) begin failures++; $display("FAIL last_pixel"); end
        repeat (gap) @(negedge clk);
        next = 1'b1;
        @(negedge clk) next = 1'b0;
      end
    end
    checks++;
    if (active) begin failures++; $display("FAIL still active after frame"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (active) begin failures++; $display("FAIL active after reset"); end
    frame(0);
    @(negedge clk) next = 1'b1;
    @(negedge clk) next = 1'b0;
    checks++;
    if (active) begin failures++; $display("FAIL next restarted the scan"); end
    frame(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
