// tb_bright_bit_table: fills the table with random coordinates, then reads
// B_N entries from every pass start address (and from the end, where
// entries past the table must read as zero). Checks the one-cycle read
// latency and that a write to an address beyond the table is ignored.
module tb_bright_bit_table;
  import hma_pkg::*;

  localparam int AW = $clog2(MAX_BRIGHT) + 1;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic we = 1'b0;
  logic [AW-1:0] waddr, raddr;
  bright_bit_t wdata;
  bright_bit_t rdata [B_N];

  bright_bit_table dut (.*);

  int checks = 0, failures = 0;
  bright_bit_t model [MAX_BRIGHT];

  initial begin
    waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < MAX_BRIGHT; i++) begin
      @(negedge clk);
      model[i] = bright_bit_t'($urandom);
      we = 1'b1; waddr = AW'(i); wdata = model[i];
    end
    @(negedge clk);
    waddr = AW'(MAX_BRIGHT); wdata = '1;        // out of range: ignored
    @(negedge clk) we = 1'b0;
    for (int a = 0; a < MAX_BRIGHT; a++) begin
      @(negedge clk) raddr = AW'(a);
      @(negedge clk);
      for (int k = 0; k < B_N; k++) begin
        bright_bit_t want;
        want = (a + k < MAX_BRIGHT) ? model[a + k] : '0;
        checks++;
        if (rdata[k] !== want) begin
          failures++;
          $display("FAIL addr %0d lane %0d: %h want %h", a, k, rdata[k], want);
        end
      end
    end
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
