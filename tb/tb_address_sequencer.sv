// tb_address_sequencer: for several context sizes (fewer, exactly, and more
// than B_N bright bits, and non-multiples of B_N) the sequencer must issue
// ceil(num_bright / B_N) passes per pixel at addresses 0, B_N, 2 B_N, ...,
// mark the first and last pass, enable exactly the lanes that hold a bright
// bit, and request the next coordinate only on the last pass. A pause in
// run must hold the address.
// Passes are checked on the falling edge; run is held high across the
// rising edge that ends each pass.
module tb_address_sequencer;
  import hma_pkg::*;

  localparam int AW = $clog2(MAX_BRIGHT) + 1;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic run = 1'b0, issue, first, last, next_coord;
  logic [AW-1:0] num_bright, addr;
  logic [B_N-1:0] lane_en;

  address_sequencer dut (.*);

  int checks = 0, failures = 0;

  task automatic pixel(input int nb, input logic pause);
    int passes;
    passes = (nb + B_N - 1) / B_N;
    if (passes == 0) passes = 1;
    for (int p = 0; p < passes; p++) begin
      logic [B_N-1:0] want_en;
      if (pause) begin
        // a cycle without run before the pass: nothing issued, nothing moves
        @(negedge clk) run = 1'b0;
        #1;
        checks++;
        if (issue || next_coord) begin failures++; $display("FAIL issue while paused"); end
      end
      @(negedge clk);
      run = 1'b1;
      #1;                                 // let the outputs settle
      for (int k = 0; k < B_N; k++) want_en[k] = (p * B_N + k) < nb;
      checks += 5;
      if (!issue) begin failures++; $display("FAIL no issue"); end
      if (int'(addr) != p * B_N) begin failures++; $display("FAIL nb=%0d pass %0d addr %0d", nb, p, addr); end
      if (first != (p == 0)) begin failures++; $display("FAIL first"); end
      if (last != (p == passes - 1) || next_coord != (p == passes - 1)) begin
        failures++; $display("FAIL last/next nb=%0d pass %0d", nb, p);
      end
      if (lane_en != want_en) begin failures++; $display("FAIL lanes %b want %b", lane_en, want_en); end
    end
  endtask

  initial begin
    num_bright = AW'(B_N);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 6; t++) begin
      int nb;
      case (t)
        0: nb = B_N;
        1: nb = 3;
        2: nb = 2 * B_N + 5;
        3: nb = MAX_BRIGHT;
        4: nb = 1;
        default: nb = B_N + 1;
      endcase
      @(negedge clk) run = 1'b0;          // context changes between frames
      num_bright = AW'(nb);
      for (int px = 0; px < 3; px++) pixel(nb, px == 1);
    end
    @(negedge clk) run = 1'b0;
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
