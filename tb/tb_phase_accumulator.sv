// tb_phase_accumulator: checks the phase accumulator of the sine/cosine
// generator against a software model.
//
// Runs with step P = 1 (the finest sweep), a large step that wraps through
// +pi many times, and random steps with random enable gaps. After every
// enabled cycle the phase must equal the running sum of the steps modulo
// 2^W (one full turn), with out_valid set exactly one cycle after each
// enabled cycle; with en low the phase must hold.
module tb_phase_accumulator;
  import hma_pkg::*;

  localparam int W = DATA_W;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic en = 1'b0, out_valid;
  logic [W-1:0] step = '0, phase;

  phase_accumulator dut (.*);

  int checks = 0, failures = 0, n_wrap = 0;
  logic [W-1:0] model = '0;
  logic         en_d = 1'b0;

  // The model updates at the same edge as the design; compare after it.
  always @(posedge clk) begin
    if (rst_n) begin
      #1;
      checks += 2;
      if (phase !== model) begin
        failures++;
        $display("FAIL phase %h, expected %h", phase, model);
      end
      if (out_valid !== en_d) begin failures++; $display("FAIL out_valid"); end
    end
  end

  task automatic tick(input logic e, input logic [W-1:0] p);
    logic [W:0] s;
    @(negedge clk);
    en = e;
    step = p;
    @(posedge clk);
    en_d = e;
    if (e) begin
      s = {1'b0, model} + {1'b0, p};
      if (model[W-1] == 1'b0 && s[W-1] == 1'b1) n_wrap++;  // passes +pi
      model = s[W-1:0];
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 50; i++) tick(1'b1, W'(1));
    for (int i = 0; i < 50; i++) tick(1'b1, W'(3) << (W - 3));
    for (int i = 0; i < 300; i++)
      tick(($urandom_range(3) != 0), W'({$urandom, $urandom}));
    tick(1'b0, '0);
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL phase never wrapped"); end
    $display("phase wrapped through pi %0d times", n_wrap);
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
