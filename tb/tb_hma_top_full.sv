// tb_hma_top_full: one complete hologram frame with every parameter of
// hma_top at its default (HOLO_W x HOLO_H pixels, B_N units, 40-bit path).
//
// A context of B_N random bright bits is loaded and one frame computed.
// Every H is compared with the floating-point sum of the B_N cosines, the
// pixels must come out in raster order at one per cycle, frame_done must
// mark the last, and no detection flag may rise. Meanwhile the stand-alone
// sine/cosine generator runs with step P and every output is checked.
module tb_hma_top_full;
  import hma_pkg::*;

  localparam int AW    = $clog2(MAX_BRIGHT) + 1;
  localparam int ACC_W = DATA_W + $clog2(MAX_BRIGHT);
  localparam int NPX   = HOLO_W * HOLO_H;
  localparam real DEV  = 4.0e-6;
  localparam int R     = HOLO_W / 2;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic bb_we = 1'b0, start = 1'b0;
  logic [AW-1:0] bb_waddr, num_bright;
  bright_bit_t bb_wdata;
  logic busy, frame_done, h_valid, reconfig_req;
  logic signed [ACC_W-1:0] h_value;
  coord_t h_alpha, h_beta;
  unit_err_t unit_err [B_N];
  int checks = 0, failures = 0;

  // Stand-alone sine/cosine generator, enabled throughout with step P: the
  // n-th output must be cos(n*P*pi), sin(n*P*pi).
  localparam logic [DATA_W-1:0] P = DATA_W'(1) << (DATA_W - 7);
  logic gen_en = 1'b0, gen_valid, gen_err;
  logic [DATA_W-1:0] gen_step = P;
  logic signed [DATA_W-1:0] gen_cos, gen_sin;
  logic [DATA_W-1:0] gen_ph = '0;
  int   n_gen = 0, n_gen_err = 0;
  logic gen_faulty = 1'b0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (gen_err) n_gen_err++;
      if (gen_valid) begin
        real a, ec, es;
        gen_ph = gen_ph + P;
        n_gen++;
        if (!gen_faulty) begin
          a  = real'($signed(gen_ph)) / (2.0 ** (DATA_W - 1)) * PI;
          ec = real'(gen_cos) / (2.0 ** TFRAC) - $cos(a);
          es = real'(gen_sin) / (2.0 ** TFRAC) - $sin(a);
          checks++;
          if (ec > 1.0e-9 || ec < -1.0e-9 || es > 1.0e-9 || es < -1.0e-9) begin
            failures++; $display("FAIL generator sample %0d", n_gen);
          end
        end
      end
    end
  end

  hma_top dut (.*);

  int cycle = 0;
  bright_bit_t ctx [B_N];
  int px_seen = 0, first_h = 0, last_h = 0, n_alarm = 0, n_done = 0;
  real worst = 0.0;

  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n) begin
      if (reconfig_req) n_alarm++;
      if (h_valid) begin
        int ea, eb;
        real want, tol, got, d2, e;
        ea = (px_seen % HOLO_W) - HOLO_W / 2;
        eb = (px_seen / HOLO_W) - HOLO_H / 2;
        want = 0.0; tol = 1.0e-6;
        for (int i = 0; i < B_N; i++) begin
          d2 = real'((ea - ctx[i].x) * (ea - ctx[i].x) + (eb - ctx[i].y) * (eb - ctx[i].y));
          want += $cos(PI * PHASE_PER_PX2 * d2);
          tol  += 1.0e-6 + 2.0 * PI * DEV * $sqrt(PHASE_PER_PX2 * d2);
        end
        got = real'(h_value) / (2.0 ** TFRAC);
        e = (got > want) ? got - want : want - got;
        if (e > worst) worst = e;
        if (px_seen == 0) first_h = cycle;
        last_h = cycle;
        if (frame_done) n_done++;
        checks += 2;
        if (h_alpha != coord_t'(ea) || h_beta != coord_t'(eb)) begin
          failures++;
          if (failures < 10) $display("FAIL pixel %0d at (%0d,%0d)", px_seen, h_alpha, h_beta);
        end
        if (e > tol) begin
          failures++;
          if (failures < 10) $display("FAIL H(%0d,%0d) = %g, want %g", ea, eb, got, want);
        end
        px_seen++;
      end
    end
  end

  initial begin
    bb_waddr = '0; bb_wdata = '0; num_bright = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) gen_en = 1'b1;
    for (int i = 0; i < B_N; i++) begin
      @(negedge clk);
      ctx[i].x = coord_t'(int'($urandom_range(2 * R)) - R);
      ctx[i].y = coord_t'(int'($urandom_range(2 * R)) - R);
      bb_we = 1'b1; bb_waddr = AW'(i); bb_wdata = ctx[i];
    end
    @(negedge clk) bb_we = 1'b0;
    num_bright = AW'(B_N);
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    while (busy) @(negedge clk);
    checks += 5;
    if (n_gen == 0) begin failures++; $display("FAIL generator never produced"); end
    if (px_seen != NPX) begin failures++; $display("FAIL %0d pixels", px_seen); end
    if (last_h - first_h != NPX - 1) begin failures++; $display("FAIL throughput"); end
    if (n_done != 1) begin failures++; $display("FAIL frame_done %0d", n_done); end
    if (n_alarm != 0) begin failures++; $display("FAIL %0d false alarms", n_alarm); end
    $display("frame of %0d pixels in %0d cycles, worst |H error| %g; %0d generator samples",
             NPX, last_h - first_h + 1, worst, n_gen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (HOLO_W * HOLO_H + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
