// tb_hma_top: end-to-end test of the protected address calculation unit on
// a reduced frame (HW x HH pixels).
//
// Frame 1 uses B_N bright bits (one pass per pixel, one pixel per cycle);
// frame 2 uses a context of 2*B_N+5 bright bits (several passes per pixel,
// accumulation and masked lanes). Every H is compared with the sum of
// cos(pi d^2 pitch^2 / (lambda L)) in floating point, together with its
// pixel coordinates and order; the frame's throughput and frame_done are
// checked. Frame 3 repeats frame 1 while faults are forced into one unit's
// distance replica, then into its squarer, then into its cosine CORDIC:
// DMR1, DMR2 and DMR3 and reconfig_req must each fire, and no flag may fire
// in the fault-free frames. The stand-alone sine/cosine generator runs
// throughout with step P and each output is compared with floating point;
// at the end a fault forced into its CORDIC must raise gen_err and
// reconfig_req. Each mechanism is counted and must occur.
module tb_hma_top;
  import hma_pkg::*;

  localparam int HW = 6, HH = 4;
  localparam int MB = 32;
  localparam int AW = $clog2(MB) + 1;
  localparam int ACC_W = DATA_W + $clog2(MB);
  localparam int LAT = calc_latency(ITER) + tree_latency(B_N) + 2;  // start to first H
  localparam real DEV = 4.0e-6;
  localparam int R = 120;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic bb_we = 1'b0, start = 1'b0;
  logic [AW-1:0] bb_waddr, num_bright;
  bright_bit_t bb_wdata;
  logic busy, frame_done, h_valid, reconfig_req;
  logic signed [ACC_W-1:0] h_value;
  coord_t h_alpha, h_beta;
  unit_err_t unit_err [B_N];

  hma_top #(.HOLO_W(HW), .HOLO_H(HH), .MAX_BRIGHT(MB)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  bright_bit_t ctx [MB];
  int  nb;
  int  px_seen, first_h, last_h;
  logic faulty = 1'b0;

  // mechanism counters
  int n_single = 0, n_multi = 0, n_masked = 0, n_frame_done = 0;
  int n_dmr1 = 0, n_dmr2 = 0, n_dmr3 = 0, n_reconf = 0;

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

  always @(posedge clk) cycle <= cycle + 1;

  function automatic real ref_h(input int a, b, output real tol);
    real s, d2;
    s = 0.0; tol = 1.0e-6;
    for (int i = 0; i < nb; i++) begin
      d2 = real'((a - ctx[i].x) * (a - ctx[i].x) + (b - ctx[i].y) * (b - ctx[i].y));
      s += $cos(PI * PHASE_PER_PX2 * d2);
      tol += 1.0e-6 + 2.0 * PI * DEV * $sqrt(PHASE_PER_PX2 * d2);
    end
    return s;
  endfunction

  always @(posedge clk) begin
    if (rst_n) begin
      for (int k = 0; k < B_N; k++) begin
        if (unit_err[k].dmr1) n_dmr1++;
        if (unit_err[k].dmr2) n_dmr2++;
        if (unit_err[k].dmr3) n_dmr3++;
      end
      if (reconfig_req) n_reconf++;
      if (dut.s2.valid && dut.s2.lane_en != '1) n_masked++;
      if (dut.s2.valid && dut.s2.last && dut.s2.first) n_single++;
      if (dut.s2.valid && dut.s2.last && !dut.s2.first) n_multi++;
      if (frame_done) n_frame_done++;
      if (h_valid) begin
        int ea, eb;
        real want, tol, got;
        ea = (px_seen % HW) - HW / 2;
        eb = (px_seen / HW) - HH / 2;
        if (px_seen == 0) first_h = cycle;
        last_h = cycle;
        got = real'(h_value) / (2.0 ** TFRAC);
        want = ref_h(ea, eb, tol);
        checks += 3;
        if (h_alpha != coord_t'(ea) || h_beta != coord_t'(eb)) begin
          failures++; $display("FAIL pixel %0d at (%0d,%0d)", px_seen, h_alpha, h_beta);
        end
        if (!faulty && (got - want > tol || want - got > tol)) begin
          failures++; $display("FAIL H(%0d,%0d) = %g, want %g", ea, eb, got, want);
        end
        if (frame_done != (px_seen == HW * HH - 1)) begin failures++; $display("FAIL frame_done"); end
        px_seen++;
      end
    end
  end

  task automatic load(input int n);
    nb = n;
    for (int i = 0; i < n; i++) begin
      @(negedge clk);
      ctx[i].x = coord_t'(int'($urandom_range(2 * R)) - R);
      ctx[i].y = coord_t'(int'($urandom_range(2 * R)) - R);
      bb_we = 1'b1; bb_waddr = AW'(i); bb_wdata = ctx[i];
    end
    @(negedge clk) bb_we = 1'b0;
    num_bright = AW'(n);
  endtask

  task automatic run_frame(input int passes);
    int t0;
    px_seen = 0;
    @(negedge clk) start = 1'b1;
    t0 = cycle;
    @(negedge clk) start = 1'b0;
    while (busy) @(negedge clk);
    checks += 3;
    if (px_seen != HW * HH) begin failures++; $display("FAIL %0d pixels", px_seen); end
    // one pixel every `passes` cycles once the pipeline is full
    if (last_h - first_h != (HW * HH - 1) * passes) begin
      failures++; $display("FAIL throughput: %0d cycles", last_h - first_h);
    end
    if (first_h - t0 != LAT + passes - 1) begin
      failures++; $display("FAIL first H after %0d cycles, want %0d", first_h - t0, LAT + passes - 1);
    end
  endtask

  initial begin
    bb_waddr = '0; bb_wdata = '0; num_bright = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) gen_en = 1'b1;

    load(B_N);                       // the evaluated context size
    run_frame(1);
    load(2 * B_N + 5);               // larger context: three passes per pixel
    run_frame(3);
    checks++;
    if (n_dmr1 + n_dmr2 + n_dmr3 + n_reconf + n_gen_err != 0) begin
      failures++; $display("FAIL false alarms");
    end

    load(B_N);
    faulty = 1'b1;
    force dut.g_unit[3].u_calc.u_dist.mag[1][VFRAC + 1] = 1'b1;
    run_frame(1);
    release dut.g_unit[3].u_calc.u_dist.mag[1][VFRAC + 1];
    force dut.g_unit[5].u_calc.u_dist.g_rep[0].u_square.phase[DATA_W - 2] = 1'b1;
    run_frame(1);
    release dut.g_unit[5].u_calc.u_dist.g_rep[0].u_square.phase[DATA_W - 2];
    force dut.g_unit[6].u_calc.u_cos.u_cordic.x_out[DATA_W - 5] = 1'b1;
    run_frame(1);
    release dut.g_unit[6].u_calc.u_cos.u_cordic.x_out[DATA_W - 5];
    // and into the stand-alone generator's CORDIC
    gen_faulty = 1'b1;
    force dut.u_gen.u_cos.u_cordic.x_out[DATA_W - 8] = 1'b0;
    repeat (60) @(negedge clk);
    release dut.u_gen.u_cos.u_cordic.x_out[DATA_W - 8];
    repeat (10) @(negedge clk);
    gen_faulty = 1'b0;
    repeat (20) @(negedge clk);

    $display("mechanisms: single-pass=%0d multi-pass=%0d masked=%0d frames=%0d dmr1=%0d dmr2=%0d dmr3=%0d reconfig=%0d generator=%0d generator-alarm=%0d",
             n_single, n_multi, n_masked, n_frame_done, n_dmr1, n_dmr2, n_dmr3, n_reconf,
             n_gen, n_gen_err);
    checks += 10;
    if (n_gen == 0)        begin failures++; $display("FAIL generator never produced"); end
    if (n_gen_err == 0)    begin failures++; $display("FAIL generator alarm never fired"); end
    if (n_single == 0)     begin failures++; $display("FAIL no single-pass pixel"); end
    if (n_multi == 0)      begin failures++; $display("FAIL no accumulated pixel"); end
    if (n_masked == 0)     begin failures++; $display("FAIL no masked lane"); end
    if (n_frame_done != 5) begin failures++; $display("FAIL frame_done count"); end
    if (n_dmr1 == 0)       begin failures++; $display("FAIL DMR1 never fired"); end
    if (n_dmr2 == 0)       begin failures++; $display("FAIL DMR2 never fired"); end
    if (n_dmr3 == 0)       begin failures++; $display("FAIL DMR3 never fired"); end
    if (n_reconf == 0)     begin failures++; $display("FAIL no reconfiguration request"); end
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
