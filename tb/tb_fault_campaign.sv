// tb_fault_campaign: golden-model fault campaign on one calculation unit.
//
// Two copies of calc_unit_prot receive the same input stream, generated in
// the testbench (the input "ROM"). The first is the golden model; in the
// second, one bit of one internal word is flipped (forced to the golden
// copy's value XOR a one-hot mask) for a window of samples. A checker counts
// the windows in which the faulty copy's output differs from the golden
// output, and a counter those in which the unit's own flags (DMR1, DMR2,
// DMR3) fired. Their ratio is the detection ratio per injection site.
//
// This is a register-level fault model, not an upset of FPGA configuration
// memory, so its ratios describe which parts of the unit the checks cover
// rather than reproducing measured FPGA figures. Checks: every site inside
// the duplicated distance path and the CORDIC outputs must be detected
// whenever it corrupts the output; the output register after the checker,
// which no check covers, must show undetected errors; and the fault-free
// stream must raise no flag.
module tb_fault_campaign;
  import hma_pkg::*;

  localparam int W       = DATA_W;
  localparam int LAT     = calc_latency(ITER);
  localparam int NSITE   = 11;
  localparam int NINJ    = 24;      // injections per site
  localparam int WINDOW  = 12;      // faulty samples per injection
  localparam int R       = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0;
  coord_t alpha, beta, x, y;
  logic g_valid, f_valid;
  logic signed [W-1:0] g_cos, f_cos;
  unit_err_t g_err, f_err;

  calc_unit_prot gold (.clk, .rst_n, .in_valid, .alpha, .beta, .x, .y,
                       .out_valid(g_valid), .cos_out(g_cos), .err(g_err));
  calc_unit_prot dut  (.clk, .rst_n, .in_valid, .alpha, .beta, .x, .y,
                       .out_valid(f_valid), .cos_out(f_cos), .err(f_err));

  logic [W-1:0] mask = '0;
  logic win_err, win_det;
  int checks = 0, failures = 0;
  int n_err [NSITE], n_det [NSITE], n_inj [NSITE], n_alarm [NSITE];
  int false_alarm = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      if (g_valid && f_valid && g_cos != f_cos) win_err = 1'b1;
      if (|f_err) win_det = 1'b1;
      if (|g_err) false_alarm++;
    end
  end

  task automatic apply(input int site, input logic on);
    if (on) begin
      case (site)
        0:  force dut.u_dist.dx[0]         = gold.u_dist.dx[0] ^ mask;
        1:  force dut.u_dist.dy[1]         = gold.u_dist.dy[1] ^ mask;
        2:  force dut.u_dist.mag[0]        = gold.u_dist.mag[0] ^ mask;
        3:  force dut.u_dist.mag[1]        = gold.u_dist.mag[1] ^ mask;
        4:  force dut.u_dist.sd[0]         = gold.u_dist.sd[0] ^ mask;
        5:  force dut.u_dist.sd[1]         = gold.u_dist.sd[1] ^ mask;
        6:  force dut.u_dist.ph[0]         = gold.u_dist.ph[0] ^ mask;
        7:  force dut.u_dist.ph[1]         = gold.u_dist.ph[1] ^ mask;
        8:  force dut.u_cos.c              = gold.u_cos.c ^ mask;
        9:  force dut.u_cos.s              = gold.u_cos.s ^ mask;
        default: force dut.u_cos.c_d[1]    = gold.u_cos.c_d[1] ^ mask;
      endcase
    end else begin
      case (site)
        0:  release dut.u_dist.dx[0];
        1:  release dut.u_dist.dy[1];
        2:  release dut.u_dist.mag[0];
        3:  release dut.u_dist.mag[1];
        4:  release dut.u_dist.sd[0];
        5:  release dut.u_dist.sd[1];
        6:  release dut.u_dist.ph[0];
        7:  release dut.u_dist.ph[1];
        8:  release dut.u_cos.c;
        9:  release dut.u_cos.s;
        default: release dut.u_cos.c_d[1];
      endcase
    end
  endtask

  function automatic string site_name(input int s);
    case (s)
      0: return "distance replica 0, x difference";
      1: return "distance replica 1, y difference";
      2: return "distance replica 0, CORDIC magnitude";
      3: return "distance replica 1, CORDIC magnitude";
      4: return "distance replica 0, scaled distance";
      5: return "distance replica 1, scaled distance";
      6: return "distance replica 0, squarer";
      7: return "distance replica 1, squarer (to cosine)";
      8: return "cosine CORDIC, cos output";
      9: return "cosine CORDIC, sin output";
      default: return "cosine output register";
    endcase
  endfunction

  // Input stream: a new random operand set every cycle.
  initial begin
    alpha = '0; beta = '0; x = '0; y = '0;
    forever begin
      @(negedge clk);
      alpha = coord_t'(int'($urandom_range(2 * R)) - R);
      beta  = coord_t'(int'($urandom_range(2 * R)) - R);
      x     = coord_t'(int'($urandom_range(2 * R)) - R);
      y     = coord_t'(int'($urandom_range(2 * R)) - R);
    end
  end

  initial begin
    int tot_err, tot_det;
    for (int s = 0; s < NSITE; s++) begin n_err[s] = 0; n_det[s] = 0; n_inj[s] = 0; n_alarm[s] = 0; end
    win_err = 1'b0; win_det = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk) in_valid = 1'b1;
    repeat (LAT + 4) @(posedge clk);
    for (int s = 0; s < NSITE; s++) begin
      for (int i = 0; i < NINJ; i++) begin
        @(negedge clk);
        mask = W'(1) << $urandom_range(W - 1);
        win_err = 1'b0; win_det = 1'b0;
        apply(s, 1'b1);
        repeat (WINDOW) @(posedge clk);
        @(negedge clk);
        apply(s, 1'b0);
        repeat (LAT + 4) @(posedge clk);      // let the fault drain
        n_inj[s]++;
        if (win_err) n_err[s]++;
        if (win_err && win_det) n_det[s]++;
        if (win_det) n_alarm[s]++;
        // Required coverage: the duplicated distance path always disagrees
        // with its twin; a CORDIC output bit above the gamma window always
        // breaks the identity; the unchecked output register never alarms.
        checks++;
        if (s < 8 && !win_det) begin
          failures++; $display("FAIL missed fault at %s, mask %h", site_name(s), mask);
        end else if ((s == 8 || s == 9) && mask >= (W'(1) << 20) && !win_det) begin
          failures++; $display("FAIL missed fault at %s, mask %h", site_name(s), mask);
        end else if (s == NSITE - 1 && win_det) begin
          failures++; $display("FAIL alarm from the unchecked output register");
        end
      end
    end
    tot_err = 0; tot_det = 0;
    for (int s = 0; s < NSITE; s++) begin
      $display("site %-40s injections %0d, alarms %0d, output errors %0d, detected %0d",
               site_name(s), n_inj[s], n_alarm[s], n_err[s], n_det[s]);
      tot_err += n_err[s];
      tot_det += n_det[s];
    end
    checks += 3;
    if (n_err[NSITE-1] == 0 || n_det[NSITE-1] != 0) begin
      failures++; $display("FAIL the unchecked output register should escape detection");
    end
    if (false_alarm != 0) begin failures++; $display("FAIL golden copy raised %0d flags", false_alarm); end
    if (tot_err == 0) begin failures++; $display("FAIL no fault reached the output"); end
    $display("overall: %0d of %0d output-corrupting injections detected (%0.1f%%)",
             tot_det, tot_err, 100.0 * tot_det / (tot_err == 0 ? 1 : tot_err));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSITE * NINJ * (WINDOW + LAT + 8) + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
