// hma_top: protected holographic memory address calculation unit.
//
// For every pixel (alpha, beta) of the hologram plane it computes
//   H(alpha, beta) = sum_i cos((pi / (lambda L)) ((alpha - x_i)^2 + (beta - y_i)^2))
// over the bright bits (x_i, y_i) of a configuration context, and raises
// reconfig_req whenever one of the built-in checks detects an upset.
//
// Structure: coord_gen scans the hologram pixels; address_sequencer hands
// B_N consecutive entries of bright_bit_table ("Address + k") to B_N
// calc_unit_prot instances per cycle; accumulator_tree adds the B_N terms
// and accumulates passes until all num_bright bright bits are used, then
// issues H and asks for the next coordinate. Side information (pixel
// coordinates, pass markers, lane enables) travels in delay lines matched to
// the unit and tree latencies. Each unit reports DMR1, DMR2 (duplicated
// distance CORDICs) and DMR3 (cos^2 + sin^2 check); the OR of all flags,
// registered, is reconfig_req.
//
// Beside the address calculation sits the stand-alone protected sine/cosine
// generator (sincos_generator_prot: phase accumulator with step gen_step,
// full-range CORDIC, identity check), with its own ports gen_*. Its check
// flag gen_err also feeds reconfig_req.
//
// Interface: load the table through bb_we/bb_waddr/bb_wdata and set
// num_bright (1..MAX_BRIGHT), then pulse start. busy stays high until the
// last H of the frame has left; h_valid marks each H with its pixel
// (h_alpha, h_beta); frame_done marks the last one. h_value has the
// cosine's DATA_W-2 fraction bits. Timing: ceil(num_bright / B_N) cycles per
// pixel; the first H leaves calc_latency + tree_latency +
// ceil(num_bright / B_N) + 1 cycles after start; no back-pressure.
// The unit structure, B_N = 8 and the 40-bit width follow the design
// description; the table, the sequencing signals, the frame size and the
// flag merging are this design's choices. The generator is independent of
// the frame logic: while gen_en is high it takes one angle per cycle and
// answers 1 + cosine_latency cycles later.
module hma_top #(
  parameter int HOLO_W     = hma_pkg::HOLO_W,
  parameter int HOLO_H     = hma_pkg::HOLO_H,
  parameter int MAX_BRIGHT = hma_pkg::MAX_BRIGHT,
  parameter int ITER       = hma_pkg::ITER,
  parameter int GAMMA_LSB  = hma_pkg::GAMMA_LSB,
  parameter int B_N        = hma_pkg::B_N,
  parameter int W          = hma_pkg::DATA_W,
  parameter int AW         = $clog2(MAX_BRIGHT) + 1,
  parameter int ACC_W      = W + $clog2(MAX_BRIGHT)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // bright-bit table load
  input  logic                    bb_we,
  input  logic [AW-1:0]           bb_waddr,
  input  hma_pkg::bright_bit_t    bb_wdata,
  input  logic [AW-1:0]           num_bright,
  // frame control
  input  logic                    start,
  output logic                    busy,
  output logic                    frame_done,
  // hologram values
  output logic                    h_valid,
  output logic signed [ACC_W-1:0] h_value,
  output hma_pkg::coord_t         h_alpha,
  output hma_pkg::coord_t         h_beta,
  // fault detection
  output hma_pkg::unit_err_t      unit_err [B_N],
  output logic                    reconfig_req,

  input  logic                    gen_en,
  input  logic [W-1:0]            gen_step,
  output logic                    gen_valid,
  output logic signed [W-1:0]     gen_cos,
  output logic signed [W-1:0]     gen_sin,
  output logic                    gen_err
);

  import hma_pkg::*;

  localparam int CALC_LAT = calc_latency(ITER);
  localparam int TREE_LAT = tree_latency(B_N);

  // Side information of one pass.
  typedef struct packed {
    logic           valid;
    logic           first;
    logic           last;
    logic           last_pixel;
    logic [B_N-1:0] lane_en;
    coord_t         alpha;
    coord_t         beta;
  } pass_tag_t;

  typedef struct packed {
    logic   valid;
    logic   last_pixel;
    coord_t alpha;
    coord_t beta;
  } pixel_tag_t;

  // ---- pixel and address generation --------------------------------------
  logic           active, last_pixel, next_coord;
  coord_t         alpha, beta;
  logic           issue, first, last;
  logic [AW-1:0]  addr;
  logic [B_N-1:0] lane_en;

  coord_gen #(.HOLO_W(HOLO_W), .HOLO_H(HOLO_H)) u_coord (
    .clk, .rst_n,
    .start (start && !busy),
    .next  (next_coord),
    .active,
    .alpha, .beta,
    .last_pixel
  );

  address_sequencer #(.B_N(B_N), .DEPTH(MAX_BRIGHT), .AW(AW)) u_seq (
    .clk, .rst_n,
    .run       (active),
    .num_bright,
    .issue,
    .addr,
    .first,
    .last,
    .lane_en,
    .next_coord
  );

  bright_bit_t bb [B_N];

  bright_bit_table #(.DEPTH(MAX_BRIGHT), .B_N(B_N), .AW(AW)) u_table (
    .clk,
    .we   (bb_we),
    .waddr(bb_waddr),
    .wdata(bb_wdata),
    .raddr(addr),
    .rdata(bb)
  );

  // Pass register, aligned with the table's registered read.
  pass_tag_t s1;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1 <= '0;
    else        s1 <= '{valid: issue, first: first, last: last,
                        last_pixel: last_pixel, lane_en: lane_en,
                        alpha: alpha, beta: beta};
  end

  // ---- B_N protected calculation units -----------------------------------
  logic               u_valid [B_N];
  logic signed [W-1:0] u_cos  [B_N];

  for (genvar k = 0; k < B_N; k++) begin : g_unit
    calc_unit_prot #(
      .COORD_W(COORD_W), .W(W), .ITER(ITER), .GAMMA_LSB(GAMMA_LSB)
    ) u_calc (
      .clk, .rst_n,
      .in_valid (s1.valid),
      .alpha    (s1.alpha),
      .beta     (s1.beta),
      .x        (bb[k].x),
      .y        (bb[k].y),
      .out_valid(u_valid[k]),
      .cos_out  (u_cos[k]),
      .err      (unit_err[k])
    );
  end

  pass_tag_t s2;
  delay_line #(.W($bits(pass_tag_t)), .DEPTH(CALC_LAT)) u_pass_dly (
    .clk, .rst_n, .din(s1), .dout(s2)
  );

  // ---- adder tree and accumulator -----------------------------------------
  logic acc_valid;

  accumulator_tree #(.W(W), .N(B_N), .ACC_W(ACC_W)) u_acc (
    .clk, .rst_n,
    .in_valid (s2.valid),
    .first    (s2.first),
    .last     (s2.last),
    .lane_en  (s2.lane_en),
    .terms    (u_cos),
    .out_valid(acc_valid),
    .h        (h_value)
  );

  pixel_tag_t px_in, px_out;
  assign px_in = '{valid: s2.valid && s2.last, last_pixel: s2.last_pixel,
                   alpha: s2.alpha, beta: s2.beta};

  delay_line #(.W($bits(pixel_tag_t)), .DEPTH(TREE_LAT)) u_px_dly (
    .clk, .rst_n, .din(px_in), .dout(px_out)
  );

  assign h_valid    = acc_valid;
  assign h_alpha    = px_out.alpha;
  assign h_beta     = px_out.beta;
  assign frame_done = acc_valid && px_out.last_pixel;

  // ---- frame bookkeeping -----------------------------------------------------
  // Pixels issued but whose H has not left yet.
  localparam int PW = $clog2(CALC_LAT + TREE_LAT + 2) + 1;
  logic [PW-1:0] in_flight;
  logic          px_issued;

  assign px_issued = issue && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) in_flight <= '0;
    else        in_flight <= in_flight + PW'(px_issued) - PW'(h_valid);
  end

  assign busy = active || (in_flight != '0);

  // ---- stand-alone protected sine/cosine generator -------------------------
  sincos_generator_prot #(.W(W), .ITER(ITER), .GAMMA_LSB(GAMMA_LSB)) u_gen (
    .clk, .rst_n,
    .en       (gen_en),
    .step     (gen_step),
    .out_valid(gen_valid),
    .cos_out  (gen_cos),
    .sin_out  (gen_sin),
    .err      (gen_err)
  );

  // ---- fault detection ----------------------------------------------------
  logic any_err;
  always_comb begin
    any_err = gen_err;
    for (int k = 0; k < B_N; k++) any_err |= |unit_err[k];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reconfig_req <= 1'b0;
    else        reconfig_req <= any_err;
  end

  // The units' own valid must line up with the side information.
  always_comb begin
    if (rst_n) begin
      for (int k = 0; k < B_N; k++)
        a_align: assert (u_valid[k] == s2.valid)
          else $error("hma_top: unit %0d out of step with its pass", k);
    end
  end

  // px_out.valid duplicates acc_valid.
  logic unused;
  assign unused = ^px_out.valid;

endmodule
