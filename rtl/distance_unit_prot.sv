// distance_unit_prot: protected computation of the cosine argument
// (pi / (lambda L)) * ((alpha - x)^2 + (beta - y)^2) for one bright bit.
//
// Instead of squaring the two coordinate differences with wide multipliers,
// the distance is taken as the magnitude of the vector (alpha - x, beta - y)
// by a CORDIC in vectoring mode. Two such CORDICs run side by side on the
// same operands and so form a natural duplicated pair:
//   replica r: subtract -> cordic_vectoring -> const_scaler -> squarer
//   DMR1: the two scaled distances are compared,
//   DMR2: the two squared distances (the arguments) are compared.
// Each squarer works on its own replica's scaled distance: a multiplier of
// two operands that are equal when fault-free reduces to a squarer, and if
// they are not equal DMR1 has already flagged it.
//
// Interface: alpha/beta (hologram pixel) and x/y (bright bit) are COORD_W
// bit signed pixel coordinates; phase is a DATA_W-bit binary angle in units
// of pi (sign bit = pi), reduced modulo 2*pi. err_dmr1/err_dmr2 pulse for
// one cycle when the replicas disagree on a valid result; err_dmr1 comes two
// cycles before out_valid, err_dmr2 with it. Latency:
// hma_pkg::distance_latency(ITER) cycles. The structure follows the design
// description; duplicating the subtractors (so DMR also covers them), the
// number formats and the choice of replica 2 as the output are this design's
// choices.
module distance_unit_prot #(
  parameter int  COORD_W = hma_pkg::COORD_W,
  parameter int  W       = hma_pkg::DATA_W,
  parameter int  ITER    = hma_pkg::ITER,
  parameter real PHASE_PER_PX2 = hma_pkg::PHASE_PER_PX2
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic signed [COORD_W-1:0] alpha,
  input  logic signed [COORD_W-1:0] beta,
  input  logic signed [COORD_W-1:0] x,
  input  logic signed [COORD_W-1:0] y,
  output logic                      out_valid,
  output logic signed [W-1:0]       phase,
  output logic                      err_dmr1,
  output logic                      err_dmr2
);

  localparam int  DW   = COORD_W + 1;        // difference width
  localparam int  FRAC = W - DW - 2;         // two bits of CORDIC headroom
  localparam real SCALE = $sqrt(PHASE_PER_PX2) / hma_pkg::cordic_gain(ITER);

  logic signed [W-1:0] dx   [2];
  logic signed [W-1:0] dy   [2];
  logic                dv;
  logic signed [W-1:0] mag  [2];
  logic signed [W-1:0] ynul [2];
  logic signed [W-1:0] zang [2];
  logic                mv   [2];
  logic signed [W-1:0] sd   [2];
  logic                sv   [2];
  logic signed [W-1:0] ph   [2];
  logic                pv   [2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dv <= 1'b0;
    else        dv <= in_valid;
  end

  for (genvar r = 0; r < 2; r++) begin : g_rep
    logic signed [DW-1:0] ddx, ddy;
    assign ddx = DW'(alpha) - DW'(x);
    assign ddy = DW'(beta)  - DW'(y);

    always_ff @(posedge clk) begin
      dx[r] <= W'(ddx) <<< FRAC;
      dy[r] <= W'(ddy) <<< FRAC;
    end

    cordic_vectoring #(.W(W), .ZW(W), .ITER(ITER)) u_cordic (
      .clk, .rst_n,
      .in_valid (dv),
      .x_in     (dx[r]),
      .y_in     (dy[r]),
      .z_in     ('0),
      .out_valid(mv[r]),
      .x_out    (mag[r]),
      .y_out    (ynul[r]),
      .z_out    (zang[r])
    );

    const_scaler #(.W(W), .IN_FRAC(FRAC), .OUT_FRAC(FRAC), .SCALE(SCALE)) u_scale (
      .clk, .rst_n,
      .in_valid (mv[r]),
      .din      (mag[r]),
      .out_valid(sv[r]),
      .dout     (sd[r])
    );

    squarer #(.W(W), .IN_FRAC(FRAC), .ZW(W)) u_square (
      .clk, .rst_n,
      .in_valid (sv[r]),
      .din      (sd[r]),
      .out_valid(pv[r]),
      .phase    (ph[r])
    );
  end

  dmr_comparator #(.W(W)) u_dmr1 (
    .clk, .rst_n,
    .in_valid(sv[0] || sv[1]),
    .a       (sd[0]),
    .b       (sd[1]),
    .err     (err_dmr1)
  );

  dmr_comparator #(.W(W)) u_dmr2 (
    .clk, .rst_n,
    .in_valid(pv[0] || pv[1]),
    .a       (ph[0]),
    .b       (ph[1]),
    .err     (err_dmr2)
  );

  assign out_valid = pv[1];
  assign phase     = ph[1];

  // The residual y and the angle of the vectoring CORDICs are not needed.
  logic unused;
  assign unused = ^{ynul[0], ynul[1], zang[0], zang[1], pv[0]};

endmodule
