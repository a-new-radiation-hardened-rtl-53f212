// calc_unit_prot: one protected calculation unit, computing one term
// cos((pi / (lambda L)) * ((alpha - x)^2 + (beta - y)^2)) of the hologram sum.
//
// It chains distance_unit_prot (two vectoring CORDICs with the DMR1 and DMR2
// comparators) and cosine_unit_prot (full-range rotation CORDIC with the
// cos^2 + sin^2 = 1 check, DMR3). The two halves do not share a CORDIC.
//
// Interface: COORD_W-bit signed pixel coordinates of the hologram pixel
// (alpha, beta) and of one bright bit (x, y) in; the cosine term with W-2
// fraction bits out. err carries the three detection flags; dmr1 and dmr2
// are early (they appear while the cosine is still being computed), dmr3
// comes with out_valid. Timing: fully pipelined, one term per cycle,
// latency hma_pkg::calc_latency(ITER). The structure follows the design
// description.
module calc_unit_prot #(
  parameter int  COORD_W   = hma_pkg::COORD_W,
  parameter int  W         = hma_pkg::DATA_W,
  parameter int  ITER      = hma_pkg::ITER,
  parameter int  GAMMA_LSB = hma_pkg::GAMMA_LSB,
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
  output logic signed [W-1:0]       cos_out,
  output hma_pkg::unit_err_t        err
);

  logic                pv;
  logic signed [W-1:0] phase;
  logic signed [W-1:0] sin_unused;

  distance_unit_prot #(
    .COORD_W(COORD_W), .W(W), .ITER(ITER), .PHASE_PER_PX2(PHASE_PER_PX2)
  ) u_dist (
    .clk, .rst_n,
    .in_valid,
    .alpha, .beta, .x, .y,
    .out_valid(pv),
    .phase    (phase),
    .err_dmr1 (err.dmr1),
    .err_dmr2 (err.dmr2)
  );

  cosine_unit_prot #(.W(W), .ITER(ITER), .GAMMA_LSB(GAMMA_LSB)) u_cos (
    .clk, .rst_n,
    .in_valid (pv),
    .phase    (phase),
    .out_valid(out_valid),
    .cos_out  (cos_out),
    .sin_out  (sin_unused),
    .err_dmr3 (err.dmr3)
  );

  logic unused;
  assign unused = ^sin_unused;

endmodule
