// cosine_unit_prot: protected cosine of the argument computed by the
// distance unit.
//
// A full-range CORDIC in rotation mode starts from (K, 0), K = 1/gain, and
// rotates it by the argument, producing cos and sin at once. Because the
// CORDIC takes the whole -pi..pi range itself, no quadrant mapping logic
// (shift registers and an output multiplexer choosing sin, -sin, cos or
// -cos) sits outside it, and the identity cos^2 + sin^2 = 1 checked by
// trig_identity_checker covers the whole function: a sum outside 1 +/- gamma
// raises err_dmr3.
//
// Interface: phase is a W-bit binary angle in units of pi; cos_out and
// sin_out carry W-2 fraction bits. cos_out is delayed two cycles so that it
// leaves together with its check flag. Latency:
// hma_pkg::cosine_latency(ITER) cycles, one argument per cycle. The
// structure follows the design description; the delay that aligns the
// output with the flag and the gamma value are this design's choices.
module cosine_unit_prot #(
  parameter int W         = hma_pkg::DATA_W,
  parameter int ITER      = hma_pkg::ITER,
  parameter int GAMMA_LSB = hma_pkg::GAMMA_LSB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] phase,
  output logic                out_valid,
  output logic signed [W-1:0] cos_out,
  output logic signed [W-1:0] sin_out,
  output logic                err_dmr3
);

  localparam int FRAC = W - 2;
  localparam logic signed [W-1:0] K_INIT =
    W'(hma_pkg::to_fix(1.0 / hma_pkg::cordic_gain(ITER), FRAC));

  logic                cv;
  logic signed [W-1:0] c, s, zres;
  logic signed [W-1:0] c_d [2];
  logic signed [W-1:0] s_d [2];

  cordic_rotation #(.W(W), .ZW(W), .ITER(ITER)) u_cordic (
    .clk, .rst_n,
    .in_valid (in_valid),
    .x_in     (K_INIT),
    .y_in     ('0),
    .z_in     (phase),
    .out_valid(cv),
    .x_out    (c),
    .y_out    (s),
    .z_out    (zres)
  );

  trig_identity_checker #(.W(W), .FRAC(FRAC), .GAMMA_LSB(GAMMA_LSB)) u_check (
    .clk, .rst_n,
    .in_valid (cv),
    .c        (c),
    .s        (s),
    .out_valid(out_valid),
    .err      (err_dmr3)
  );

  always_ff @(posedge clk) begin
    c_d[0] <= c;
    c_d[1] <= c_d[0];
    s_d[0] <= s;
    s_d[1] <= s_d[0];
  end

  assign cos_out = c_d[1];
  assign sin_out = s_d[1];

  // The residual angle of the rotation CORDIC is not needed.
  logic unused;
  assign unused = ^zres;

endmodule
