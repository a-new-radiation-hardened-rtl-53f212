// sincos_generator_prot: stand-alone protected sine/cosine generator.
//
// A phase accumulator with step P drives the full-range rotation CORDIC of
// cosine_unit_prot, which starts from (K, 0) and produces cos(n*P*pi) and
// sin(n*P*pi) for the n-th enabled cycle. The squared outputs are summed and
// checked against 1 +/- gamma; a sum outside the window raises err. This is
// the protected cosine function on its own, the configuration in which the
// cosine unit is characterised; in the address calculation the distance unit
// drives the angle input instead of the accumulator.
//
// Interface: while en is high one angle per cycle enters; step is a W-bit
// binary angle in units of pi (step = 1 LSB gives the finest sweep).
// cos_out and sin_out carry W-2 fraction bits and leave with out_valid and
// err. Latency from an enabled cycle to its output:
// 1 + hma_pkg::cosine_latency(ITER) cycles. The structure follows the design
// description; the encodings and gamma are this design's choices.
module sincos_generator_prot #(
  parameter int W         = hma_pkg::DATA_W,
  parameter int ITER      = hma_pkg::ITER,
  parameter int GAMMA_LSB = hma_pkg::GAMMA_LSB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [W-1:0]        step,
  output logic                out_valid,
  output logic signed [W-1:0] cos_out,
  output logic signed [W-1:0] sin_out,
  output logic                err
);

  logic         pv;
  logic [W-1:0] ph;

  phase_accumulator #(.W(W)) u_phase (
    .clk, .rst_n,
    .en,
    .step,
    .out_valid(pv),
    .phase    (ph)
  );

  cosine_unit_prot #(.W(W), .ITER(ITER), .GAMMA_LSB(GAMMA_LSB)) u_cos (
    .clk, .rst_n,
    .in_valid (pv),
    .phase    (ph),
    .out_valid,
    .cos_out,
    .sin_out,
    .err_dmr3 (err)
  );

endmodule
