// const_scaler: registered multiplication by a fixed real constant.
//
// In the distance unit it multiplies a CORDIC magnitude by
// sqrt(pitch^2 / (lambda L)) / K, so that squaring the result gives the
// cosine argument of the hologram equation in units of pi, with the CORDIC
// gain K removed on the way. The constant SCALE (0 < SCALE < 2) is rounded
// to W-2 fraction bits; the product is truncated from IN_FRAC + W - 2 to
// OUT_FRAC fraction bits.
//
// Interface: din/dout are W-bit signed fixed-point words. Timing: one word
// per cycle, one cycle of latency. The multiplication by a constant after
// each CORDIC follows the design description; folding the CORDIC gain into
// the constant and the rounding are this design's choices.
module const_scaler #(
  parameter int  W        = hma_pkg::DATA_W,
  parameter int  IN_FRAC  = hma_pkg::VFRAC,
  parameter int  OUT_FRAC = hma_pkg::VFRAC,
  parameter real SCALE    = $sqrt(hma_pkg::PHASE_PER_PX2)
                            / hma_pkg::cordic_gain(hma_pkg::ITER)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] din,
  output logic                out_valid,
  output logic signed [W-1:0] dout
);

  localparam int CFRAC = W - 2;
  localparam int SHIFT = IN_FRAC + CFRAC - OUT_FRAC;
  localparam logic signed [W-1:0] COEF = W'(hma_pkg::to_fix(SCALE, CFRAC));

  logic signed [2*W-1:0] prod;

  assign prod = din * COEF;

  always_ff @(posedge clk) dout <= W'(prod >>> SHIFT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
