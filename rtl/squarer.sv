// squarer: the "simplified multiplier" of the protected distance unit.
//
// The original multiplier would take the two replicated scaled distances;
// since both are equal whenever no fault is present (and the DMR comparator
// in front flags them when they are not), it reduces to squaring one of
// them. The square has 2*IN_FRAC fraction bits; its bits of weight 2^0 and
// below form the cosine argument as a ZW-bit binary angle in units of pi.
// Bits of weight 2 and above are whole turns (2*pi) and are dropped, which
// performs the modulo-2*pi range reduction for the sine/cosine CORDIC.
//
// Interface: din is a W-bit signed word with IN_FRAC fraction bits; phase
// is ZW bits, weight of the sign bit = pi. Timing: one cycle of latency.
// Squaring follows the design description; dropping whole turns here is
// this design's choice. Lint reports the dropped bits of the full product
// as unused; they are discarded on purpose.
module squarer #(
  parameter int W       = hma_pkg::DATA_W,
  parameter int IN_FRAC = hma_pkg::VFRAC,
  parameter int ZW      = hma_pkg::DATA_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  din,
  output logic                 out_valid,
  output logic signed [ZW-1:0] phase
);

  localparam int LSB = 2 * IN_FRAC - (ZW - 1);

  logic signed [2*W-1:0] sq;

  // The angle's sign bit sits at weight 2^0 (pi) of the square.
  if (LSB < 0) begin : g_bad
    $error("squarer: IN_FRAC too small for a ZW-bit angle");
  end

  assign sq = (2*W)'(din) * (2*W)'(din);

  always_ff @(posedge clk) phase <= sq[LSB +: ZW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
