// trig_identity_checker: detects faults in a sine/cosine generator through
// the identity cos^2 + sin^2 = 1.
//
// Both outputs of the CORDIC are squared and registered (the "D" registers
// after the two multipliers), then added; the sum must lie within
// 1 - gamma .. 1 + gamma, the tolerance covering the finite precision of the
// CORDIC. A sum outside that window raises err.
//
// Interface: c, s are W-bit signed words with FRAC fraction bits; GAMMA_LSB
// is gamma in units of 2^-FRAC. Timing: two cycles (square, add/compare);
// err is valid with out_valid. The squaring, the registers and the window
// comparison follow the design description; the value of gamma (the
// description only says it is found by simulation) and the truncation of
// the squares to FRAC fraction bits are this design's choices. Lint reports
// the truncated low bits of the full products as unused; that is intended.
module trig_identity_checker #(
  parameter int W         = hma_pkg::DATA_W,
  parameter int FRAC      = hma_pkg::TFRAC,
  parameter int GAMMA_LSB = hma_pkg::GAMMA_LSB
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] c,
  input  logic signed [W-1:0] s,
  output logic                out_valid,
  output logic                err
);

  localparam int SW = W + 2;     // square with FRAC fraction bits, |v| < 2
  localparam logic [SW:0] ONE = (SW+1)'(1) << FRAC;
  localparam logic [SW:0] LO  = ONE - (SW+1)'(GAMMA_LSB);
  localparam logic [SW:0] HI  = ONE + (SW+1)'(GAMMA_LSB);

  logic signed [2*W-1:0] c2_full, s2_full;
  logic [SW-1:0]  c2_q, s2_q;
  logic [SW:0]    sum;
  logic           v1;

  assign c2_full = (2*W)'(c) * (2*W)'(c);
  assign s2_full = (2*W)'(s) * (2*W)'(s);

  always_ff @(posedge clk) begin
    c2_q <= c2_full[FRAC +: SW];
    s2_q <= s2_full[FRAC +: SW];
  end

  assign sum = {1'b0, c2_q} + {1'b0, s2_q};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
      err       <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
      err       <= v1 && ((sum < LO) || (sum > HI));
    end
  end

endmodule
