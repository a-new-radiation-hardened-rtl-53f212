// phase_accumulator: the angle source of a CORDIC sine/cosine generator.
//
// Every enabled cycle the register adds the step P to itself; its content,
// multiplied by pi, is the angle fed to the CORDIC. The register is read as a
// binary angle in units of pi: the sign bit weighs pi and one LSB is
// pi * 2^-(W-1). The multiplication by pi is therefore only an interpretation
// of the word and costs no logic. The natural overflow of the W-bit sum is
// the wrap from +pi to -pi, so the angle never leaves the CORDIC's range.
//
// Interface: en advances the phase by step (a W-bit binary angle). phase is
// the register itself; out_valid is en delayed one cycle, so the n-th enabled
// cycle presents n * step (mod 2 pi) together with out_valid. Reset (async,
// active low) clears the phase. The adder, the register and the pi factor
// follow the design description; the binary-angle encoding, the enable and
// the reset are this design's choices.
module phase_accumulator #(
  parameter int W = hma_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] step,
  output logic         out_valid,
  output logic [W-1:0] phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase     <= '0;
      out_valid <= 1'b0;
    end else begin
      if (en) phase <= phase + step;
      out_valid <= en;
    end
  end

endmodule
