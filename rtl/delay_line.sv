// delay_line: DEPTH-stage shift register with reset, used to carry the
// side information of a pass (valid, pixel coordinates, pass markers) along
// the calculation-unit pipeline so that it leaves with the results.
//
// Interface: W-bit din/dout. Timing: dout = din delayed DEPTH cycles
// (DEPTH = 0 passes din straight through).
module delay_line #(
  parameter int W     = 1,
  parameter int DEPTH = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] din,
  output logic [W-1:0] dout
);

  if (DEPTH == 0) begin : g_wire
    assign dout = din;
  end else begin : g_shift
    logic [W-1:0] sr [DEPTH];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
      end else begin
        sr[0] <= din;
        for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
      end
    end
    assign dout = sr[DEPTH-1];
  end

endmodule
