// dmr_comparator: equality check between two replicated results.
//
// Two copies of the same computation should agree bit for bit; any
// difference is taken as the effect of a radiation-induced upset and raises
// err for one cycle, which the design turns into a request to reconfigure
// the FPGA. The comparison only counts when in_valid is high, so the
// uninitialised contents of idle pipeline registers raise nothing.
//
// Interface: a, b are W-bit words. Timing: err is registered, one cycle
// after the compared words. The equality comparators follow the design
// description; gating by valid and registering the flag are this design's
// choices.
module dmr_comparator #(
  parameter int W = hma_pkg::DATA_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         err
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) err <= 1'b0;
    else        err <= in_valid && (a != b);
  end

endmodule
