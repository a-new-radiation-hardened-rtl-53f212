// address_sequencer: walks the bright-bit table for each hologram pixel.
//
// One pass hands B_N consecutive bright bits, starting at Address, to the
// B_N calculation units. After the pass Address advances by B_N; when the
// pass covers the last bright bit of the context (Address + B_N >=
// num_bright) Address returns to 0 and next_coord asks the coordinate
// generator for the next hologram pixel. With num_bright <= B_N every pixel
// takes a single pass. lane_en marks the units whose bright bit exists, so
// a context that is not a multiple of B_N leaves the spare units out of the
// sum.
//
// Interface: run enables issuing (high while the coordinate generator has a
// pixel); issue/addr/first/last/lane_en describe the current pass and are
// combinational from the Address register. Timing: one pass per cycle. The
// stepping by B_N and the "next coordinate" request follow the design
// description; first/last/lane_en are this design's choices.
module address_sequencer #(
  parameter int B_N   = hma_pkg::B_N,
  parameter int DEPTH = hma_pkg::MAX_BRIGHT,
  parameter int AW    = $clog2(DEPTH) + 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           run,
  input  logic [AW-1:0]  num_bright,
  output logic           issue,
  output logic [AW-1:0]  addr,
  output logic           first,
  output logic           last,
  output logic [B_N-1:0] lane_en,
  output logic           next_coord
);

  logic [AW:0] next_addr;

  assign next_addr  = {1'b0, addr} + (AW+1)'(B_N);
  assign issue      = run;
  assign first      = (addr == '0);
  assign last       = (next_addr >= {1'b0, num_bright});
  assign next_coord = run && last;

  always_comb begin
    for (int k = 0; k < B_N; k++)
      lane_en[k] = (({1'b0, addr} + (AW+1)'(k)) < {1'b0, num_bright});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   addr <= '0;
    else if (run) addr <= last ? '0 : next_addr[AW-1:0];
  end

endmodule
