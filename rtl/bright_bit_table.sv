// bright_bit_table: the observation-plane coordinates of the bright bits of
// one configuration context, read B_N at a time.
//
// Each calculation unit needs its own bright bit: in one pass unit k works on
// entry raddr + k. The table is a register array with one write port (loaded
// before a frame) and B_N registered read ports at consecutive addresses.
// Entries beyond the end of the table read as zero.
//
// Interface: wdata/rdata are hma_pkg::bright_bit_t {x, y}. Timing: writes
// take effect at the clock edge; reads have one cycle of latency. The
// addressing "Address + k" per unit follows the design description; the
// storage, its write port and its depth are this design's choices.
module bright_bit_table #(
  parameter int DEPTH = hma_pkg::MAX_BRIGHT,
  parameter int B_N   = hma_pkg::B_N,
  parameter int AW    = $clog2(DEPTH) + 1
) (
  input  logic                 clk,
  input  logic                 we,
  input  logic [AW-1:0]        waddr,
  input  hma_pkg::bright_bit_t wdata,
  input  logic [AW-1:0]        raddr,
  output hma_pkg::bright_bit_t rdata [B_N]
);

  hma_pkg::bright_bit_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (32'(waddr) < DEPTH)) mem[waddr[$clog2(DEPTH)-1:0]] <= wdata;
  end

  for (genvar k = 0; k < B_N; k++) begin : g_rd
    logic [AW:0] a;
    assign a = {1'b0, raddr} + (AW+1)'(k);
    always_ff @(posedge clk) begin
      if (32'(a) < DEPTH) rdata[k] <= mem[a[$clog2(DEPTH)-1:0]];
      else                rdata[k] <= '0;
    end
  end

endmodule
