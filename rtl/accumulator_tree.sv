// accumulator_tree: sums the B_N cosine terms of one pass and accumulates
// passes into the hologram value H of one pixel.
//
// A balanced, pipelined adder tree (one register per level, N-1 adders)
// adds the terms of the lanes that hold a bright bit; a final adder with
// feedback accumulates the tree outputs of the passes of one pixel: the
// first pass loads the accumulator, later passes add to it, and the last
// pass releases H. With N = 8 that is 7 + 1 = 8 adders.
//
// Interface: terms are W-bit signed cosines; lane_en masks lanes without a
// bright bit; first/last mark the passes of one pixel. h is ACC_W bits with
// the terms' fraction bits, wide enough for the sum of up to 2^(ACC_W-W)
// terms. Timing: one pass per cycle; h appears tree_latency(N) cycles after
// the last pass. The tree and the accumulating final adder follow the design
// description; the full-precision width of the sum is this design's choice.
module accumulator_tree #(
  parameter int W     = hma_pkg::DATA_W,
  parameter int N     = hma_pkg::B_N,
  parameter int ACC_W = hma_pkg::DATA_W + $clog2(hma_pkg::MAX_BRIGHT)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    first,
  input  logic                    last,
  input  logic [N-1:0]            lane_en,
  input  logic signed [W-1:0]     terms [N],
  output logic                    out_valid,
  output logic signed [ACC_W-1:0] h
);

  localparam int LEVELS = (N > 1) ? $clog2(N) : 0;
  localparam int NP     = 1 << LEVELS;

  // Heap-ordered tree: node i has children 2i+1 and 2i+2; the NP leaves are
  // nodes NP-1 .. 2*NP-2, the internal nodes are registered.
  logic signed [ACC_W-1:0] node [2*NP-1];
  logic [LEVELS:0]         v_d, f_d, l_d;
  logic signed [ACC_W-1:0] acc;

  for (genvar j = 0; j < NP; j++) begin : g_leaf
    if (j < N) begin : g_term
      assign node[NP-1+j] = lane_en[j] ? ACC_W'(terms[j]) : '0;
    end else begin : g_pad
      assign node[NP-1+j] = '0;
    end
  end

  for (genvar i = 0; i < NP - 1; i++) begin : g_add
    always_ff @(posedge clk) node[i] <= node[2*i+1] + node[2*i+2];
  end

  assign v_d[0] = in_valid;
  assign f_d[0] = first;
  assign l_d[0] = last;
  for (genvar l = 0; l < LEVELS; l++) begin : g_tag
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        v_d[l+1] <= 1'b0;
        f_d[l+1] <= 1'b0;
        l_d[l+1] <= 1'b0;
      end else begin
        v_d[l+1] <= v_d[l];
        f_d[l+1] <= f_d[l];
        l_d[l+1] <= l_d[l];
      end
    end
  end

  // Final adder with feedback.
  logic signed [ACC_W-1:0] acc_next;
  assign acc_next = (f_d[LEVELS] ? '0 : acc) + node[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      h         <= '0;
    end else begin
      out_valid <= v_d[LEVELS] && l_d[LEVELS];
      if (v_d[LEVELS]) begin
        acc <= acc_next;
        if (l_d[LEVELS]) h <= acc_next;
      end
    end
  end

endmodule
