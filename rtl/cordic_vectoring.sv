// cordic_vectoring: fully pipelined CORDIC in vectoring mode, used to measure
// the distance between a hologram pixel and a bright bit.
//
// The vector (x_in, y_in) is rotated towards the positive x axis until y is
// driven to zero; x then holds K * sqrt(x_in^2 + y_in^2), with K the CORDIC
// gain (about 1.6468), and z accumulates the rotated angle. A first stage
// turns vectors with negative x by pi (negating x and y, adding pi to z) so
// the whole plane is covered; then ITER micro-rotation stages follow, one
// register each. The gain is not removed here: the constant multiplier that
// follows absorbs it.
//
// Interface: x_in/y_in are W-bit fixed-point words with any common scaling
// (the caller leaves two bits of headroom for the gain growth); z_in and
// z_out are ZW-bit binary angles in units of pi. Timing: one vector per cycle,
// results ITER+1 cycles after in_valid, marked by out_valid. Using vectoring
// mode for the distance follows the design description; the pre-rotation, the
// truncating shifts and the iteration count are this design's choices.
module cordic_vectoring #(
  parameter int W    = hma_pkg::DATA_W,
  parameter int ZW   = hma_pkg::DATA_W,
  parameter int ITER = hma_pkg::ITER
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  x_in,
  input  logic signed [W-1:0]  y_in,
  input  logic signed [ZW-1:0] z_in,
  output logic                 out_valid,
  output logic signed [W-1:0]  x_out,
  output logic signed [W-1:0]  y_out,
  output logic signed [ZW-1:0] z_out
);

  typedef logic signed [ZW-1:0] angle_tab_t [ITER];

  function automatic angle_tab_t make_table();
    angle_tab_t t;
    for (int i = 0; i < ITER; i++) t[i] = ZW'(hma_pkg::atan_pi(i, ZW));
    return t;
  endfunction

  localparam angle_tab_t ATAN = make_table();
  localparam logic signed [ZW-1:0] Z_PI = {1'b1, {(ZW-1){1'b0}}};  // -pi == +pi

  logic signed [W-1:0]  xs [ITER+1];
  logic signed [W-1:0]  ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic [ITER:0]        vs;

  // Stage 0: bring the vector into the right half-plane.
  always_ff @(posedge clk) begin
    if (x_in < 0) begin
      xs[0] <= -x_in;
      ys[0] <= -y_in;
      zs[0] <= z_in + Z_PI;
    end else begin
      xs[0] <= x_in;
      ys[0] <= y_in;
      zs[0] <= z_in;
    end
  end

  // Stages 1..ITER: rotate by -sign(y) * atan(2^-i).
  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (ys[i] >= 0) begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + ATAN[i];
      end else begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - ATAN[i];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vs <= '0;
    else        vs <= {vs[ITER-1:0], in_valid};
  end

  assign out_valid = vs[ITER];
  assign x_out     = xs[ITER];
  assign y_out     = ys[ITER];
  assign z_out     = zs[ITER];

endmodule
