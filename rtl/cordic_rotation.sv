// cordic_rotation: fully pipelined full-range CORDIC in rotation mode, the
// sine/cosine generator of the protected cosine unit.
//
// The vector (x_in, y_in) is rotated by the angle z_in. With x_in = 1/K
// (K the CORDIC gain) and y_in = 0 the outputs are x_out = cos(z_in) and
// y_out = sin(z_in). The angle is a ZW-bit binary angle in units of pi, so
// any word is a valid angle in [-pi, pi): a first stage rotates by pi
// (negating x and y and flipping the angle's sign bit) whenever |z| >= pi/2,
// leaving a residual in [-pi/2, pi/2) for the ITER micro-rotation stages.
// The full input range is what lets the sin^2 + cos^2 = 1 check cover the
// whole sine/cosine path, with no quadrant logic outside the CORDIC.
//
// Interface: x_in/y_in/x_out/y_out are W-bit fixed-point words with any
// common scaling that leaves one bit of headroom. Timing: one angle per
// cycle, results ITER+1 cycles after in_valid, marked by out_valid. The
// full range and the rotation mode follow the design description; the
// pre-rotation scheme, truncating shifts and iteration count are this
// design's choices.
module cordic_rotation #(
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

  logic signed [W-1:0]  xs [ITER+1];
  logic signed [W-1:0]  ys [ITER+1];
  logic signed [ZW-1:0] zs [ITER+1];
  logic [ITER:0]        vs;

  // Stage 0: |z| >= pi/2 when the two top angle bits differ; rotate by pi.
  always_ff @(posedge clk) begin
    if (z_in[ZW-1] != z_in[ZW-2]) begin
      xs[0] <= -x_in;
      ys[0] <= -y_in;
      zs[0] <= {~z_in[ZW-1], z_in[ZW-2:0]};
    end else begin
      xs[0] <= x_in;
      ys[0] <= y_in;
      zs[0] <= z_in;
    end
  end

  // Stages 1..ITER: rotate by sign(z) * atan(2^-i).
  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk) begin
      if (zs[i] >= 0) begin
        xs[i+1] <= xs[i] - (ys[i] >>> i);
        ys[i+1] <= ys[i] + (xs[i] >>> i);
        zs[i+1] <= zs[i] - ATAN[i];
      end else begin
        xs[i+1] <= xs[i] + (ys[i] >>> i);
        ys[i+1] <= ys[i] - (xs[i] >>> i);
        zs[i+1] <= zs[i] + ATAN[i];
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
