// coord_gen: hologram plane coordinate generator.
//
// Scans the HOLO_W x HOLO_H hologram pixels in raster order (alpha fastest)
// and presents the current pixel as signed coordinates centred on the
// optical axis: alpha = column - HOLO_W/2, beta = row - HOLO_H/2. A start
// pulse begins a frame; each next pulse (the "next coordinate" request of
// the address sequencer) moves to the following pixel, and next on the last
// pixel ends the frame.
//
// Interface: active is high while a pixel is presented; last_pixel marks the
// final one. Timing: one pixel per next pulse, which may come every cycle.
// The generator itself is named by the design description; the scan order,
// centring and frame size are this design's choices.
module coord_gen #(
  parameter int HOLO_W  = hma_pkg::HOLO_W,
  parameter int HOLO_H  = hma_pkg::HOLO_H
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  logic            next,
  output logic            active,
  output hma_pkg::coord_t alpha,
  output hma_pkg::coord_t beta,
  output logic            last_pixel
);

  localparam int CW = $clog2(HOLO_W) + 1;
  localparam int RW = $clog2(HOLO_H) + 1;

  typedef enum logic {IDLE, SCAN} state_t;

  state_t        state;
  logic [CW-1:0] col;
  logic [RW-1:0] row;
  logic          last_col;

  assign active     = (state == SCAN);
  assign last_col   = (32'(col) == HOLO_W - 1);
  assign last_pixel = active && last_col && (32'(row) == HOLO_H - 1);
  assign alpha      = hma_pkg::coord_t'($signed({1'b0, col})) - hma_pkg::coord_t'(HOLO_W / 2);
  assign beta       = hma_pkg::coord_t'($signed({1'b0, row})) - hma_pkg::coord_t'(HOLO_H / 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE;
      col   <= '0;
      row   <= '0;
    end else begin
      case (state)
        IDLE: if (start) begin
          state <= SCAN;
          col   <= '0;
          row   <= '0;
        end
        SCAN: if (next) begin
          if (last_pixel) begin
            state <= IDLE;
          end else if (last_col) begin
            col <= '0;
            row <= row + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
