// screen_buffer: holds the projected 2D endpoints handed to the rasterizer.
//
// A four-entry 8-bit shift register. Each strb_screen pulse shifts
// screen_cor in along the chain screen_cor -> y1 -> y0 -> x1 -> x0, so the
// first of four values ends in x0, then x1, y0 and y1. The matrix math
// therefore produces the screen values in the order x0, x1, y0, y1.
//
// Interface: strb_screen/screen_cor from the matrix math; x0, y0 (first
// endpoint) and x1, y1 (second endpoint) to the rasterizer, straight from
// the registers. Asynchronous active-low reset clears all four.
//
// The shift chain follows the original design; x0..y1 are 8-bit integer
// screen coordinates (0..255).
module screen_buffer
  import gpu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               strb_screen,
  input  logic [COORD_W-1:0] screen_cor,
  output logic [COORD_W-1:0] x0,
  output logic [COORD_W-1:0] y0,
  output logic [COORD_W-1:0] x1,
  output logic [COORD_W-1:0] y1
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x0 <= '0;
      x1 <= '0;
      y0 <= '0;
      y1 <= '0;
    end else if (strb_screen) begin
      y1 <= screen_cor;
      y0 <= y1;
      x1 <= y0;
      x0 <= x1;
    end
  end

endmodule
