// gpu_top: a small fixed-function 3D wireframe GPU.
//
// The host places a 4x4 world transform matrix and line endpoints (16-bit
// fixed point, 8 fraction bits) in a RAM it shares with the GPU, then sends
// commands: load matrix, draw line. For each line the GPU transforms both
// endpoints by the matrix, drops Z (orthographic projection), maps the
// result to a 256x256 screen and rasterizes the line with Bresenham's
// algorithm into a 1-bit-per-pixel frame buffer at RAM words 0..4095.
//
// Structure (the design's top-level block diagram):
//   gpu_controller      host command interface, RAM master, sequencer
//   world_matrix_buffer 16-word matrix store, one row out at a time
//   coordinate_buffer   6-word line store, one point out at a time
//   matrix_math         3 multipliers + 3 adders, row x point + translation
//   screen_buffer       x0, x1, y0, y1 of the projected line
//   rasterizer          Bresenham line walker, frame-buffer address + bit
//
// Pins: the host drives commands on the same 16-bit data bus the RAM uses,
// with strb_in; ram_in_use tells the GPU the host is using the RAM;
// gpu_done pulses when a command has finished. The GPU drives addr_out,
// re_out and we_out to the RAM. The bidirectional bus is split here into
// databus_in, databus_o and databus_oe (and addr_oe for the address) so the
// tri-state drivers live in the pads outside this module.
//
// Timing: one 100 MHz clock, asynchronous active-low reset. The matrix math
// result is a two-cycle path (SETTLE_CYCLES = 2). The rasterizer pixel
// period (5 cycles) equals the controller's read-modify-write time.
//
// The partition and wiring follow the original block diagram; splitting
// the tri-state buses into in/out/enable signals is this design's choice.
module gpu_top
  import gpu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              strb_in,
  input  logic              ram_in_use,
  output logic              gpu_done,
  input  logic [WORD_W-1:0] databus_in,
  output logic [WORD_W-1:0] databus_o,
  output logic              databus_oe,
  output logic [ADDR_W-1:0] addr_out,
  output logic              addr_oe,
  output logic              re_out,
  output logic              we_out
);

  localparam int unsigned SETTLE_CYCLES = 2;
  localparam int unsigned PIXEL_CYCLES  = 5;

  logic [WORD_W-1:0]  databus_out;
  logic               strb_matrix, strb_cor, init_matrix, math_done;
  logic [1:0]         row_sel;
  logic               sel;
  logic [ROW_W-1:0]   row;
  logic [POINT_W-1:0] point;
  logic [COORD_W-1:0] screen_cor;
  logic               strb_screen;
  logic [COORD_W-1:0] x0, y0, x1, y1;
  logic               init_rast, rast_strb, rast_done, steep;
  logic [ADDR_W-1:0]  rast_addr;
  logic [INDEX_W-1:0] rast_index;

  gpu_controller u_controller (
    .clk, .rst_n, .strb_in, .ram_in_use, .gpu_done,
    .databus_in, .databus_drv(databus_o), .data_oe(databus_oe),
    .addr_out, .addr_oe, .re_out, .we_out,
    .databus_out, .strb_matrix, .strb_cor,
    .init_matrix, .math_done,
    .init_rast, .rast_strb, .rast_done, .rast_addr, .rast_index
  );

  world_matrix_buffer u_world_matrix_buffer (
    .clk, .rst_n, .strb_matrix, .databus_out, .row_sel, .row
  );

  coordinate_buffer u_coordinate_buffer (
    .clk, .rst_n, .strb_cor, .databus_out, .sel, .point
  );

  matrix_math #(.SETTLE_CYCLES(SETTLE_CYCLES)) u_matrix_math (
    .clk, .rst_n, .init_math(init_matrix), .row, .point,
    .row_sel, .sel, .screen_cor, .strb_screen, .math_done
  );

  screen_buffer u_screen_buffer (
    .clk, .rst_n, .strb_screen, .screen_cor, .x0, .y0, .x1, .y1
  );

  rasterizer #(.PIXEL_CYCLES(PIXEL_CYCLES)) u_rasterizer (
    .clk, .rst_n, .init_rast, .x0, .y0, .x1, .y1,
    .rast_addr, .rast_index, .rast_strb, .rast_done, .steep
  );

endmodule
