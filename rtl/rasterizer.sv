// rasterizer: Bresenham line drawing into a 1-bit-per-pixel frame buffer.
//
// Given two screen endpoints (x0,y0) and (x1,y1) it visits every pixel of
// the line from the first endpoint to the second, for any slope and
// direction, using only unsigned-magnitude differences, add/subtract,
// compare and shifts by one (the doubled differences).
//
// Algorithm, one state per step:
//   DIFF  dx = |x1-x0|, dy = |y1-y0|, step directions iX, iY.
//   SWAP  steep = dy > dx. For a steep line the roles of x and y are
//         exchanged so that the major axis always advances by one per pixel.
//         After this state X/Y hold the major/minor coordinate, dx holds
//         2*|major delta|, dy holds 2*|minor delta|, err = 256.
//   PLOT  the pixel (X,Y), or (Y,X) when steep, is presented on
//         rast_addr/rast_index with rast_strb high for one cycle.
//   HOLD  idle cycles that give the controller time for its
//         read-modify-write of the frame-buffer word; if X has reached the
//         second endpoint the line is finished.
//   STEP  err += dy, X moves one pixel toward the end.
//   CORR  if err > 256: err -= dx and Y moves one pixel.
// The error term keeps an offset of 256 so the threshold test is a
// comparison with 256; err is kept as a 12-bit signed value because for
// shallow long lines it drops below zero.
//
// Frame-buffer mapping: pixel (px,py) is word py*16 + px/16 (0..4095),
// bit px mod 16.
//
// Timing: one pixel every PIXEL_CYCLES clocks (PLOT, PIXEL_CYCLES-3 HOLD
// cycles, STEP, CORR); the first strobe comes two clock edges after the
// edge that samples init_rast. rast_done is a one-cycle pulse PIXEL_CYCLES-2 cycles
// after the last strobe. There is no stall input: the pixel rate is fixed
// and the consumer must keep up. PIXEL_CYCLES must be at least 4.
//
// From the original design: the steps of the algorithm, the 256 error
// offset, the doubled deltas, the word/bit mapping and an eight-state FSM.
// This design's own choices: the split of work between the states, the
// HOLD cycles that set the 5-cycle pixel period, and the signed error
// register.
module rasterizer
  import gpu_pkg::*;
#(
  parameter int unsigned PIXEL_CYCLES = 5
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init_rast,
  input  logic [COORD_W-1:0] x0,
  input  logic [COORD_W-1:0] y0,
  input  logic [COORD_W-1:0] x1,
  input  logic [COORD_W-1:0] y1,
  output logic [ADDR_W-1:0]  rast_addr,
  output logic [INDEX_W-1:0] rast_index,
  output logic               rast_strb,
  output logic               rast_done,
  output logic               steep      // observation: current line is steep
);

  localparam int unsigned HOLD_CYCLES = PIXEL_CYCLES - 3;
  localparam int unsigned HCNT_W = (HOLD_CYCLES > 1) ? $clog2(HOLD_CYCLES) : 1;
  localparam int unsigned ERR_W = 12;
  localparam logic signed [ERR_W-1:0] ERR_INIT = 12'sd256;

  typedef enum logic [2:0] {R_IDLE, R_DIFF, R_SWAP, R_PLOT, R_HOLD, R_STEP, R_CORR, R_DONE} rstate_e;

  rstate_e                   state;
  logic [COORD_W-1:0]        xr, yr, xend;   // major, minor, major end
  logic [COORD_W:0]          dx, dy;         // doubled magnitudes (9 bits)
  logic                      ix, iy;         // 1: increment, 0: decrement
  logic signed [ERR_W-1:0]   err;
  logic [HCNT_W-1:0]         hcnt;

  logic [COORD_W-1:0] px, py;
  always_comb begin
    px = steep ? yr : xr;
    py = steep ? xr : yr;
    rast_addr  = FB_BASE + ADDR_W'({py, px[COORD_W-1:INDEX_W]});
    rast_index = px[INDEX_W-1:0];
  end

  assign rast_strb = (state == R_PLOT);
  assign rast_done = (state == R_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= R_IDLE;
      xr    <= '0;
      yr    <= '0;
      xend  <= '0;
      dx    <= '0;
      dy    <= '0;
      ix    <= 1'b1;
      iy    <= 1'b1;
      steep <= 1'b0;
      err   <= ERR_INIT;
      hcnt  <= '0;
    end else begin
      unique case (state)
        R_IDLE: if (init_rast) state <= R_DIFF;
        R_DIFF: begin
          ix <= (x1 >= x0);
          iy <= (y1 >= y0);
          dx <= {1'b0, (x1 >= x0) ? x1 - x0 : x0 - x1};
          dy <= {1'b0, (y1 >= y0) ? y1 - y0 : y0 - y1};
          state <= R_SWAP;
        end
        R_SWAP: begin
          err  <= ERR_INIT;
          hcnt <= '0;
          if (dy > dx) begin
            steep <= 1'b1;
            xr    <= y0;
            yr    <= x0;
            xend  <= y1;
            ix    <= iy;
            iy    <= ix;
            dx    <= dy << 1;
            dy    <= dx << 1;
          end else begin
            steep <= 1'b0;
            xr    <= x0;
            yr    <= y0;
            xend  <= x1;
            dx    <= dx << 1;
            dy    <= dy << 1;
          end
          state <= R_PLOT;
        end
        R_PLOT: begin
          hcnt  <= '0;
          state <= R_HOLD;
        end
        R_HOLD: begin
          if (hcnt == HCNT_W'(HOLD_CYCLES - 1)) begin
            state <= (xr == xend) ? R_DONE : R_STEP;
          end else begin
            hcnt <= hcnt + 1'b1;
          end
        end
        R_STEP: begin
          err   <= err + ERR_W'(dy);
          xr    <= ix ? xr + 1'b1 : xr - 1'b1;
          state <= R_CORR;
        end
        R_CORR: begin
          if (err > ERR_INIT) begin
            err <= err - ERR_W'(dx);
            yr  <= iy ? yr + 1'b1 : yr - 1'b1;
          end
          state <= R_PLOT;
        end
        R_DONE: state <= R_IDLE;
        default: state <= R_IDLE;
      endcase
    end
  end

endmodule
