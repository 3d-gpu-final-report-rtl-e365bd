// matrix_math: transforms the two line endpoints by the world matrix.
//
// Datapath: three signed 16x16 multipliers and three adders compute one
// dot product of a matrix row {m0,m1,m2,m3} with a point {X,Y,Z,1}:
//   acc = (X*m0 + Y*m1) + (Z*m2 + m3*256)
// All inputs carry 8 fraction bits, so a product carries 16; the
// translation term m3 is shifted up by 8 to the same scale. The integer
// part acc[23:16] plus 128 is the 8-bit screen coordinate, which places
// world coordinate 0 at the screen centre (world -128..127 maps to 0..255).
// Only the X and Y rows are evaluated: the projection is orthographic and Z
// is dropped.
//
// Control: on init_math an FSM produces four coordinates in the order
// x0, x1, y0, y1 (row 0 with point 0, row 0 with point 1, row 1 with
// point 0, row 1 with point 1) to suit the screen buffer's shift chain.
// For each one it drives row_sel/sel, holds them for SETTLE_CYCLES cycles so
// the long combinational multiply-add path has settled (a two-cycle
// multicycle path at the 100 MHz target), then pulses strb_screen with
// screen_cor valid. After the fourth coordinate it pulses math_done.
//
// Timing: math_done is high in the cycle that is 4*(SETTLE_CYCLES+1)+1
// clock edges after the edge that sampled init_math. init_math is ignored
// while a computation is running.
//
// From the original design: three signed multipliers and three adders,
// the +128 screen offset, row_sel/sel requests, strb_screen and math_done,
// and the two-cycle settle. This design's own choices: scaling the
// translation by 256, the x0, x1, y0, y1 output order and truncation of
// the fraction bits (no rounding, no clipping).
module matrix_math
  import gpu_pkg::*;
#(
  parameter int unsigned SETTLE_CYCLES = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               init_math,
  input  logic [ROW_W-1:0]   row,
  input  logic [POINT_W-1:0] point,
  output logic [1:0]         row_sel,
  output logic               sel,
  output logic [COORD_W-1:0] screen_cor,
  output logic               strb_screen,
  output logic               math_done
);

  typedef enum logic [1:0] {M_IDLE, M_SETTLE, M_STRB, M_DONE} mstate_e;

  localparam int unsigned CNT_W = (SETTLE_CYCLES > 1) ? $clog2(SETTLE_CYCLES) : 1;

  mstate_e           state;
  logic [1:0]        idx;   // which of the four outputs is being produced
  logic [CNT_W-1:0]  cnt;

  // ---------------- combinational multiply-add ----------------
  logic signed [WORD_W-1:0]   px, py, pz, m0, m1, m2, m3;
  logic signed [2*WORD_W-1:0] prod0, prod1, prod2;
  logic signed [2*WORD_W+1:0] sum01, sum23, acc;

  always_comb begin
    px = point[3*WORD_W-1:2*WORD_W];
    py = point[2*WORD_W-1:WORD_W];
    pz = point[WORD_W-1:0];
    m0 = row[4*WORD_W-1:3*WORD_W];
    m1 = row[3*WORD_W-1:2*WORD_W];
    m2 = row[2*WORD_W-1:WORD_W];
    m3 = row[WORD_W-1:0];
    prod0 = px * m0;
    prod1 = py * m1;
    prod2 = pz * m2;
    sum01 = (2*WORD_W+2)'(prod0) + (2*WORD_W+2)'(prod1);
    sum23 = (2*WORD_W+2)'(prod2) + ((2*WORD_W+2)'(m3) <<< FRAC_W);
    acc   = sum01 + sum23;
    screen_cor = acc[2*FRAC_W+COORD_W-1:2*FRAC_W] + COORD_W'(128);
  end

  // ---------------- control ----------------
  assign row_sel     = {1'b0, idx[1]};
  assign sel         = idx[0];
  assign strb_screen = (state == M_STRB);
  assign math_done   = (state == M_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= M_IDLE;
      idx   <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        M_IDLE: begin
          idx <= '0;
          cnt <= '0;
          if (init_math) state <= M_SETTLE;
        end
        M_SETTLE: begin
          if (cnt == CNT_W'(SETTLE_CYCLES - 1)) begin
            cnt   <= '0;
            state <= M_STRB;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        M_STRB: begin
          if (idx == 2'd3) begin
            state <= M_DONE;
          end else begin
            idx   <= idx + 1'b1;
            state <= M_SETTLE;
          end
        end
        M_DONE: state <= M_IDLE;
        default: state <= M_IDLE;
      endcase
    end
  end

endmodule
