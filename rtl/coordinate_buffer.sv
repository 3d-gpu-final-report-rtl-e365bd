// coordinate_buffer: holds the two 3D endpoints of the line being drawn.
//
// A 6-word shift register loaded one 16-bit word per strb_cor pulse in the
// RAM order X0, Y0, Z0, X1, Y1, Z1. sel = 0 presents the first endpoint and
// sel = 1 the second as a 48-bit bus {X, Y, Z}, X in the top 16 bits, which
// is how the matrix math splits it.
//
// Interface: strb_cor/databus_out from the controller, sel in and point out
// to the matrix math; point is combinational from the registers.
// Asynchronous active-low reset clears the buffer.
//
// Structure and word order follow the original design; the reset value is
// this design's choice.
module coordinate_buffer
  import gpu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               strb_cor,
  input  logic [WORD_W-1:0]  databus_out,
  input  logic               sel,
  output logic [POINT_W-1:0] point
);

  // pts[0] is the oldest word (X0 after a full load), pts[5] the newest (Z1).
  logic [WORD_W-1:0] pts [LINE_WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LINE_WORDS; i++) pts[i] <= '0;
    end else if (strb_cor) begin
      for (int i = 0; i < LINE_WORDS - 1; i++) pts[i] <= pts[i+1];
      pts[LINE_WORDS-1] <= databus_out;
    end
  end

  always_comb begin
    if (sel) point = {pts[3], pts[4], pts[5]};
    else     point = {pts[0], pts[1], pts[2]};
  end

endmodule
