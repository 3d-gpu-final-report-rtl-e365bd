// world_matrix_buffer: holds the 4x4 world transform matrix.
//
// A 16-word shift register. Each strb_matrix pulse shifts the word on
// databus_out in; after 16 strobes the first word received (Mat(1,1)) sits
// in the oldest slot. The matrix is read row by row: row_sel = r presents
// the four words of row r as one 64-bit bus, first element in the top
// 16 bits, translation term in the bottom 16 bits, which is the order the
// matrix math multiplies them in. Rows are stored in RAM order, Mat(1,1),
// Mat(1,2), ... Mat(4,4), so row r is words 4r..4r+3.
//
// Interface: strb_matrix/databus_out from the controller, row_sel in and
// row out to the matrix math. row is combinational from the registers.
// Asynchronous active-low reset clears the matrix.
//
// The shift-register structure, word order and 64-bit row bus follow the
// original design; the all-zero reset value is this design's choice.
module world_matrix_buffer
  import gpu_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              strb_matrix,
  input  logic [WORD_W-1:0] databus_out,
  input  logic [1:0]        row_sel,
  output logic [ROW_W-1:0]  row
);

  // mat[0] is the oldest word (Mat(1,1) after a full load), mat[15] the newest.
  logic [WORD_W-1:0] mat [MAT_WORDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAT_WORDS; i++) mat[i] <= '0;
    end else if (strb_matrix) begin
      for (int i = 0; i < MAT_WORDS - 1; i++) mat[i] <= mat[i+1];
      mat[MAT_WORDS-1] <= databus_out;
    end
  end

  always_comb begin
    row = {mat[4*row_sel], mat[4*row_sel+1], mat[4*row_sel+2], mat[4*row_sel+3]};
  end

endmodule
