// gpu_pkg: constants and types shared by the wireframe line GPU.
//
// All geometry is carried as 16-bit two's complement fixed-point numbers
// with 8 fraction bits (value * 256), as the design specifies. The screen
// is 256 x 256 one-bit pixels held in a 4096-word frame buffer at RAM
// addresses 0..4095, 16 pixels per 16-bit word: word = y*16 + x/16 and
// bit = x mod 16. The word/bit split follows the addresses and indices seen
// in the rasterizer and controller waveforms; which bit end is "bit 0" on
// a display is left to the reader of the frame buffer.
package gpu_pkg;

  localparam int unsigned WORD_W   = 16;  // RAM data width, fixed-point width
  localparam int unsigned ADDR_W   = 16;  // RAM address width
  localparam int unsigned COORD_W  = 8;   // screen coordinate width (0..255)
  localparam int unsigned INDEX_W  = 4;   // bit index inside a frame-buffer word
  localparam int unsigned FRAC_W   = 8;   // fraction bits of the fixed-point format

  localparam int unsigned MAT_WORDS  = 16;  // 4x4 world transform matrix
  localparam int unsigned LINE_WORDS = 6;   // two (X,Y,Z) endpoints
  localparam int unsigned ROW_W      = 4 * WORD_W;  // one matrix row
  localparam int unsigned POINT_W    = 3 * WORD_W;  // one (X,Y,Z) point

  localparam logic [ADDR_W-1:0] FB_BASE  = '0;        // frame buffer start
  localparam int unsigned       FB_WORDS = 4096;      // frame buffer size

  // Host opcodes, sent on the data bus ahead of a 16-bit address argument.
  typedef enum logic [WORD_W-1:0] {
    OP_LOAD_MATRIX = 16'h0001,
    OP_DRAW_LINE   = 16'h0002
  } opcode_e;

endpackage
