// gpu_controller: command decoder, RAM master and sequencer of the GPU.
//
// The host writes a command as two 16-bit words on the shared data bus,
// each marked valid by strb_in: an opcode (0001 load matrix, 0002 draw
// line) and then the RAM address of its operand. The controller then waits
// until the host releases the RAM (ram_in_use low) and:
//   load matrix: reads 16 consecutive words and shifts each into the world
//                matrix buffer (strb_matrix).
//   draw line:   reads 6 consecutive words into the coordinate buffer
//                (strb_cor), starts the matrix math (init_matrix), waits for
//                math_done, starts the rasterizer (init_rast) and, for every
//                pixel it strobes out, performs a read-modify-write of the
//                frame-buffer word: read it, set bit rast_index, write it back.
// Finally it pulses gpu_done and waits for the next opcode. Unknown opcodes
// are dropped after their address word.
//
// Datapath (as in the controller diagram): a 16-bit address register fed by
// the data bus or rast_addr and incremented per word fetched, a 16-bit data
// register fed by the data bus with a "set bit rast_index" path, a 16-bit
// opcode register, a word counter and the state register.
//
// RAM cycle: a read holds the address with re_out high for two cycles (one
// access cycle plus a wait state, so a RAM a little slower than 10 ns still
// works) and samples the bus at the end of the second; the word is passed
// to a buffer in the third cycle. A write holds address, data and we_out for
// two cycles. addr_oe/data_oe tell the pads when to drive the shared buses;
// they are low whenever the GPU does not own the RAM. A pixel write-back
// takes five cycles from the rasterizer's strobe (latch, two read, two
// write), which is the rasterizer's pixel period, so no strobe is missed.
// strb_in and ram_in_use come from a slower host clock domain and pass
// through two-flop synchronisers; strb_in is edge detected.
// The RAM is claimed once per command, after ram_in_use is seen low, and
// held until the command completes.
//
// From the original design: the command flow, the opcodes, the registers
// listed above, the wait state and the 5-cycle write-back. This design's
// own choices: the synchronisers, the exact cycle split, one RAM claim per
// command, gpu_done as a pulse and dropping unknown opcodes.
module gpu_controller
  import gpu_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // host
  input  logic               strb_in,
  input  logic               ram_in_use,
  output logic               gpu_done,
  // RAM
  input  logic [WORD_W-1:0]  databus_in,
  output logic [WORD_W-1:0]  databus_drv,
  output logic               data_oe,
  output logic [ADDR_W-1:0]  addr_out,
  output logic               addr_oe,
  output logic               re_out,
  output logic               we_out,
  // buffers
  output logic [WORD_W-1:0]  databus_out,
  output logic               strb_matrix,
  output logic               strb_cor,
  // matrix math
  output logic               init_matrix,
  input  logic               math_done,
  // rasterizer
  output logic               init_rast,
  input  logic               rast_strb,
  input  logic               rast_done,
  input  logic [ADDR_W-1:0]  rast_addr,
  input  logic [INDEX_W-1:0] rast_index
);

  typedef enum logic [4:0] {
    C_OPCODE, C_ADDR, C_WAITRAM, C_RD_A, C_RD_B, C_LOAD,
    C_MATH, C_MATH_WAIT, C_RAST, C_RAST_WAIT,
    C_WB_RA, C_WB_RB, C_WB_WA, C_WB_WB, C_FINISH
  } cstate_e;

  cstate_e            state;
  logic [WORD_W-1:0]  opcode_reg;
  logic [ADDR_W-1:0]  addr_reg;
  logic [WORD_W-1:0]  data_reg;
  logic [INDEX_W-1:0] index_reg;
  logic [3:0]         count;
  logic               done_seen;
  logic [1:0]         strb_sync, riu_sync;
  logic               strb_q;
  logic               strb_rise, ram_busy, is_matrix;
  logic [3:0]         last_word;

  assign strb_rise = strb_sync[1] & ~strb_q;
  assign ram_busy  = riu_sync[1];
  assign is_matrix = (opcode_reg == OP_LOAD_MATRIX);
  assign last_word = is_matrix ? 4'(MAT_WORDS - 1) : 4'(LINE_WORDS - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strb_sync <= '0;
      riu_sync  <= 2'b11;
      strb_q    <= 1'b0;
    end else begin
      strb_sync <= {strb_sync[0], strb_in};
      riu_sync  <= {riu_sync[0], ram_in_use};
      strb_q    <= strb_sync[1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= C_OPCODE;
      opcode_reg <= '0;
      addr_reg   <= '0;
      data_reg   <= '0;
      index_reg  <= '0;
      count      <= '0;
      done_seen  <= 1'b0;
    end else begin
      if (rast_done) done_seen <= 1'b1;
      unique case (state)
        C_OPCODE: if (strb_rise) begin
          opcode_reg <= databus_in;
          state      <= C_ADDR;
        end
        C_ADDR: if (strb_rise) begin
          addr_reg <= databus_in;
          count    <= '0;
          state    <= (opcode_reg == OP_LOAD_MATRIX || opcode_reg == OP_DRAW_LINE)
                      ? C_WAITRAM : C_OPCODE;
        end
        C_WAITRAM: if (!ram_busy) state <= C_RD_A;
        C_RD_A:    state <= C_RD_B;
        C_RD_B: begin
          data_reg <= databus_in;
          state    <= C_LOAD;
        end
        C_LOAD: begin
          addr_reg <= addr_reg + 1'b1;
          count    <= count + 1'b1;
          if (count == last_word) state <= is_matrix ? C_FINISH : C_MATH;
          else                    state <= C_RD_A;
        end
        C_MATH:      state <= C_MATH_WAIT;
        C_MATH_WAIT: if (math_done) state <= C_RAST;
        C_RAST: begin
          done_seen <= 1'b0;
          state     <= C_RAST_WAIT;
        end
        C_RAST_WAIT: begin
          if (rast_strb) begin
            addr_reg  <= rast_addr;
            index_reg <= rast_index;
            state     <= C_WB_RA;
          end else if (done_seen) begin
            state <= C_FINISH;
          end
        end
        C_WB_RA: state <= C_WB_RB;
        C_WB_RB: begin
          data_reg <= databus_in | (WORD_W'(1) << index_reg);
          state    <= C_WB_WA;
        end
        C_WB_WA:  state <= C_WB_WB;
        C_WB_WB:  state <= C_RAST_WAIT;
        C_FINISH: state <= C_OPCODE;
        default:  state <= C_OPCODE;
      endcase
    end
  end

  always_comb begin
    addr_out    = addr_reg;
    databus_drv = data_reg;
    databus_out = data_reg;
    re_out      = state inside {C_RD_A, C_RD_B, C_WB_RA, C_WB_RB};
    we_out      = state inside {C_WB_WA, C_WB_WB};
    addr_oe     = re_out | we_out;
    data_oe     = we_out;
    strb_matrix = (state == C_LOAD) &&  is_matrix;
    strb_cor    = (state == C_LOAD) && !is_matrix;
    init_matrix = (state == C_MATH);
    init_rast   = (state == C_RAST);
    gpu_done    = (state == C_FINISH);
  end

  // The rasterizer has no stall input: each pixel strobe must find the
  // controller ready for a new write-back.
  a_strb_paced: assert property (@(posedge clk) disable iff (!rst_n)
    rast_strb |-> (state == C_RAST_WAIT));
  a_done_after_math: assert property (@(posedge clk) disable iff (!rst_n)
    math_done |-> (state == C_MATH_WAIT));

endmodule
