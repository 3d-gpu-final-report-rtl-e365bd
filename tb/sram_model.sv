// sram_model: behavioural model of the external 16-bit asynchronous SRAM
// shared by the host and the GPU (simulation only, not synthesizable
// intent). 64K x 16 words. Reads are combinational: dout shows the word at
// addr whenever re is high. A write stores din at addr on each rising clock
// edge while we is high. Testbenches preload and inspect the array through
// the load/peek tasks.
module sram_model (
  input  logic        clk,
  input  logic [15:0] addr,
  input  logic        re,
  input  logic        we,
  input  logic [15:0] din,
  output logic [15:0] dout
);
  logic [15:0] mem [65536];

  initial for (int i = 0; i < 65536; i++) mem[i] = '0;

  assign dout = re ? mem[addr] : 16'h0000;

  always @(posedge clk) if (we) mem[addr] <= din;

  task automatic load(input int a, input logic [15:0] v);
    mem[a] = v;
  endtask

  function automatic logic [15:0] peek(input int a);
    return mem[a];
  endfunction
endmodule
