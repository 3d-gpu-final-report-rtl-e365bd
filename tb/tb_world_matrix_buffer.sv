// tb_world_matrix_buffer: shifts 16 words into the matrix buffer and checks
// that each row_sel presents the right four words in order; then shifts
// further words to check the shift direction, checks that nothing moves
// without a strobe, and checks reset.
module tb_world_matrix_buffer;
  import gpu_pkg::*;
  logic clk = 0, rst_n = 0, strb = 0;
  logic [15:0] d = 0;
  logic [1:0] row_sel = 0;
  logic [63:0] row;
  int checks = 0, failures = 0;
  logic [15:0] ref_q [$];

  world_matrix_buffer dut (.clk, .rst_n, .strb_matrix(strb), .databus_out(d), .row_sel, .row);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic push(input logic [15:0] v);
    @(negedge clk); d = v; strb = 1;
    @(negedge clk); strb = 0;
    ref_q.push_back(v);
    if (ref_q.size() > 16) void'(ref_q.pop_front());
  endtask

  task automatic check_rows(input string tag);
    for (int r = 0; r < 4; r++) begin
      logic [63:0] exp;
      row_sel = 2'(r); #1;
      exp = {ref_q[4*r], ref_q[4*r+1], ref_q[4*r+2], ref_q[4*r+3]};
      checks++;
      if (row !== exp) begin
        failures++; $display("FAIL %s row %0d: got %h exp %h", tag, r, row, exp);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    row_sel = 0; #1; checks++; if (row !== 0) begin failures++; $display("FAIL reset"); end
    // the sequence of the buffer waveform: 000F down to 0000
    for (int i = 15; i >= 0; i--) push(16'(i));
    check_rows("descending");
    checks++; row_sel = 0; #1;
    if (row !== 64'h000F000E000D000C) begin failures++; $display("FAIL row0 %h", row); end
    checks++; row_sel = 3; #1;
    if (row !== 64'h0003000200010000) begin failures++; $display("FAIL row3 %h", row); end
    for (int k = 0; k < 3; k++) begin
      for (int i = 0; i < 16; i++) push(16'($urandom));
      check_rows("random");
    end
    push(16'hBEEF); push(16'h1234);
    check_rows("partial shift");
    // hold without strobe
    @(negedge clk); d = 16'hFFFF; repeat (5) @(negedge clk);
    check_rows("hold");
    rst_n = 0; #1; rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      row_sel = 2'(r); #1; checks++;
      if (row !== 0) begin failures++; $display("FAIL reset row %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
