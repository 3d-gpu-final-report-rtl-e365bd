// tb_screen_buffer: strobes screen coordinates into the screen buffer and
// checks that the first of each group of four lands in x0, then x1, y0,
// y1, that values keep shifting along the chain, that nothing moves without
// a strobe, and reset.
module tb_screen_buffer;
  import gpu_pkg::*;
  logic clk = 0, rst_n = 0, strb = 0;
  logic [7:0] sc = 0;
  logic [7:0] x0, y0, x1, y1;
  int checks = 0, failures = 0;
  logic [7:0] ref_q [$];

  screen_buffer dut (.clk, .rst_n, .strb_screen(strb), .screen_cor(sc), .x0, .y0, .x1, .y1);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic push(input logic [7:0] v);
    @(negedge clk); sc = v; strb = 1;
    @(negedge clk); strb = 0;
    ref_q.push_back(v);
    if (ref_q.size() > 4) void'(ref_q.pop_front());
  endtask

  task automatic check(input string tag);
    checks++;
    if ({x0, x1, y0, y1} !== {ref_q[0], ref_q[1], ref_q[2], ref_q[3]}) begin
      failures++;
      $display("FAIL %s: x0=%h x1=%h y0=%h y1=%h exp %h %h %h %h", tag, x0, x1, y0, y1,
               ref_q[0], ref_q[1], ref_q[2], ref_q[3]);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    checks++; if ({x0, x1, y0, y1} !== 0) begin failures++; $display("FAIL reset"); end
    // the sequence of the buffer waveform: 04 03 02 01 then FF FE FD FC
    push(8'h04); push(8'h03); push(8'h02); push(8'h01);
    check("first four");
    checks++; if (x0 !== 8'h04 || y1 !== 8'h01) begin failures++; $display("FAIL order"); end
    push(8'hFF); check("shift 1");
    push(8'hFE); check("shift 2");
    push(8'hFD); check("shift 3");
    push(8'hFC); check("shift 4");
    for (int i = 0; i < 20; i++) begin push(8'($urandom)); check("random"); end
    @(negedge clk); sc = 8'hAA; repeat (3) @(negedge clk);
    check("hold");
    rst_n = 0; #1; rst_n = 1;
    checks++; if ({x0, x1, y0, y1} !== 0) begin failures++; $display("FAIL reset 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
