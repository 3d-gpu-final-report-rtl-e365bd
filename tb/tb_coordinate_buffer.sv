// tb_coordinate_buffer: shifts line words X0,Y0,Z0,X1,Y1,Z1 into the
// coordinate buffer and checks both points on sel = 0 and sel = 1, the
// shift direction over several loads, holding without a strobe, and reset.
module tb_coordinate_buffer;
  import gpu_pkg::*;
  logic clk = 0, rst_n = 0, strb = 0, sel = 0;
  logic [15:0] d = 0;
  logic [47:0] point;
  int checks = 0, failures = 0;
  logic [15:0] ref_q [$];

  coordinate_buffer dut (.clk, .rst_n, .strb_cor(strb), .databus_out(d), .sel, .point);

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
    if (ref_q.size() > 6) void'(ref_q.pop_front());
  endtask

  task automatic check_points(input string tag);
    for (int s = 0; s < 2; s++) begin
      logic [47:0] exp;
      sel = s[0]; #1;
      exp = {ref_q[3*s], ref_q[3*s+1], ref_q[3*s+2]};
      checks++;
      if (point !== exp) begin
        failures++; $display("FAIL %s sel %0d: got %h exp %h", tag, s, point, exp);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    // the sequence of the buffer waveform: 0005 down to 0000
    for (int i = 5; i >= 0; i--) push(16'(i));
    check_points("descending");
    sel = 0; #1; checks++;
    if (point !== 48'h000500040003) begin failures++; $display("FAIL p0 %h", point); end
    sel = 1; #1; checks++;
    if (point !== 48'h000200010000) begin failures++; $display("FAIL p1 %h", point); end
    for (int k = 0; k < 5; k++) begin
      for (int i = 0; i < 6; i++) push(16'($urandom));
      check_points("random");
    end
    push(16'hFFFF);
    check_points("one more");
    @(negedge clk); d = 16'h5555; repeat (4) @(negedge clk);
    check_points("hold");
    rst_n = 0; #1; rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      sel = s[0]; #1; checks++;
      if (point !== 0) begin failures++; $display("FAIL reset"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
