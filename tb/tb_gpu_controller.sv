// tb_gpu_controller: runs the controller against an SRAM model, a host that
// sends opcode/address words with strb_in, and simple stand-ins for the
// matrix math (math_done a fixed time after init_matrix) and the rasterizer
// (a list of pixels strobed every 5 cycles, then rast_done). Checks: the
// words and order passed to the matrix and coordinate buffers, one word per
// 3 cycles, no RAM access while ram_in_use is high, the start handshakes,
// the read-modify-write of frame-buffer words (bits set, other bits kept),
// gpu_done, and that an unknown opcode is dropped.
module tb_gpu_controller;
  import gpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic strb_in = 0, ram_in_use = 0, gpu_done;
  logic [15:0] host_bus = 0, databus_in, databus_drv, addr_out, databus_out, ram_dout;
  logic data_oe, addr_oe, re_out, we_out, strb_matrix, strb_cor;
  logic init_matrix, math_done = 0, init_rast, rast_strb = 0, rast_done = 0;
  logic [15:0] rast_addr = 0;
  logic [3:0] rast_index = 0;
  int checks = 0, failures = 0;
  int cycle = 0;

  gpu_controller dut (.*);
  sram_model ram (.clk, .addr(addr_out), .re(re_out), .we(we_out), .din(databus_drv), .dout(ram_dout));

  // shared bus: the RAM drives it while the GPU reads, otherwise the host
  assign databus_in = re_out ? ram_dout : host_bus;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---- monitors ----
  logic [15:0] mat_words [$], cor_words [$];
  int strb_cycles [$];
  int n_init_matrix = 0, n_init_rast = 0, n_done = 0, n_access = 0;
  always @(posedge clk) begin
    if (strb_matrix) begin mat_words.push_back(databus_out); strb_cycles.push_back(cycle); end
    if (strb_cor)    begin cor_words.push_back(databus_out); strb_cycles.push_back(cycle); end
    if (init_matrix) n_init_matrix++;
    if (init_rast)   n_init_rast++;
    if (gpu_done)    n_done++;
    if (addr_oe && rst_n) n_access++;
    if (ram_in_use && addr_oe) begin
      checks++; failures++; $display("FAIL RAM accessed while host uses it");
    end
    if (data_oe && !we_out) begin checks++; failures++; $display("FAIL data driven without we"); end
  end

  // ---- RAM cycle lengths: every read and every write lasts 2 clocks ----
  int re_run = 0, we_run = 0, n_reads = 0, n_writes = 0;
  always @(posedge clk) if (rst_n) begin
    if (re_out) re_run++;
    else if (re_run != 0) begin
      checks++; n_reads++;
      if (re_run != 2) begin failures++; $display("FAIL read cycle of %0d clocks", re_run); end
      re_run = 0;
    end
    if (we_out) we_run++;
    else if (we_run != 0) begin
      checks++; n_writes++;
      if (we_run != 2) begin failures++; $display("FAIL write cycle of %0d clocks", we_run); end
      we_run = 0;
    end
  end

  // ---- matrix math stand-in ----
  always @(posedge clk) begin
    if (init_matrix) begin
      repeat (12) @(posedge clk);
      math_done <= 1;
      @(posedge clk);
      math_done <= 0;
    end
  end

  // ---- rasterizer stand-in: pixels as (word, bit) ----
  int pix_addr [$], pix_idx [$];
  always @(posedge clk) begin
    if (init_rast) begin
      @(posedge clk); @(posedge clk);
      foreach (pix_addr[i]) begin
        rast_addr <= 16'(pix_addr[i]); rast_index <= 4'(pix_idx[i]); rast_strb <= 1;
        @(posedge clk);
        rast_strb <= 0;
        repeat (4) @(posedge clk);
      end
      rast_done <= 1;
      @(posedge clk);
      rast_done <= 0;
    end
  end

  task automatic host_word(input logic [15:0] w);
    @(negedge clk); host_bus = w; strb_in = 1;
    repeat (3) @(negedge clk);
    strb_in = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic wait_done(input string tag);
    int t = 0;
    int d0 = n_done;
    while (n_done == d0 && t < 5000) begin @(negedge clk); t++; end
    checks++;
    if (n_done == d0) begin failures++; $display("FAIL %s: no gpu_done", tag); end
  endtask

  task automatic check_spacing(input string tag);
    for (int i = 1; i < strb_cycles.size(); i++) begin
      checks++;
      if (strb_cycles[i] - strb_cycles[i-1] != 3) begin
        failures++; $display("FAIL %s: word spacing %0d", tag, strb_cycles[i] - strb_cycles[i-1]);
      end
    end
    strb_cycles.delete();
  endtask

  initial begin
    logic [15:0] fb_before [4];
    for (int i = 0; i < 16; i++) ram.load(5000 + i, 16'h1000 + 16'(i * 7));
    for (int i = 0; i < 6; i++)  ram.load(5016 + i, 16'hA000 + 16'(i));
    ram.load(100, 16'h8001);  // a frame-buffer word with pixels already on
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);

    // 1) load matrix, with the host holding the RAM for a while first
    ram_in_use = 1;
    host_word(16'h0001);
    host_word(16'd5000);
    repeat (30) @(negedge clk);
    checks++;
    if (n_access != 0) begin failures++; $display("FAIL accessed RAM before release"); end
    ram_in_use = 0;
    wait_done("load matrix");
    checks++;
    if (mat_words.size() != 16) begin failures++; $display("FAIL %0d matrix words", mat_words.size()); end
    else for (int i = 0; i < 16; i++) begin
      checks++;
      if (mat_words[i] !== 16'h1000 + 16'(i * 7)) begin failures++; $display("FAIL matrix word %0d", i); end
    end
    check_spacing("matrix");
    checks++;
    if (n_init_matrix != 0 || cor_words.size() != 0) begin failures++; $display("FAIL load matrix started math"); end

    // 2) unknown opcode is dropped with its address
    n_access = 0;
    host_word(16'h0007);
    host_word(16'd5016);
    repeat (40) @(negedge clk);
    checks++;
    if (n_access != 0 || n_done != 1) begin failures++; $display("FAIL unknown opcode acted"); end

    // 3) draw line: pixels in word 100 (twice), word 4095, word 0
    pix_addr = '{100, 100, 4095, 0};
    pix_idx  = '{3, 14, 15, 0};
    host_word(16'h0002);
    host_word(16'd5016);
    wait_done("draw line");
    checks++;
    if (cor_words.size() != 6) begin failures++; $display("FAIL %0d line words", cor_words.size()); end
    else for (int i = 0; i < 6; i++) begin
      checks++;
      if (cor_words[i] !== 16'hA000 + 16'(i)) begin failures++; $display("FAIL line word %0d", i); end
    end
    check_spacing("line");
    checks++;
    if (n_init_matrix != 1 || n_init_rast != 1) begin
      failures++; $display("FAIL starts: math %0d rast %0d", n_init_matrix, n_init_rast);
    end
    checks++;
    if (ram.peek(100) !== 16'hC009) begin failures++; $display("FAIL word 100 = %h", ram.peek(100)); end
    checks++;
    if (ram.peek(4095) !== 16'h8000) begin failures++; $display("FAIL word 4095 = %h", ram.peek(4095)); end
    checks++;
    if (ram.peek(0) !== 16'h0001) begin failures++; $display("FAIL word 0 = %h", ram.peek(0)); end
    checks++;
    if (ram.peek(101) !== 16'h0000 || ram.peek(5016) !== 16'hA000) begin failures++; $display("FAIL stray write"); end
    checks++;
    if (n_done != 2) begin failures++; $display("FAIL gpu_done count %0d", n_done); end
    checks++;
    if (addr_oe || data_oe) begin failures++; $display("FAIL bus still driven when idle"); end

    checks++;
    if (n_reads != 16 + 6 + 4 || n_writes != 4) begin
      failures++; $display("FAIL %0d reads, %0d writes", n_reads, n_writes);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
