// tb_gpu_top: end-to-end test of the whole GPU at its default parameters.
//
// A host model fills an SRAM model with three world matrices and 25 lines
// and sends the command stream: load matrix, draw 12 cube edges (scaled and
// translated cube), load matrix, draw 12 cube edges (rotated, scaled,
// translated cube), load the identity, draw the full-screen diagonal from
// (-128,-128) to (127,127). The first command is sent while the host still
// holds the RAM, and an unknown opcode is sent in between. The resulting
// 256x256 frame buffer (RAM words 0..4095) is compared word by word with
// one computed by a reference model: fixed-point transform, +128 screen
// offset, Bresenham rasterization. Each mechanism of the design must occur
// at least once: waiting for the RAM, matrix load, line draw, steep and
// shallow lines, both step directions, a read-modify-write that merges into
// a word already holding pixels, and a dropped unknown opcode.
module tb_gpu_top;
  import gpu_pkg::*;
  logic clk = 0, rst_n = 0;
  logic strb_in = 0, ram_in_use = 0, gpu_done;
  logic [15:0] host_bus = 0, databus_in, databus_o, addr_out, ram_dout;
  logic databus_oe, addr_oe, re_out, we_out;
  int checks = 0, failures = 0;

  gpu_top dut (.clk, .rst_n, .strb_in, .ram_in_use, .gpu_done, .databus_in,
               .databus_o, .databus_oe, .addr_out, .addr_oe, .re_out, .we_out);
  sram_model ram (.clk, .addr(addr_out), .re(re_out), .we(we_out), .din(databus_o), .dout(ram_dout));
  assign databus_in = re_out ? ram_dout : host_bus;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_access = 0, n_done = 0, n_merge = 0, n_pixels = 0, n_steep = 0, n_shallow = 0;
  logic we_q = 0;
  int cyc = 0, last_strb = -1;
  int n_ram_wait = 0, n_matrix = 0, n_line = 0, n_dropped = 0, n_xdec = 0, n_ydec = 0;
  always @(posedge clk) if (rst_n) begin
    if (addr_oe) n_access++;
    if (gpu_done) n_done++;
    if (we_out && !we_q && ram.peek(int'(addr_out)) != 0) n_merge++;
    we_q <= we_out;
    cyc++;
    if (dut.init_rast) last_strb = -1;
    if (dut.u_rasterizer.rast_strb) begin
      // one pixel rasterized and written back every 5 cycles
      if (last_strb >= 0) begin
        checks++;
        if (cyc - last_strb != 5) begin failures++; $display("FAIL pixel period %0d", cyc - last_strb); end
      end
      last_strb = cyc;
      n_pixels++;
      if (dut.u_rasterizer.steep) n_steep++; else n_shallow++;
      if (!dut.u_rasterizer.ix) n_xdec++;
      if (!dut.u_rasterizer.iy) n_ydec++;
    end
    if (ram_in_use && addr_oe) begin checks++; failures++; $display("FAIL GPU used RAM held by host"); end
  end

  // ---------------- reference model ----------------
  logic [15:0] exp_fb [4096];
  logic [15:0] cur_m [16];

  function automatic int ref_screen(input int r, input logic [15:0] px, py, pz);
    longint acc;
    acc = longint'($signed(cur_m[4*r]))   * longint'($signed(px))
        + longint'($signed(cur_m[4*r+1])) * longint'($signed(py))
        + longint'($signed(cur_m[4*r+2])) * longint'($signed(pz))
        + longint'($signed(cur_m[4*r+3])) * 256;
    acc = acc >>> 16;
    return int'((acc + 128) & 255);
  endfunction

  function automatic void plot(input int x, input int y);
    exp_fb[y * 16 + x / 16][x % 16] = 1'b1;
  endfunction

  function automatic void ref_line(input int ax, ay, bx, by);
    int dxa, dya, sx, sy, e, x, y, n;
    bit st;
    dxa = (bx > ax) ? bx - ax : ax - bx;
    dya = (by > ay) ? by - ay : ay - by;
    sx = (bx >= ax) ? 1 : -1;
    sy = (by >= ay) ? 1 : -1;
    st = dya > dxa;
    x = ax; y = ay; e = 0;
    plot(x, y);
    n = st ? dya : dxa;
    for (int i = 0; i < n; i++) begin
      if (!st) begin
        x += sx; e += 2 * dya;
        if (e > 0) begin e -= 2 * dxa; y += sy; end
      end else begin
        y += sy; e += 2 * dxa;
        if (e > 0) begin e -= 2 * dya; x += sx; end
      end
      plot(x, y);
    end
  endfunction

  // ---------------- host ----------------
  task automatic host_word(input logic [15:0] w);
    @(negedge clk); host_bus = w; strb_in = 1;
    repeat (3) @(negedge clk);
    strb_in = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic wait_done(input string tag);
    int t = 0;
    int d0 = n_done;
    while (n_done == d0 && t < 20000) begin @(negedge clk); t++; end
    checks++;
    if (n_done == d0) begin failures++; $display("FAIL %s: no gpu_done", tag); end
  endtask

  task automatic put_matrix(input int base, input real m [16]);
    for (int i = 0; i < 16; i++) ram.load(base + i, 16'(int'($floor(m[i] * 256.0 + 0.5))));
  endtask

  task automatic cmd_matrix(input int base);
    host_word(OP_LOAD_MATRIX);
    host_word(16'(base));
    wait_done("load matrix");
    for (int i = 0; i < 16; i++) cur_m[i] = ram.peek(base + i);
    n_matrix++;
  endtask

  task automatic cmd_line(input int base);
    logic [15:0] w [6];
    for (int i = 0; i < 6; i++) w[i] = ram.peek(base + i);
    host_word(OP_DRAW_LINE);
    host_word(16'(base));
    wait_done("draw line");
    ref_line(ref_screen(0, w[0], w[1], w[2]), ref_screen(1, w[0], w[1], w[2]),
             ref_screen(0, w[3], w[4], w[5]), ref_screen(1, w[3], w[4], w[5]));
    n_line++;
  endtask

  // unit cube centred at the origin: 12 edges between corners (+-0.5)
  int edges [12][2] = '{'{0,1},'{1,3},'{3,2},'{2,0},'{4,5},'{5,7},'{7,6},'{6,4},'{0,4},'{1,5},'{2,6},'{3,7}};
  function automatic logic [15:0] corner(input int c, input int axis);
    return c[axis] ? 16'h0080 : 16'hFF80;
  endfunction

  initial begin
    real m1 [16], m2 [16], m3 [16];
    real a, b, s;
    int n_lines;
    for (int i = 0; i < 4096; i++) exp_fb[i] = '0;
    // matrix 1: scale 60, translate (-40, 30, 5)
    m1 = '{60.0, 0.0, 0.0, -40.0,  0.0, 60.0, 0.0, 30.0,  0.0, 0.0, 60.0, 5.0,  0.0, 0.0, 0.0, 1.0};
    // matrix 2: scale 80, rotate 30 degrees about z then 20 degrees about x, translate (40, -40, 0)
    a = 30.0 * 3.14159265 / 180.0; b = 20.0 * 3.14159265 / 180.0; s = 80.0;
    m2 = '{ s * $cos(a),             -s * $sin(a),              0.0,              40.0,
            s * $cos(b) * $sin(a),    s * $cos(b) * $cos(a),   -s * $sin(b),     -40.0,
            s * $sin(b) * $sin(a),    s * $sin(b) * $cos(a),    s * $cos(b),       0.0,
            0.0, 0.0, 0.0, 1.0};
    m3 = '{1.0, 0.0, 0.0, 0.0,  0.0, 1.0, 0.0, 0.0,  0.0, 0.0, 1.0, 0.0,  0.0, 0.0, 0.0, 1.0};
    put_matrix(5000, m1); put_matrix(5100, m2); put_matrix(5200, m3);
    n_lines = 0;
    foreach (edges[e]) begin
      for (int k = 0; k < 3; k++) begin
        ram.load(6000 + 6 * e + k,     corner(edges[e][0], k));
        ram.load(6000 + 6 * e + 3 + k, corner(edges[e][1], k));
      end
    end
    // diagonal across the whole screen: world (-128,-128,0) to (127,127,0)
    ram.load(6100, 16'h8000); ram.load(6101, 16'h8000); ram.load(6102, 16'h0000);
    ram.load(6103, 16'h7F00); ram.load(6104, 16'h7F00); ram.load(6105, 16'h0000);

    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) @(posedge clk);

    // the first command arrives while the host still holds the RAM
    ram_in_use = 1;
    host_word(OP_LOAD_MATRIX);
    host_word(16'd5000);
    repeat (50) @(negedge clk);
    checks++;
    if (n_access != 0) begin failures++; $display("FAIL GPU did not wait for the RAM"); end
    else n_ram_wait++;
    ram_in_use = 0;
    wait_done("first matrix");
    for (int i = 0; i < 16; i++) cur_m[i] = ram.peek(5000 + i);
    n_matrix++;
    for (int e = 0; e < 12; e++) cmd_line(6000 + 6 * e);

    // an unknown opcode is dropped: no RAM access, no completion
    begin
      int acc0, d0;
      acc0 = n_access; d0 = n_done;
      host_word(16'h00FF);
      host_word(16'd5000);
      repeat (40) @(negedge clk);
      checks++;
      if (n_access != acc0 || n_done != d0) begin failures++; $display("FAIL unknown opcode acted"); end
      else n_dropped++;
    end

    cmd_matrix(5100);
    for (int e = 0; e < 12; e++) cmd_line(6000 + 6 * e);
    cmd_matrix(5200);
    cmd_line(6100);

    // compare the whole frame buffer
    begin
      int bad = 0, lit = 0;
      for (int i = 0; i < 4096; i++) begin
        checks++;
        lit += $countones(exp_fb[i]);
        if (ram.peek(i) !== exp_fb[i]) begin
          failures++; bad++;
          if (bad <= 10) $display("FAIL fb word %0d got %h exp %h", i, ram.peek(i), exp_fb[i]);
        end
      end
      $display("frame buffer: %0d pixels lit, %0d pixel writes, %0d merged into non-empty words", lit, n_pixels, n_merge);
    end
    // the diagonal must have lit (0,0) and (255,255)
    checks++;
    if (ram.peek(0) != 16'h0001 && ram.peek(0)[0] !== 1'b1) begin failures++; $display("FAIL (0,0) not lit"); end
    checks++;
    if (ram.peek(4095)[15] !== 1'b1) begin failures++; $display("FAIL (255,255) not lit"); end

    $display("mechanisms: ram_wait=%0d matrix_loads=%0d lines=%0d steep_px=%0d shallow_px=%0d xdec_px=%0d ydec_px=%0d merges=%0d dropped=%0d",
             n_ram_wait, n_matrix, n_line, n_steep, n_shallow, n_xdec, n_ydec, n_merge, n_dropped);
    checks++; if (n_ram_wait == 0) begin failures++; $display("FAIL no RAM wait"); end
    checks++; if (n_matrix == 0)   begin failures++; $display("FAIL no matrix load"); end
    checks++; if (n_line == 0)     begin failures++; $display("FAIL no line"); end
    checks++; if (n_steep == 0)    begin failures++; $display("FAIL no steep line"); end
    checks++; if (n_shallow == 0)  begin failures++; $display("FAIL no shallow line"); end
    checks++; if (n_xdec == 0)     begin failures++; $display("FAIL no decrementing major/x step"); end
    checks++; if (n_ydec == 0)     begin failures++; $display("FAIL no decrementing minor/y step"); end
    checks++; if (n_merge == 0)    begin failures++; $display("FAIL no read-modify-write merge"); end
    checks++; if (n_dropped == 0)  begin failures++; $display("FAIL no dropped opcode"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
