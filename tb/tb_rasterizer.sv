// tb_rasterizer: draws the worked line (100,100) -> (95,110), the eight
// slope/direction/sign cases, the full-screen diagonal (0,0) -> (255,255),
// degenerate lines and random lines. Every strobed pixel (word address and
// bit) is compared in order with an independent Bresenham reference; the
// pixel period must be exactly PIXEL_CYCLES, the first strobe must come two
// edges after init_rast, and rast_done must follow the last pixel.
module tb_rasterizer;
  import gpu_pkg::*;
  localparam int unsigned PIX = 5;
  logic clk = 0, rst_n = 0, init = 0;
  logic [7:0] x0, y0, x1, y1;
  logic [15:0] addr;
  logic [3:0] index;
  logic strb, done, steep;
  int checks = 0, failures = 0;
  int n_steep = 0, n_shallow = 0;

  rasterizer #(.PIXEL_CYCLES(PIX)) dut (
    .clk, .rst_n, .init_rast(init), .x0, .y0, .x1, .y1,
    .rast_addr(addr), .rast_index(index), .rast_strb(strb), .rast_done(done), .steep);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  typedef struct { int x; int y; } pix_t;

  // Reference Bresenham: e starts at 0, +2*minor per step, step minor when e > 0.
  function automatic void ref_line(input int ax, ay, bx, by, ref pix_t q[$]);
    int dxa, dya, sx, sy, e, x, y, n;
    bit st;
    q.delete();
    dxa = (bx > ax) ? bx - ax : ax - bx;
    dya = (by > ay) ? by - ay : ay - by;
    sx = (bx >= ax) ? 1 : -1;
    sy = (by >= ay) ? 1 : -1;
    st = dya > dxa;
    x = ax; y = ay; e = 0;
    q.push_back('{x, y});
    n = st ? dya : dxa;
    for (int i = 0; i < n; i++) begin
      if (!st) begin
        x += sx; e += 2 * dya;
        if (e > 0) begin e -= 2 * dxa; y += sy; end
      end else begin
        y += sy; e += 2 * dxa;
        if (e > 0) begin e -= 2 * dya; x += sx; end
      end
      q.push_back('{x, y});
    end
  endfunction

  task automatic draw(input int ax, ay, bx, by, input string tag);
    pix_t q[$];
    int n, cyc, last, first;
    bit bad;
    ref_line(ax, ay, bx, by, q);
    @(negedge clk);
    x0 = 8'(ax); y0 = 8'(ay); x1 = 8'(bx); y1 = 8'(by); init = 1;
    @(negedge clk); init = 0;
    n = 0; cyc = 0; last = -1; first = -1; bad = 0;
    while (!done && cyc < 3000) begin
      if (strb) begin
        if (first < 0) first = cyc;
        if (last >= 0 && cyc - last != int'(PIX)) bad = 1;
        last = cyc;
        if (n < q.size()) begin
          checks++;
          if (addr !== 16'(q[n].y * 16 + q[n].x / 16) || index !== 4'(q[n].x % 16)) begin
            failures++;
            $display("FAIL %s pixel %0d got addr %0d idx %0d exp (%0d,%0d)", tag, n, addr, index, q[n].x, q[n].y);
          end
        end
        n++;
      end
      @(negedge clk); cyc++;
    end
    checks++;
    if (n != q.size()) begin failures++; $display("FAIL %s: %0d pixels, expected %0d", tag, n, q.size()); end
    checks++;
    if (bad) begin failures++; $display("FAIL %s: pixel period not %0d", tag, PIX); end
    checks++;
    if (first != 2) begin failures++; $display("FAIL %s: first strobe at %0d", tag, first); end
    checks++;
    if (!done || cyc - last != int'(PIX) - 2) begin
      failures++; $display("FAIL %s: done at %0d, last strobe %0d", tag, cyc, last);
    end
    if (steep) n_steep++; else n_shallow++;
  endtask

  initial begin
    x0 = 0; y0 = 0; x1 = 0; y1 = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // worked case: word addresses and bits from the rasterizer waveform
    begin
      int exp_addr [11] = '{1606, 1622, 1638, 1654, 1670, 1686, 1702, 1718, 1734, 1749, 1765};
      int exp_idx  [11] = '{4, 3, 3, 2, 2, 1, 1, 0, 0, 15, 15};
      int k = 0;
      fork
        draw(100, 100, 95, 110, "worked line");
        begin
          while (k < 11) begin
            @(posedge clk);
            if (strb) begin
              checks++;
              // the error term alternates 256, 246, 256, ... on this line
              checks++;
              if (dut.err != ((k % 2 == 0) ? 12'sd256 : 12'sd246)) begin
                failures++; $display("FAIL worked line err at point %0d: %0d", k, dut.err);
              end
              if (addr != 16'(exp_addr[k]) || index != 4'(exp_idx[k])) begin
                failures++; $display("FAIL worked line point %0d: %0d/%0d", k, addr, index);
              end
              k++;
            end
          end
        end
      join
    end
    // eight slope magnitude / direction / sign combinations around (128,128)
    draw(128, 128, 200, 150, "shallow right up");
    draw(128, 128, 200, 100, "shallow right down");
    draw(128, 128, 50, 150, "shallow left up");
    draw(128, 128, 50, 100, "shallow left down");
    draw(128, 128, 150, 220, "steep right up");
    draw(128, 128, 150, 20, "steep right down");
    draw(128, 128, 100, 220, "steep left up");
    draw(128, 128, 100, 20, "steep left down");
    draw(0, 0, 255, 255, "diagonal");
    draw(255, 0, 0, 1, "long shallow");
    draw(7, 7, 7, 7, "single point");
    draw(3, 9, 3, 200, "vertical");
    draw(250, 40, 2, 40, "horizontal");
    for (int i = 0; i < 60; i++)
      draw($urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255), $urandom_range(0, 255), "random");
    checks++;
    if (n_steep == 0 || n_shallow == 0) begin failures++; $display("FAIL steep flag never/always set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
