// tb_matrix_math: plays the world matrix and coordinate buffers for the
// matrix math (row/point follow row_sel/sel) and checks the four screen
// coordinates strobed out, their order x0, x1, y0, y1, the cycle count
// from init_math to math_done, and that row_sel/sel are stable while each
// result settles. Cases: the worked examples (1 with the identity row gives
// 0x81, -127 with the identity gives 0x01), identity, scale, translation,
// negative values and random matrices.
module tb_matrix_math;
  import gpu_pkg::*;
  localparam int unsigned SETTLE = 2;
  logic clk = 0, rst_n = 0, init = 0;
  logic [63:0] row;
  logic [47:0] point;
  logic [1:0] row_sel;
  logic sel, strb, done;
  logic [7:0] sc;
  int checks = 0, failures = 0;

  logic [15:0] m [4][4];
  logic [15:0] p [2][3];
  logic [7:0] got [$];

  matrix_math #(.SETTLE_CYCLES(SETTLE)) dut (
    .clk, .rst_n, .init_math(init), .row, .point, .row_sel, .sel,
    .screen_cor(sc), .strb_screen(strb), .math_done(done));

  always_comb begin
    row   = {m[row_sel][0], m[row_sel][1], m[row_sel][2], m[row_sel][3]};
    point = {p[sel][0], p[sel][1], p[sel][2]};
  end

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Reference: integer part of (row . (X,Y,Z,1)) in the 8.8 format, + 128.
  function automatic logic [7:0] ref_screen(input int r, input int s);
    longint acc;
    acc = longint'($signed(m[r][0])) * longint'($signed(p[s][0]))
        + longint'($signed(m[r][1])) * longint'($signed(p[s][1]))
        + longint'($signed(m[r][2])) * longint'($signed(p[s][2]))
        + longint'($signed(m[r][3])) * 256;
    acc = acc >>> 16;           // floor division by 65536
    return 8'(acc + 128);
  endfunction

  // record strobed values and check inputs are held across each settle window
  always @(posedge clk) if (strb) got.push_back(sc);

  task automatic run(input string tag);
    int cyc;
    logic [7:0] exp [4];
    got.delete();
    @(negedge clk); init = 1;
    @(negedge clk); init = 0;
    cyc = 1;
    while (!done && cyc < 200) begin
      @(negedge clk); cyc++;
    end
    // done is high now: 4*(SETTLE+1)+1 edges after the edge that sampled init
    checks++;
    if (cyc != 4 * (SETTLE + 1) + 1) begin
      failures++; $display("FAIL %s latency %0d", tag, cyc);
    end
    exp[0] = ref_screen(0, 0); exp[1] = ref_screen(0, 1);
    exp[2] = ref_screen(1, 0); exp[3] = ref_screen(1, 1);
    checks++;
    if (got.size() != 4) begin
      failures++; $display("FAIL %s got %0d strobes", tag, got.size());
    end else begin
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (got[i] !== exp[i]) begin
          failures++; $display("FAIL %s out %0d got %h exp %h", tag, i, got[i], exp[i]);
        end
      end
    end
    @(negedge clk);
  endtask

  task automatic identity();
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m[r][c] = (r == c) ? 16'h0100 : 16'h0000;
  endtask

  // stability: row_sel/sel must not change between settle start and strobe
  logic [2:0] last_sel;
  int stable_cnt;
  always @(posedge clk) begin
    if (rst_n) begin
      if ({row_sel, sel} != last_sel) stable_cnt <= 1; else stable_cnt <= stable_cnt + 1;
      last_sel <= {row_sel, sel};
      if (strb) begin
        checks++;
        if (stable_cnt < int'(SETTLE)) begin
          failures++; $display("FAIL inputs held only %0d cycles before strobe", stable_cnt);
        end
      end
    end
  end

  initial begin
    identity();
    for (int s = 0; s < 2; s++) for (int k = 0; k < 3; k++) p[s][k] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    // worked example: point (1,0,0) with the identity row gives 129 = 0x81
    p[0][0] = 16'h0100; p[1][0] = 16'h8100;  // second point x = -127
    p[0][1] = 16'h0000; p[1][1] = 16'h0000;
    run("paper examples");
    checks++; if (got.size() == 4 && got[0] !== 8'h81) begin failures++; $display("FAIL +1 example"); end
    checks++; if (got.size() == 4 && got[1] !== 8'h01) begin failures++; $display("FAIL -127 example"); end
    // the overall waveform: x = 30 -> 0x9E, x = -30 -> 0x62
    p[0] = '{16'h1E00, 16'hE200, 16'h1E00}; p[1] = '{16'hE200, 16'h1E00, 16'hE200};
    run("cube corner");
    checks++; if (got.size() == 4 && {got[0], got[1], got[2], got[3]} !== 32'h9E_62_62_9E) begin
      failures++; $display("FAIL cube corner values");
    end
    // scale 2, translate (1,2,3)
    identity(); m[0][0] = 16'h0200; m[1][1] = 16'h0200; m[2][2] = 16'h0200;
    m[0][3] = 16'h0100; m[1][3] = 16'h0200; m[2][3] = 16'h0300;
    p[0] = '{16'h0100, 16'hFF00, 16'h0080}; p[1] = '{16'hF080, 16'h0A40, 16'h1000};
    run("scale translate");
    for (int t = 0; t < 40; t++) begin
      for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) m[r][c] = 16'($urandom_range(0, 1023)) - 16'd512;
      for (int s = 0; s < 2; s++) for (int k = 0; k < 3; k++) p[s][k] = 16'($urandom_range(0, 32767)) - 16'd16384;
      run("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
