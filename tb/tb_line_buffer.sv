// tb_line_buffer: self-checking test of the 3x3 rotating-window buffer.
// Streams random feature maps in raster order, with random idle cycles
// between pushes, and compares every window the block emits with the
// window cut directly out of the map. Checks the window count, the order of
// the windows, the last-window flag, that each window appears exactly one
// cycle after the push that completes it, and that clear restarts a map.
module tb_line_buffer;
  localparam int unsigned DW = 8;
  localparam int unsigned H  = 49;
  localparam int unsigned W  = 10;
  localparam int unsigned NWIN = (H - 2) * (W - 2);

  logic clk = 1'b0, rst_n = 1'b0;
  logic clear, push, win_valid, win_last;
  logic signed [DW-1:0] pix;
  logic signed [DW-1:0] win [3][3];
  logic signed [DW-1:0] img [H][W];
  int checks = 0, failures = 0;
  int n_win, n_push, exp_r, exp_c;
  bit pushed_last_cycle_complete;
  bit sb_on = 1'b1;   // scoreboard enabled

  line_buffer #(.DATA_W(DW), .IMG_H(H), .IMG_W(W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Scoreboard: windows must come in raster order of their bottom-right pixel.
  always @(posedge clk) begin
    if (rst_n && win_valid && sb_on) begin
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          check($sformatf("win(%0d,%0d)[%0d][%0d]", exp_r, exp_c, i, j),
                int'(win[i][j]), int'(img[exp_r - 2 + i][exp_c - 2 + j]));
      check("window follows its completing push", int'(pushed_last_cycle_complete), 1);
      check("last flag", int'(win_last), int'(exp_r == H - 1 && exp_c == W - 1));
      n_win++;
      if (exp_c == W - 1) begin exp_c = 2; exp_r++; end else exp_c++;
    end
  end

  task automatic run_map(int gap_pct);
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++)
        img[r][c] = DW'($urandom);
    n_win = 0; exp_r = 2; exp_c = 2;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int r = 0; r < H; r++)
      for (int c = 0; c < W; c++) begin
        while ($urandom_range(99) < gap_pct) begin
          push = 0; @(negedge clk);
          pushed_last_cycle_complete = 0;
        end
        push = 1; pix = img[r][c];
        @(negedge clk);
        pushed_last_cycle_complete = (r >= 2 && c >= 2);
        push = 0;
      end
    repeat (3) begin @(negedge clk); pushed_last_cycle_complete = 0; end
    check("window count", n_win, NWIN);
  endtask

  initial begin
    clear = 0; push = 0; pix = '0; pushed_last_cycle_complete = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_map(0);
    run_map(30);
    // a half-pushed map, then clear and a full one
    sb_on = 0;
    @(negedge clk); clear = 1; @(negedge clk); clear = 0;
    for (int k = 0; k < 37; k++) begin push = 1; pix = DW'($urandom); @(negedge clk); end
    push = 0;
    @(negedge clk); sb_on = 1;
    run_map(10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
