// tb_conv2d_reuse: self-checking test of the data-reuse 3x3 convolution.
// A behavioural feature memory (1-cycle read latency) holds a random map;
// random kernels are loaded through the weight port. Every output is
// compared with a direct 3x3 convolution computed here, in order and with
// its index. Also checked: each pixel is read exactly once per map (one new
// read per window instead of nine), the read stream issues one address per
// cycle, and done comes IMG_H*IMG_W+2 cycles after start. A start during a
// run must be ignored.
module tb_conv2d_reuse;
  import kws_pkg::*;
  localparam int unsigned DW   = DATA_W;
  localparam int unsigned H    = IMG_H;
  localparam int unsigned W    = IMG_W;
  localparam int unsigned NPIX = H * W;
  localparam int unsigned NOUT = (H - 2) * (W - 2);
  localparam int unsigned OW   = conv_width(DW, 3);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done;
  logic w_wr_en;
  logic [3:0] w_wr_addr;
  logic signed [DW-1:0] w_wr_data;
  logic fm_rd_en;
  logic [$clog2(NPIX)-1:0] fm_rd_addr;
  logic signed [DW-1:0] fm_rd_data;
  logic out_valid, out_last;
  logic signed [OW-1:0] out_data;
  logic [$clog2(NOUT)-1:0] out_idx;

  logic signed [DW-1:0] img [NPIX];
  logic signed [DW-1:0] ker [9];
  int read_count [NPIX];
  int checks = 0, failures = 0;
  int n_out, n_reads, cyc, t_start, t_done, last_rd_cyc, rd_gaps;

  conv2d_reuse dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // behavioural feature memory
  always @(posedge clk) if (fm_rd_en) begin
    fm_rd_data <= img[fm_rd_addr];
    read_count[fm_rd_addr]++;
    n_reads++;
    if (n_reads > 1 && cyc != last_rd_cyc + 1) rd_gaps++;
    last_rd_cyc = cyc;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint ref_conv(int o);
    int r = o / (W - 2), c = o % (W - 2);
    longint s = 0;
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        s += longint'(img[(r + i) * W + c + j]) * longint'(ker[i * 3 + j]);
    return s;
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    check($sformatf("out[%0d]", n_out), longint'(out_data), ref_conv(n_out));
    check("out_idx", longint'(out_idx), n_out);
    check("out_last", longint'(out_last), longint'(n_out == NOUT - 1));
    n_out++;
  end

  always @(negedge clk) if (rst_n && done) t_done = cyc;

  task automatic run(bit extreme);
    for (int p = 0; p < NPIX; p++) begin
      img[p] = extreme ? (($urandom_range(1)) ? -128 : 127) : DW'($urandom);
      read_count[p] = 0;
    end
    for (int k = 0; k < 9; k++) begin
      ker[k] = extreme ? (($urandom_range(1)) ? -128 : 127) : DW'($urandom);
      @(negedge clk); w_wr_en = 1; w_wr_addr = 4'(k); w_wr_data = ker[k];
    end
    @(negedge clk); w_wr_en = 0;
    n_out = 0; n_reads = 0; rd_gaps = 0; t_done = -1;
    start = 1; @(negedge clk); t_start = cyc; start = 0;
    repeat (50) @(negedge clk);
    start = 1; @(negedge clk); start = 0;     // must be ignored: busy
    while (busy) @(negedge clk);
    repeat (5) @(negedge clk);
    check("outputs per map", n_out, NOUT);
    check("reads per map", n_reads, NPIX);
    check("reads issued back to back", rd_gaps, 0);
    for (int p = 0; p < NPIX; p++) check("each pixel read once", read_count[p], 1);
    check("start-to-done cycles", t_done - t_start, NPIX + 2);
  endtask

  initial begin
    start = 0; w_wr_en = 0; w_wr_addr = '0; w_wr_data = '0; fm_rd_data = '0;
    cyc = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0);
    run(1);
    run(0);
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
