// tb_kws_reuse_metrics: measures the accelerator's read and latency figures
// at its default sizes, in the way the figures of merit are defined: a
// 100 MHz clock (10 ns period), start raised at 60,000 ns, time to the
// output_valid pulse, and feature-memory reads per convolution window.
// Checks, on a random map and kernel:
//   - in steady state (every window after the first of a row) exactly one
//     new feature-memory read happens between two consecutive windows,
//     against 9 reads per window for a convolution without reuse;
//   - the whole map costs IMG_H*IMG_W reads, 1 - reads/(9*windows) saving;
//   - output_valid rises 5008 clock cycles (50,080 ns) after start is
//     sampled;
//   - the logits match a reference model.
module tb_kws_reuse_metrics;
  import kws_pkg::*;
  localparam int unsigned NPIX  = IMG_H * IMG_W;
  localparam int unsigned NOUT  = (IMG_H - 2) * (IMG_W - 2);
  localparam int unsigned NFCW  = NOUT * NUM_CLASSES;
  localparam int unsigned ACC_W = conv_width(DATA_W, 3) + DATA_W + $clog2(NOUT);
  localparam int unsigned LD_AW = $clog2(NFCW);
  localparam realtime     T_CLK = 10ns;
  localparam realtime     T_START = 60000ns;
  localparam int unsigned LATENCY = NPIX + NFCW + 6;

  logic clk = 1'b1, rst_n = 1'b0;   // rising edges at multiples of 10 ns
  logic ld_en, start, busy, output_valid;
  ld_sel_e ld_sel;
  logic [LD_AW-1:0] ld_addr;
  logic [DATA_W-1:0] ld_data;
  logic signed [ACC_W-1:0] logits [NUM_CLASSES];
  logic [3:0] class_id;
  logic [31:0] perf_reads, perf_cycles;

  kws_top dut (.*);

  logic signed [DATA_W-1:0] img [NPIX];
  logic signed [DATA_W-1:0] ker [9];
  logic signed [DATA_W-1:0] fcw [NFCW];
  int checks = 0, failures = 0;
  int reads_since_win = 0, n_win = 0, steady_ok = 0, steady_bad = 0;
  realtime t_start_edge, t_valid;
  logic rd_d1 = 1'b0, rd_d2 = 1'b0;

  always #(T_CLK / 2) clk = ~clk;

  // reads between consecutive windows (per convolution output)
  always @(posedge clk) if (rst_n) begin
    rd_d1 <= dut.fm_rd_en;
    rd_d2 <= rd_d1;
    if (rd_d2) reads_since_win++;
    if (dut.u_conv.win_valid) begin
      // window n's completing pixel was read 2 cycles before win_valid, so
      // reads are counted through a 2-cycle delay: those since the last window
      if (n_win % (IMG_W - 2) != 0) begin
        if (reads_since_win == 1) steady_ok++;
        else steady_bad++;
      end
      n_win++;
      reads_since_win = 0;
    end
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic load(ld_sel_e sel, int addr, logic [DATA_W-1:0] d);
    ld_en = 1; ld_sel = sel; ld_addr = LD_AW'(addr); ld_data = d;
    @(negedge clk);
    ld_en = 0;
  endtask

  initial begin
    longint act [NOUT];
    longint s;
    int cycles;
    start = 0; ld_en = 0; ld_sel = LD_FEATURE; ld_addr = '0; ld_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < NPIX; p++) begin img[p] = DATA_W'($urandom); load(LD_FEATURE, p, img[p]); end
    for (int k = 0; k < 9; k++) begin ker[k] = DATA_W'($urandom); load(LD_CONV_W, k, ker[k]); end
    for (int i = 0; i < NFCW; i++) begin fcw[i] = DATA_W'($urandom); load(LD_FC_W, i, fcw[i]); end
    // raise start so that the clock edge sampling it is at 60,000 ns
    while ($realtime < T_START - T_CLK / 2) @(negedge clk);
    start = 1;
    @(posedge clk); t_start_edge = $realtime;
    @(negedge clk); start = 0;
    cycles = 0;
    while (!output_valid) begin @(negedge clk); cycles++; end
    t_valid = $realtime;
    check("start sampled at 60,000 ns", longint'(t_start_edge / 1ns), 60000);
    check("cycles to output_valid", cycles, LATENCY);
    check("ns to output_valid", longint'((t_valid - T_CLK / 2 - t_start_edge) / 1ns),
          longint'(LATENCY) * 10);
    check("steady-state windows with one new read", steady_bad, 0);
    check("steady-state windows seen", steady_ok, NOUT - (IMG_H - 2));
    check("reads for the map", perf_reads, NPIX);
    for (int o = 0; o < NOUT; o++) begin
      s = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          s += longint'(img[(o / (IMG_W - 2) + i) * IMG_W + o % (IMG_W - 2) + j]) * longint'(ker[i * 3 + j]);
      act[o] = (s < 0) ? 0 : s;
    end
    for (int k = 0; k < NUM_CLASSES; k++) begin
      s = 0;
      for (int i = 0; i < NOUT; i++) s += act[i] * longint'(fcw[k * NOUT + i]);
      check($sformatf("logit[%0d]", k), longint'(logits[k]), s);
    end
    $display("start edge %0t, output_valid %0t: %0d cycles", t_start_edge, t_valid, cycles);
    $display("reads per steady-state window: 1 (reuse) vs 9 (no reuse): %0.1f%% fewer",
             100.0 * 8.0 / 9.0);
    $display("reads per map: %0d vs %0d: %0.1f%% fewer", perf_reads, 9 * NOUT,
             100.0 * (1.0 - real'(perf_reads) / real'(9 * NOUT)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
