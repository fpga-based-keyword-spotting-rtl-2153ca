// tb_kws_top: end-to-end test of the keyword-spotting accelerator at its
// default sizes (49 x 10 map, 3x3 kernel, 12 classes).
// Loads a feature map, a kernel and FC weights through the load port, starts
// an inference and compares the 12 logits and the detected class with a
// reference computed here (convolution, ReLU, matrix-vector product,
// arg-max). Several inferences run back to back with random, mostly
// negative and extreme data. For each run it checks the feature-memory read
// count (each pixel once: IMG_H*IMG_W reads against 9 per window without
// reuse), the start-to-output_valid latency and perf_cycles, and that
// output_valid is a single-cycle pulse. It also counts how often each
// mechanism happened (windows served from the line buffer, ReLU clamps of
// negative values, ignored start requests, FC class changes, completed
// inferences) and fails any that never did.
module tb_kws_top;
  import kws_pkg::*;
  localparam int unsigned NPIX  = IMG_H * IMG_W;
  localparam int unsigned NOUT  = (IMG_H - 2) * (IMG_W - 2);
  localparam int unsigned NFCW  = NOUT * NUM_CLASSES;
  localparam int unsigned ACC_W = conv_width(DATA_W, 3) + DATA_W + $clog2(NOUT);
  localparam int unsigned LD_AW = $clog2(NFCW);
  // expected cycle counts (see kws_top): conv stream + relu + fc loops + output
  localparam int unsigned LATENCY = NPIX + NOUT * NUM_CLASSES + 6;

  logic clk = 1'b0, rst_n = 1'b0;
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
  longint act [NOUT];
  longint ref_logit [NUM_CLASSES];
  int checks = 0, failures = 0, cyc = 0;
  // mechanism counters
  int n_windows = 0, n_clamps = 0, n_ignored_starts = 0, n_class_changes = 0;
  int n_inferences = 0, n_ov = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  // observe internal events for the mechanism counts
  always @(posedge clk) if (rst_n) begin
    if (dut.conv_valid) n_windows++;
    if (dut.conv_valid && dut.conv_data < 0) n_clamps++;
    if (dut.u_fc.d_valid && dut.u_fc.d_last &&
        dut.u_fc.d_class != 4'(NUM_CLASSES - 1)) n_class_changes++;
    if (output_valid) n_ov++;
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

  task automatic compute_reference();
    for (int o = 0; o < NOUT; o++) begin
      int r = o / (IMG_W - 2), c = o % (IMG_W - 2);
      longint s = 0;
      for (int i = 0; i < 3; i++)
        for (int j = 0; j < 3; j++)
          s += longint'(img[(r + i) * IMG_W + c + j]) * longint'(ker[i * 3 + j]);
      act[o] = (s < 0) ? 0 : s;
    end
    for (int k = 0; k < NUM_CLASSES; k++) begin
      ref_logit[k] = 0;
      for (int i = 0; i < NOUT; i++) ref_logit[k] += act[i] * longint'(fcw[k * NOUT + i]);
    end
  endtask

  task automatic run(int mode);
    int t_start, t_ov, ov_len, best, win0;
    for (int p = 0; p < NPIX; p++)
      img[p] = (mode == 2) ? (($urandom_range(1)) ? -128 : 127) : DATA_W'($urandom);
    for (int k = 0; k < 9; k++)
      case (mode)
        1: ker[k] = -DATA_W'($urandom_range(1, 100));    // mostly negative sums
        2: ker[k] = ($urandom_range(1)) ? -128 : 127;
        default: ker[k] = DATA_W'($urandom);
      endcase
    for (int i = 0; i < NFCW; i++)
      fcw[i] = (mode == 2) ? (($urandom_range(1)) ? -128 : 127) : DATA_W'($urandom);
    if (mode == 1) ker[4] = 100;    // a few positive windows remain
    for (int p = 0; p < NPIX; p++) load(LD_FEATURE, p, img[p]);
    for (int k = 0; k < 9; k++) load(LD_CONV_W, k, ker[k]);
    for (int i = 0; i < NFCW; i++) load(LD_FC_W, i, fcw[i]);
    compute_reference();

    win0 = n_windows;
    start = 1; @(negedge clk); start = 0; t_start = cyc;
    repeat (100) @(negedge clk);
    check("busy during run", busy, 1);
    start = 1; @(negedge clk); start = 0;          // must be ignored
    n_ignored_starts++;
    while (!output_valid) @(negedge clk);
    t_ov = cyc;
    ov_len = 0;
    while (output_valid) begin ov_len++; @(negedge clk); end
    check("output_valid pulse length", ov_len, 1);
    check("start to output_valid cycles", t_ov - t_start, LATENCY);
    check("perf_cycles", perf_cycles, LATENCY + 2);
    check("perf_reads (one read per pixel)", perf_reads, NPIX);
    check("windows per run", n_windows - win0, NOUT);
    check("busy low after output", busy, 0);
    best = 0;
    for (int k = 0; k < NUM_CLASSES; k++) begin
      check($sformatf("logit[%0d]", k), longint'(logits[k]), ref_logit[k]);
      if (ref_logit[k] > ref_logit[best]) best = k;
    end
    check("class_id", class_id, best);
    n_inferences++;
    $display("run %0d: class %0d, %0d reads for %0d windows (%0d without reuse), %0d cycles",
             mode, class_id, perf_reads, NOUT, 9 * NOUT, perf_cycles);
  endtask

  initial begin
    start = 0; ld_en = 0; ld_sel = LD_FEATURE; ld_addr = '0; ld_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    run(0);
    run(1);
    run(2);
    run(0);
    check("mechanism: windows from line buffer", int'(n_windows > 0), 1);
    check("mechanism: ReLU clamps", int'(n_clamps > 0), 1);
    check("mechanism: start ignored while busy (one output per run)", n_ov, n_inferences);
    check("mechanism: FC class changes", int'(n_class_changes > 0), 1);
    check("mechanism: completed inferences", int'(n_inferences > 0), 1);
    $display("mechanisms: windows=%0d relu_clamps=%0d ignored_starts=%0d fc_class_changes=%0d inferences=%0d",
             n_windows, n_clamps, n_ignored_starts, n_class_changes, n_inferences);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
