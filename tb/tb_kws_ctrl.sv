// tb_kws_ctrl: self-checking test of the sequencing FSM.
// Plays the layers' side of the handshake with random phase lengths and
// read patterns and checks: start is taken only in IDLE, conv_start /
// fc_start / out_load each pulse once at the right moment, the state
// sequence IDLE-CONV-FC-DONE-IDLE, a single-cycle output_valid, busy, and
// the read and cycle counters against counts kept here.
module tb_kws_ctrl;
  import kws_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, act_last, fc_done, fm_rd_en;
  logic conv_start, fc_start, out_load, output_valid, busy;
  kws_state_e state;
  logic [31:0] perf_reads, perf_cycles;
  int checks = 0, failures = 0;

  kws_ctrl dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(int conv_len, int fc_len);
    int reads = 0, cycles, n_ov = 0;
    // start while idle
    @(negedge clk);
    check("idle before start", state, ST_IDLE);
    check("not busy", busy, 0);
    start = 1; #1;
    check("conv_start with start", conv_start, 1);
    @(negedge clk); start = 0;
    cycles = 1;
    check("state CONV", state, ST_CONV);
    check("busy", busy, 1);
    for (int i = 0; i < conv_len; i++) begin
      fm_rd_en = ($urandom_range(3) != 0);
      if (i == 2) start = 1;                    // ignored: busy
      #1;
      check("no conv_start while busy", conv_start, 0);
      check("no fc_start during conv", fc_start, 0);
      if (fm_rd_en) reads++;
      @(negedge clk); cycles++;
      start = 0;
    end
    fm_rd_en = 0;
    act_last = 1; #1;
    check("fc_start on act_last", fc_start, 1);
    @(negedge clk); cycles++;
    act_last = 0;
    check("state FC", state, ST_FC);
    for (int i = 0; i < fc_len; i++) begin
      #1 check("no out_load during fc", out_load, 0);
      check("no output_valid during fc", output_valid, 0);
      @(negedge clk); cycles++;
    end
    fc_done = 1; #1;
    check("out_load on fc_done", out_load, 1);
    @(negedge clk); cycles++;
    fc_done = 0;
    check("state DONE", state, ST_DONE);
    check("output_valid", output_valid, 1);
    cycles++;                                   // the output_valid cycle counts
    @(negedge clk);
    check("back to IDLE", state, ST_IDLE);
    check("output_valid is one cycle", output_valid, 0);
    check("perf_reads", perf_reads, reads);
    check("perf_cycles", perf_cycles, cycles);
    repeat (3) @(negedge clk);
    check("perf_cycles held", perf_cycles, cycles);
  endtask

  initial begin
    start = 0; act_last = 0; fc_done = 0; fm_rd_en = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(10, 5);
    run(490, 4512);
    for (int n = 0; n < 20; n++) run($urandom_range(5, 60), $urandom_range(1, 60));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
