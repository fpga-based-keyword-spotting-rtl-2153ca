// tb_fc: self-checking test of the nested-loop fully connected layer.
// Behavioural activation and weight memories (1-cycle read latency) hold
// random data; each run's logits are compared with a matrix-vector product
// computed here. Also checked: one read of each activation per class, the
// class-major weight addresses, and done arriving NUM_CLASSES*N_IN+1
// cycles after start. Runs with random and with extreme values.
module tb_fc;
  import kws_pkg::*;
  localparam int unsigned ACT_W = conv_width(DATA_W, 3);
  localparam int unsigned W_W   = DATA_W;
  localparam int unsigned N_IN  = (IMG_H - 2) * (IMG_W - 2);
  localparam int unsigned NC    = NUM_CLASSES;
  localparam int unsigned ACC_W = ACT_W + W_W + $clog2(N_IN);

  logic clk = 1'b0, rst_n = 1'b0;
  logic start, busy, done, act_rd_en, w_rd_en;
  logic [$clog2(N_IN)-1:0] act_rd_addr;
  logic [$clog2(N_IN*NC)-1:0] w_rd_addr;
  logic signed [ACT_W-1:0] act_rd_data;
  logic signed [W_W-1:0] w_rd_data;
  logic signed [ACC_W-1:0] logits [NC];

  logic signed [ACT_W-1:0] act [N_IN];
  logic signed [W_W-1:0]   wt  [N_IN*NC];
  int checks = 0, failures = 0, cyc = 0, t_start, t_done, n_reads, addr_err;

  fc dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (act_rd_en) act_rd_data <= act[act_rd_addr];
    if (w_rd_en) begin
      w_rd_data <= wt[w_rd_addr];
      // weight address must be class*N_IN + input
      if (int'(w_rd_addr) != (n_reads / N_IN) * N_IN + int'(act_rd_addr)) addr_err++;
      if (int'(act_rd_addr) != n_reads % N_IN) addr_err++;
      n_reads++;
    end
  end
  always @(negedge clk) if (rst_n && done) t_done = cyc;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run(int mode);
    for (int i = 0; i < N_IN; i++)
      case (mode)
        0: act[i] = ACT_W'($urandom_range(300000));        // ReLU output: >= 0
        1: act[i] = {1'b0, {(ACT_W-1){1'b1}}};             // largest positive
        default: act[i] = ACT_W'($urandom);                // any sign
      endcase
    for (int i = 0; i < N_IN * NC; i++)
      wt[i] = (mode == 1) ? (($urandom_range(1)) ? -128 : 127) : W_W'($urandom);
    n_reads = 0; addr_err = 0; t_done = -1;
    @(negedge clk); start = 1; @(negedge clk); t_start = cyc; start = 0;
    repeat (20) @(negedge clk);
    start = 1; @(negedge clk); start = 0;   // ignored while busy
    while (busy) @(negedge clk);
    for (int k = 0; k < NC; k++) begin
      longint s = 0;
      for (int i = 0; i < N_IN; i++) s += longint'(act[i]) * longint'(wt[k * N_IN + i]);
      check($sformatf("logit[%0d]", k), longint'(logits[k]), s);
    end
    check("reads", n_reads, N_IN * NC);
    check("address pattern", addr_err, 0);
    check("start-to-done cycles", t_done - t_start, NC * N_IN + 1);
  endtask

  initial begin
    start = 0; act_rd_data = '0; w_rd_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(0); run(1); run(2);
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
