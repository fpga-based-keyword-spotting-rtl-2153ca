// tb_relu: self-checking test of the pipelined ReLU stage.
// Drives a random stream (with idle cycles) of negative, zero, positive and
// extreme values and checks, one cycle later, max(x, 0), the index, the
// last flag and the valid strobe.
module tb_relu;
  localparam int unsigned WIDTH = 20;
  localparam int unsigned IDX_W = 9;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_last, out_valid, out_last;
  logic signed [WIDTH-1:0] in_data, out_data;
  logic [IDX_W-1:0] in_idx, out_idx;
  int checks = 0, failures = 0, n_neg = 0;

  relu #(.WIDTH(WIDTH), .IDX_W(IDX_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    logic signed [WIDTH-1:0] v;
    logic                    vld, lst;
    logic [IDX_W-1:0]        ix;
    in_valid = 0; in_last = 0; in_data = '0; in_idx = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      case ($urandom_range(5))
        0: v = '0;
        1: v = {1'b1, {(WIDTH-1){1'b0}}};   // most negative
        2: v = {1'b0, {(WIDTH-1){1'b1}}};   // most positive
        3: v = -WIDTH'(1);
        default: v = WIDTH'($urandom);
      endcase
      vld = ($urandom_range(3) != 0);
      lst = ($urandom_range(1) != 0);
      ix  = IDX_W'($urandom);
      in_valid = vld; in_data = v; in_idx = ix; in_last = lst;
      @(negedge clk);
      check("out_valid", out_valid, vld);
      check("out_last", out_last, vld && lst);
      if (vld) begin
        check("out_data", out_data, (v < 0) ? 0 : v);
        check("out_idx", out_idx, ix);
        if (v < 0) n_neg++;
      end
    end
    check("negative inputs seen", int'(n_neg > 100), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
