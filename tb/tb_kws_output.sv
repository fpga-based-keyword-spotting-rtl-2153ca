// tb_kws_output: self-checking test of the output stage.
// Loads random score vectors, including ties and all-negative vectors, and
// checks the latched scores and the arg-max class (lowest index on a tie),
// and that both hold while load is low.
module tb_kws_output;
  localparam int unsigned WIDTH = 37;
  localparam int unsigned NC    = 12;

  logic clk = 1'b0, rst_n = 1'b0, load;
  logic signed [WIDTH-1:0] logits_in [NC];
  logic signed [WIDTH-1:0] logits    [NC];
  logic [3:0] class_id;
  int checks = 0, failures = 0;

  kws_output #(.WIDTH(WIDTH), .NUM_CLASSES(NC)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    longint v [NC];
    int best;
    load = 0;
    for (int k = 0; k < NC; k++) logits_in[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      for (int k = 0; k < NC; k++) begin
        case (n % 4)
          0: v[k] = longint'($urandom) - 64'sd2147483648;          // mixed sign
          1: v[k] = -(longint'($urandom_range(1000)) + 1);          // all negative
          2: v[k] = longint'($urandom_range(3));                    // many ties
          default: v[k] = (longint'($urandom) << 4) - (64'sd1 << 35); // wide
        endcase
        logits_in[k] = WIDTH'(v[k]);
      end
      best = 0;
      for (int k = 1; k < NC; k++) if (v[k] > v[best]) best = k;
      load = 1; @(negedge clk); load = 0;
      check("class_id", class_id, best);
      for (int k = 0; k < NC; k++) check("logit", logits[k], v[k]);
      // new inputs without load must not disturb the held result
      for (int k = 0; k < NC; k++) logits_in[k] = WIDTH'($urandom);
      @(negedge clk);
      check("class_id held", class_id, best);
      check("logit held", logits[0], v[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
