// kws_output: output stage holding the final classification result.
//
// On load it latches the NUM_CLASSES class scores from the fully connected
// layer and the index of the largest one (the detected keyword; on a tie the
// lowest index wins). Both stay stable until the next load, so the scores of
// one run can be read while the next run computes. Latency: one clock from
// load to the new values.
// That the output stage presents the final classification score follows the
// published design. Picking the winning class by arg-max is this design's
// choice.
module kws_output #(
  parameter int unsigned WIDTH       = kws_pkg::conv_width(kws_pkg::DATA_W, kws_pkg::KSIZE)
                                       + kws_pkg::DATA_W
                                       + $clog2((kws_pkg::IMG_H - 2) * (kws_pkg::IMG_W - 2)),
  parameter int unsigned NUM_CLASSES = kws_pkg::NUM_CLASSES,
  localparam int unsigned C_W        = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    load,
  input  logic signed [WIDTH-1:0] logits_in [NUM_CLASSES],
  output logic signed [WIDTH-1:0] logits    [NUM_CLASSES],
  output logic [C_W-1:0]          class_id
);

  logic [C_W-1:0]          best_idx;
  logic signed [WIDTH-1:0] best_val;

  always_comb begin
    best_idx = '0;
    best_val = logits_in[0];
    for (int k = 1; k < NUM_CLASSES; k++) begin
      if (logits_in[k] > best_val) begin
        best_val = logits_in[k];
        best_idx = C_W'(k);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      class_id <= '0;
      for (int k = 0; k < NUM_CLASSES; k++) logits[k] <= '0;
    end else if (load) begin
      class_id <= best_idx;
      for (int k = 0; k < NUM_CLASSES; k++) logits[k] <= logits_in[k];
    end
  end

endmodule
