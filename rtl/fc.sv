// fc: fully connected layer, a dense matrix-vector product computed with
// two nested loops and a single multiply-accumulate unit.
//
// After start, the outer loop runs over the NUM_CLASSES output classes and
// the inner loop over the N_IN activations. Each cycle one activation and
// the matching weight are read from their memories (1-cycle read latency).
// Their product is added to the accumulator, which restarts at zero with
// each class. At the end of each inner loop the full-precision sum is stored
// as that class's logit.
//
// Weight layout: weight address = class * N_IN + input index.
// Timing: if start is sampled at edge 0, reads are issued on edges
// 1..NUM_CLASSES*N_IN and done pulses in the cycle after edge
// NUM_CLASSES*N_IN+1, when every logit is in place. logits holds its values
// until the next run overwrites them.
// The nested-loop matrix-vector product clocked by the system clock follows
// the published design. One MAC per cycle, no bias and no output scaling are
// this design's choices.
module fc #(
  parameter int unsigned ACT_W       = kws_pkg::conv_width(kws_pkg::DATA_W, kws_pkg::KSIZE),
  parameter int unsigned W_W         = kws_pkg::DATA_W,
  parameter int unsigned N_IN        = (kws_pkg::IMG_H - 2) * (kws_pkg::IMG_W - 2),
  parameter int unsigned NUM_CLASSES = kws_pkg::NUM_CLASSES,
  localparam int unsigned ACC_W      = ACT_W + W_W + $clog2(N_IN),
  localparam int unsigned A_AW       = (N_IN > 1) ? $clog2(N_IN) : 1,
  localparam int unsigned W_AW       = $clog2(N_IN * NUM_CLASSES),
  localparam int unsigned C_W        = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  output logic                    busy,
  output logic                    done,
  // activation buffer read port
  output logic                    act_rd_en,
  output logic [A_AW-1:0]         act_rd_addr,
  input  logic signed [ACT_W-1:0] act_rd_data,
  // weight memory read port
  output logic                    w_rd_en,
  output logic [W_AW-1:0]         w_rd_addr,
  input  logic signed [W_W-1:0]   w_rd_data,
  // class scores
  output logic signed [ACC_W-1:0] logits [NUM_CLASSES]
);

  logic                    issuing;       // loop counters active
  logic [A_AW-1:0]         i_cnt;         // inner loop: input index
  logic [C_W-1:0]          k_cnt;         // outer loop: class index
  // tags of the read now returning from the memories
  logic                    d_valid, d_first, d_last;
  logic [C_W-1:0]          d_class;
  logic signed [ACC_W-1:0] acc, acc_next;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      issuing   <= 1'b0;
      busy      <= 1'b0;
      i_cnt     <= '0;
      k_cnt     <= '0;
      w_rd_addr <= '0;
    end else if (start && !busy) begin
      issuing   <= 1'b1;
      busy      <= 1'b1;
      i_cnt     <= '0;
      k_cnt     <= '0;
      w_rd_addr <= '0;
    end else begin
      if (issuing) begin
        w_rd_addr <= w_rd_addr + 1'b1;
        if (i_cnt == A_AW'(N_IN - 1)) begin
          i_cnt <= '0;
          if (k_cnt == C_W'(NUM_CLASSES - 1)) issuing <= 1'b0;
          else k_cnt <= k_cnt + 1'b1;
        end else begin
          i_cnt <= i_cnt + 1'b1;
        end
      end
      if (done) busy <= 1'b0;
    end
  end

  assign act_rd_en   = issuing;
  assign w_rd_en     = issuing;
  assign act_rd_addr = i_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_valid <= 1'b0;
      d_first <= 1'b0;
      d_last  <= 1'b0;
      d_class <= '0;
    end else begin
      d_valid <= issuing;
      d_first <= issuing && (i_cnt == '0);
      d_last  <= issuing && (i_cnt == A_AW'(N_IN - 1));
      d_class <= k_cnt;
    end
  end

  assign acc_next = (d_first ? '0 : acc)
                  + ACC_W'(act_rd_data) * ACC_W'(w_rd_data);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      done <= 1'b0;
      for (int k = 0; k < NUM_CLASSES; k++) logits[k] <= '0;
    end else begin
      done <= d_valid && d_last && (d_class == C_W'(NUM_CLASSES - 1));
      if (d_valid) begin
        acc <= acc_next;
        if (d_last) logits[d_class] <= acc_next;
      end
    end
  end

endmodule
