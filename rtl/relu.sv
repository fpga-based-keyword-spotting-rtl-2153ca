// relu: pipelined ReLU activation on the convolution result stream.
//
// Each valid input is registered out one cycle later, with negative values
// replaced by zero and positive values passed unchanged. The stream's side
// information (raster index and last flag) travels with it, so the stage
// stays in step with the convolution and sustains one value per cycle.
// Interface: in_valid/in_data/in_idx/in_last in, the same fields out, fixed
// latency of one clock. The sign bit of out_data is always zero; it is
// kept so that the result stays a signed number of the input's width. The
// element-wise max(x, 0) and its pipelining follow
// the published design; the single register stage is this design's choice.
module relu #(
  parameter int unsigned WIDTH = kws_pkg::conv_width(kws_pkg::DATA_W, kws_pkg::KSIZE),
  parameter int unsigned IDX_W = $clog2((kws_pkg::IMG_H - 2) * (kws_pkg::IMG_W - 2))
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [WIDTH-1:0] in_data,
  input  logic [IDX_W-1:0]        in_idx,
  input  logic                    in_last,
  output logic                    out_valid,
  output logic signed [WIDTH-1:0] out_data,
  output logic [IDX_W-1:0]        out_idx,
  output logic                    out_last
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
      out_idx   <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      if (in_valid) begin
        out_data <= in_data[WIDTH-1] ? '0 : in_data;
        out_idx  <= in_idx;
      end
    end
  end

endmodule
