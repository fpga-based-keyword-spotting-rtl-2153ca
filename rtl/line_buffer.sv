// line_buffer: 3x3 rotating window over a feature map streamed in raster
// order, one pixel per push.
//
// This is the data-reuse structure of the accelerator. Two row delay lines,
// each IMG_W pixels long and built from shift registers, hold the two rows
// above the incoming pixel. On every push the 3x3 window registers shift one
// column to the left. The new right-hand column is made of the pixel two rows
// up, the pixel one row up (the delay-line taps) and the pixel just pushed.
// So each window needs one new pixel, and the other eight values are
// reused from registers.
//
// Interface: clear (synchronous) restarts the row/column count for a new
// map; push/pix feed the next pixel. One cycle after a push of the pixel at
// (row r, col c) with r >= 2 and c >= 2, win_valid is high for one cycle and
// win holds rows r-2..r, cols c-2..c (win[0][0] is the top-left). win_last
// marks the last window of the map. Pushing one map of IMG_H x IMG_W pixels
// gives (IMG_H-2) x (IMG_W-2) windows ("valid" convolution, no padding).
// The shift-register row buffer and the one-read-per-window behaviour follow
// the published design. The delay-line layout, the raster order and the
// absence of padding are this design's choices.
module line_buffer #(
  parameter int unsigned DATA_W = kws_pkg::DATA_W,
  parameter int unsigned IMG_H  = kws_pkg::IMG_H,
  parameter int unsigned IMG_W  = kws_pkg::IMG_W,
  localparam int unsigned K     = kws_pkg::KSIZE
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     push,
  input  logic signed [DATA_W-1:0] pix,
  output logic signed [DATA_W-1:0] win [K][K],
  output logic                     win_valid,
  output logic                     win_last
);

  localparam int unsigned RW = (IMG_H > 1) ? $clog2(IMG_H) : 1;
  localparam int unsigned CW = (IMG_W > 1) ? $clog2(IMG_W) : 1;

  // Row delay lines: row1[IMG_W-1] is the pixel one row above the incoming
  // one, row2[IMG_W-1] the pixel two rows above.
  logic signed [DATA_W-1:0] row1 [IMG_W];
  logic signed [DATA_W-1:0] row2 [IMG_W];
  logic [RW-1:0] row;
  logic [CW-1:0] col;

  always_ff @(posedge clk) begin
    if (push) begin
      for (int i = 0; i < K; i++)
        for (int j = 0; j < K - 1; j++)
          win[i][j] <= win[i][j+1];
      win[0][K-1] <= row2[IMG_W-1];
      win[1][K-1] <= row1[IMG_W-1];
      win[2][K-1] <= pix;
      row1[0] <= pix;
      row2[0] <= row1[IMG_W-1];
      for (int j = 1; j < IMG_W; j++) begin
        row1[j] <= row1[j-1];
        row2[j] <= row2[j-1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      row       <= '0;
      col       <= '0;
      win_valid <= 1'b0;
      win_last  <= 1'b0;
    end else if (clear) begin
      row       <= '0;
      col       <= '0;
      win_valid <= 1'b0;
      win_last  <= 1'b0;
    end else begin
      win_valid <= push && (row >= RW'(K - 1)) && (col >= CW'(K - 1));
      win_last  <= push && (row == RW'(IMG_H - 1)) && (col == CW'(IMG_W - 1));
      if (push) begin
        if (col == CW'(IMG_W - 1)) begin
          col <= '0;
          row <= (row == RW'(IMG_H - 1)) ? '0 : row + 1'b1;
        end else begin
          col <= col + 1'b1;
        end
      end
    end
  end

endmodule
