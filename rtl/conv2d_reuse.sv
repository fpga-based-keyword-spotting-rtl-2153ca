// conv2d_reuse: 3x3 single-channel convolution with line-buffer data reuse.
//
// After a start pulse the block reads the input feature map from the data
// memory once, in raster order, one pixel per clock cycle. The pixels go into
// a line_buffer. Every window it completes is multiplied by the 9 kernel
// weights in parallel (9 multipliers and an adder tree, the DSP-slice MAC of
// the published design), and the sum is registered out. Each pixel is read
// from memory exactly once, so a window costs one new read instead of nine.
//
// Interface:
//   start     one-cycle pulse; ignored while busy.
//   w_wr_*    writes kernel weight w_wr_addr (0..8, row-major) at any time.
//   fm_rd_*   read port of the feature memory, 1-cycle read latency.
//   out_*     one result per valid cycle: out_data is the full-precision sum,
//             out_idx its raster index in the (IMG_H-2) x (IMG_W-2) output
//             map, out_last marks the final one.
// Timing: if start is sampled at clock edge 0, reads are issued on edges
// 1..IMG_H*IMG_W and the last result is valid after edge IMG_H*IMG_W+2, the
// cycle in which done pulses. In steady state one result leaves per cycle,
// with a gap of two cycles at each row change.
// The one-pixel-per-cycle reuse scheme follows the published design. The
// fixed-point widths, no bias term and the unpadded output are this design's
// choices.
module conv2d_reuse #(
  parameter int unsigned DATA_W = kws_pkg::DATA_W,
  parameter int unsigned IMG_H  = kws_pkg::IMG_H,
  parameter int unsigned IMG_W  = kws_pkg::IMG_W,
  localparam int unsigned K      = kws_pkg::KSIZE,
  localparam int unsigned OUT_W  = kws_pkg::conv_width(DATA_W, K),
  localparam int unsigned NPIX   = IMG_H * IMG_W,
  localparam int unsigned NOUT   = (IMG_H - K + 1) * (IMG_W - K + 1),
  localparam int unsigned FM_AW  = (NPIX > 1) ? $clog2(NPIX) : 1,
  localparam int unsigned OIDX_W = (NOUT > 1) ? $clog2(NOUT) : 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  output logic                     busy,
  output logic                     done,
  // kernel weight load
  input  logic                     w_wr_en,
  input  logic [3:0]               w_wr_addr,
  input  logic signed [DATA_W-1:0] w_wr_data,
  // feature memory read port
  output logic                     fm_rd_en,
  output logic [FM_AW-1:0]         fm_rd_addr,
  input  logic signed [DATA_W-1:0] fm_rd_data,
  // convolution result stream
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  out_data,
  output logic [OIDX_W-1:0]        out_idx,
  output logic                     out_last
);

  logic signed [DATA_W-1:0] weight [K*K];   // row-major kernel
  logic signed [DATA_W-1:0] win    [K][K];
  logic                     win_valid, win_last;
  logic                     reading;     // read addresses being issued
  logic                     push;        // read data arriving this cycle
  logic signed [OUT_W-1:0]  mac_sum;
  logic [OIDX_W-1:0]        idx_cnt;

  // Kernel weight registers.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < K * K; i++) weight[i] <= '0;
    end else if (w_wr_en && (w_wr_addr < 4'(K * K))) begin
      weight[w_wr_addr] <= w_wr_data;
    end
  end

  // Read address generator: one new pixel per cycle, each exactly once.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reading    <= 1'b0;
      busy       <= 1'b0;
      fm_rd_addr <= '0;
      push       <= 1'b0;
    end else begin
      push <= reading;
      if (start && !busy) begin
        reading    <= 1'b1;
        busy       <= 1'b1;
        fm_rd_addr <= '0;
      end else begin
        if (reading) begin
          if (fm_rd_addr == FM_AW'(NPIX - 1)) reading <= 1'b0;
          else fm_rd_addr <= fm_rd_addr + 1'b1;
        end
        if (done) busy <= 1'b0;
      end
    end
  end

  assign fm_rd_en = reading;

  line_buffer #(
    .DATA_W(DATA_W), .IMG_H(IMG_H), .IMG_W(IMG_W)
  ) u_line_buffer (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (start && !busy),
    .push     (push),
    .pix      (fm_rd_data),
    .win      (win),
    .win_valid(win_valid),
    .win_last (win_last)
  );

  // 3x3 MAC over the buffered window.
  always_comb begin
    mac_sum = '0;
    for (int i = 0; i < K; i++)
      for (int j = 0; j < K; j++)
        mac_sum += OUT_W'(win[i][j]) * OUT_W'(weight[i*K+j]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
      out_idx   <= '0;
      idx_cnt   <= '0;
    end else begin
      out_valid <= win_valid;
      out_last  <= win_last;
      if (start && !busy) idx_cnt <= '0;
      if (win_valid) begin
        out_data <= mac_sum;
        out_idx  <= idx_cnt;
        idx_cnt  <= idx_cnt + 1'b1;
      end
    end
  end

  assign done = out_valid && out_last;

endmodule
