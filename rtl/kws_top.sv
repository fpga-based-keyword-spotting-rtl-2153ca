// kws_top: keyword-spotting accelerator, convolution -> ReLU -> fully
// connected layer under one control FSM.
//
// Data path: the input feature map sits in an on-chip feature memory. On
// start, conv2d_reuse streams it through its line buffer once, reading one
// pixel per cycle, and produces the 3x3 convolution map. relu clamps each
// result at zero and writes it into the on-chip activation buffer. The fc
// layer then runs its nested loops over the activation buffer and the FC
// weight memory, and the output stage latches the class scores and the
// winning class. kws_ctrl sequences the phases and pulses output_valid for
// one cycle when the results are ready.
//
// Interface:
//   ld_en/ld_sel/ld_addr/ld_data  host load port, one word per cycle, into
//       the feature map (raster order), the 9 conv weights (row-major) or the
//       FC weights (class * N_CONV_OUT + input). Loading is meant for idle
//       periods; a load during a run changes data the run may still read.
//   start          one-cycle pulse, accepted when busy is low.
//   output_valid   one-cycle pulse; logits and class_id are valid from then
//                  until the next output_valid.
//   perf_reads     feature-memory reads of the last run (IMG_H*IMG_W).
//   perf_cycles    cycles from the start cycle to the output_valid cycle,
//                  both included; final from the cycle after output_valid.
// Timing: with start sampled at clock edge 0, the last ReLU result is
// written, and the FC layer samples its start, at edge IMG_H*IMG_W+4; it runs
// NUM_CLASSES*N_CONV_OUT+1 cycles, and output_valid is high in the cycle
// after edge IMG_H*IMG_W + NUM_CLASSES*N_CONV_OUT + 6. At the default sizes
// that is edge 490 + 4512 + 6 = 5008, i.e. 50.08 us at a 100 MHz clock.
// The three layers, the data-reuse convolution, the central FSM with
// start/output_valid and the data memory follow the published design. The
// sizes, the number formats, the load port and the activation buffer
// between ReLU and FC are this design's choices.
module kws_top #(
  parameter int unsigned DATA_W      = kws_pkg::DATA_W,
  parameter int unsigned IMG_H       = kws_pkg::IMG_H,
  parameter int unsigned IMG_W       = kws_pkg::IMG_W,
  parameter int unsigned NUM_CLASSES = kws_pkg::NUM_CLASSES,
  localparam int unsigned K          = kws_pkg::KSIZE,
  localparam int unsigned NPIX       = IMG_H * IMG_W,
  localparam int unsigned N_CONV_OUT = (IMG_H - K + 1) * (IMG_W - K + 1),
  localparam int unsigned NFCW       = N_CONV_OUT * NUM_CLASSES,
  localparam int unsigned CONV_OUT_W = kws_pkg::conv_width(DATA_W, K),
  localparam int unsigned ACC_W      = CONV_OUT_W + DATA_W + $clog2(N_CONV_OUT),
  localparam int unsigned FM_AW      = $clog2(NPIX),
  localparam int unsigned ACT_AW     = $clog2(N_CONV_OUT),
  localparam int unsigned FCW_AW     = $clog2(NFCW),
  localparam int unsigned LD_AW      = (FCW_AW > FM_AW) ? FCW_AW : FM_AW,
  localparam int unsigned C_W        = (NUM_CLASSES > 1) ? $clog2(NUM_CLASSES) : 1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host load port
  input  logic                    ld_en,
  input  kws_pkg::ld_sel_e        ld_sel,
  input  logic [LD_AW-1:0]        ld_addr,
  input  logic [DATA_W-1:0]       ld_data,
  // control
  input  logic                    start,
  output logic                    busy,
  output logic                    output_valid,
  // results
  output logic signed [ACC_W-1:0] logits [NUM_CLASSES],
  output logic [C_W-1:0]          class_id,
  output logic [31:0]             perf_reads,
  output logic [31:0]             perf_cycles
);

  import kws_pkg::*;

  // feature memory
  logic                     fm_rd_en;
  logic [FM_AW-1:0]         fm_rd_addr;
  logic [DATA_W-1:0]        fm_rd_data;
  // convolution stream
  logic                     conv_start, conv_busy, conv_done;
  logic                     conv_valid, conv_last;
  logic signed [CONV_OUT_W-1:0] conv_data;
  logic [ACT_AW-1:0]        conv_idx;
  // relu stream into the activation buffer
  logic                     act_valid, act_last;
  logic signed [CONV_OUT_W-1:0] act_data;
  logic [ACT_AW-1:0]        act_idx;
  // fc
  logic                     fc_start, fc_busy, fc_done;
  logic                     act_rd_en, fcw_rd_en;
  logic [ACT_AW-1:0]        act_rd_addr;
  logic [CONV_OUT_W-1:0]    act_rd_data;
  logic [FCW_AW-1:0]        fcw_rd_addr;
  logic [DATA_W-1:0]        fcw_rd_data;
  logic signed [ACC_W-1:0]  fc_logits [NUM_CLASSES];
  // control
  logic                     out_load;
  kws_state_e               state;

  kws_data_mem #(.WIDTH(DATA_W), .DEPTH(NPIX)) u_feature_mem (
    .clk    (clk),
    .wr_en  (ld_en && ld_sel == LD_FEATURE),
    .wr_addr(ld_addr[FM_AW-1:0]),
    .wr_data(ld_data),
    .rd_en  (fm_rd_en),
    .rd_addr(fm_rd_addr),
    .rd_data(fm_rd_data)
  );

  conv2d_reuse #(.DATA_W(DATA_W), .IMG_H(IMG_H), .IMG_W(IMG_W)) u_conv (
    .clk       (clk),
    .rst_n     (rst_n),
    .start     (conv_start),
    .busy      (conv_busy),
    .done      (conv_done),
    .w_wr_en   (ld_en && ld_sel == LD_CONV_W),
    .w_wr_addr (ld_addr[3:0]),
    .w_wr_data (ld_data),
    .fm_rd_en  (fm_rd_en),
    .fm_rd_addr(fm_rd_addr),
    .fm_rd_data(fm_rd_data),
    .out_valid (conv_valid),
    .out_data  (conv_data),
    .out_idx   (conv_idx),
    .out_last  (conv_last)
  );

  relu #(.WIDTH(CONV_OUT_W), .IDX_W(ACT_AW)) u_relu (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (conv_valid),
    .in_data  (conv_data),
    .in_idx   (conv_idx),
    .in_last  (conv_last),
    .out_valid(act_valid),
    .out_data (act_data),
    .out_idx  (act_idx),
    .out_last (act_last)
  );

  kws_data_mem #(.WIDTH(CONV_OUT_W), .DEPTH(N_CONV_OUT)) u_act_buf (
    .clk    (clk),
    .wr_en  (act_valid),
    .wr_addr(act_idx),
    .wr_data(act_data),
    .rd_en  (act_rd_en),
    .rd_addr(act_rd_addr),
    .rd_data(act_rd_data)
  );

  kws_data_mem #(.WIDTH(DATA_W), .DEPTH(NFCW)) u_fc_weight_mem (
    .clk    (clk),
    .wr_en  (ld_en && ld_sel == LD_FC_W),
    .wr_addr(ld_addr[FCW_AW-1:0]),
    .wr_data(ld_data),
    .rd_en  (fcw_rd_en),
    .rd_addr(fcw_rd_addr),
    .rd_data(fcw_rd_data)
  );

  fc #(
    .ACT_W(CONV_OUT_W), .W_W(DATA_W), .N_IN(N_CONV_OUT), .NUM_CLASSES(NUM_CLASSES)
  ) u_fc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (fc_start),
    .busy       (fc_busy),
    .done       (fc_done),
    .act_rd_en  (act_rd_en),
    .act_rd_addr(act_rd_addr),
    .act_rd_data(act_rd_data),
    .w_rd_en    (fcw_rd_en),
    .w_rd_addr  (fcw_rd_addr),
    .w_rd_data  (fcw_rd_data),
    .logits     (fc_logits)
  );

  kws_output #(.WIDTH(ACC_W), .NUM_CLASSES(NUM_CLASSES)) u_output (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (out_load),
    .logits_in(fc_logits),
    .logits   (logits),
    .class_id (class_id)
  );

  kws_ctrl #(.CNT_W(32)) u_ctrl (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (start),
    .act_last    (act_last),
    .fc_done     (fc_done),
    .fm_rd_en    (fm_rd_en),
    .conv_start  (conv_start),
    .fc_start    (fc_start),
    .out_load    (out_load),
    .output_valid(output_valid),
    .busy        (busy),
    .state       (state),
    .perf_reads  (perf_reads),
    .perf_cycles (perf_cycles)
  );

  // The layers run strictly one after the other.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    !(conv_busy && fc_busy));
  a_conv_done_phase: assert property (@(posedge clk) disable iff (!rst_n)
    conv_done |-> state == ST_CONV);

endmodule
