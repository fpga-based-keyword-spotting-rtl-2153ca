// kws_ctrl: finite-state machine that sequences the accelerator's layers
// and keeps its performance counters.
//
// States: IDLE -> CONV -> FC -> DONE -> IDLE. A start pulse in IDLE pulses
// conv_start and enters CONV, where the convolution and ReLU stream their
// results into the activation buffer. The last activation written
// (act_last) pulses fc_start and enters FC. fc_done pulses out_load, so the
// output stage latches the scores, and enters DONE. DONE lasts one cycle,
// in which output_valid is high, and returns to IDLE. start is ignored
// unless the FSM is in IDLE.
// Counters, cleared by an accepted start and held after the run:
// perf_reads counts feature-memory reads (fm_rd_en cycles) and perf_cycles
// counts clock cycles from the cycle in which start is accepted up to and
// including the output_valid cycle; its final value is in place from the
// cycle after output_valid.
// The start / output_valid handshake, the FSM sequencing and the read and
// latency measurements follow the published design. The state encoding and
// the counter widths are this design's choices.
module kws_ctrl #(
  parameter int unsigned CNT_W = 32
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                act_last,    // last ReLU output written
  input  logic                fc_done,
  input  logic                fm_rd_en,    // feature-memory read strobe
  output logic                conv_start,
  output logic                fc_start,
  output logic                out_load,
  output logic                output_valid,
  output logic                busy,
  output kws_pkg::kws_state_e state,
  output logic [CNT_W-1:0]    perf_reads,
  output logic [CNT_W-1:0]    perf_cycles
);

  import kws_pkg::*;

  kws_state_e state_next;

  always_comb begin
    state_next = state;
    conv_start = 1'b0;
    fc_start   = 1'b0;
    out_load   = 1'b0;
    unique case (state)
      ST_IDLE: if (start)    begin conv_start = 1'b1; state_next = ST_CONV; end
      ST_CONV: if (act_last) begin fc_start   = 1'b1; state_next = ST_FC;   end
      ST_FC:   if (fc_done)  begin out_load   = 1'b1; state_next = ST_DONE; end
      ST_DONE: state_next = ST_IDLE;
      default: state_next = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= ST_IDLE;
      perf_reads  <= '0;
      perf_cycles <= '0;
    end else begin
      state <= state_next;
      if (conv_start) begin
        perf_reads  <= '0;
        perf_cycles <= CNT_W'(1);
      end else if (state != ST_IDLE) begin
        perf_cycles <= perf_cycles + 1'b1;
        if (fm_rd_en) perf_reads <= perf_reads + 1'b1;
      end
    end
  end

  assign output_valid = (state == ST_DONE);
  assign busy         = (state != ST_IDLE);

  // A layer may only report completion in its own phase.
  property p_in_phase(logic ev, kws_state_e st);
    @(posedge clk) disable iff (!rst_n) ev |-> state == st;
  endproperty
  a_act_last_in_conv: assert property (p_in_phase(act_last, ST_CONV));
  a_fc_done_in_fc:    assert property (p_in_phase(fc_done, ST_FC));

endmodule
