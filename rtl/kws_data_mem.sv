// kws_data_mem: on-chip data memory (block-RAM style) used for the input
// feature map, the ReLU activation buffer and the FC weights.
//
// One write port and one read port, both synchronous to clk. A read issued
// with rd_en in cycle t returns mem[rd_addr] on rd_data in cycle t+1; rd_data
// holds its value while rd_en is low. Writing and reading the same address in
// the same cycle returns the old contents (read-first). The contents have no
// reset, as in a block RAM; they are filled through the write port before use.
// The published design names a data memory that feeds the accelerator but
// does not describe it; the port arrangement here is this design's choice.
module kws_data_mem #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 490,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             wr_en,
  input  logic [AW-1:0]    wr_addr,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  input  logic [AW-1:0]    rd_addr,
  output logic [WIDTH-1:0] rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end

endmodule
