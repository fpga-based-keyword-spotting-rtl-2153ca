// tb_kws_data_mem: self-checking test of the on-chip data memory.
// Fills the memory with random words, then reads every address back in
// random order and checks the word arrives exactly one cycle after the
// read, that rd_data holds while rd_en is low, and that a read of the
// address being written returns the old word (read-first).
module tb_kws_data_mem;
  localparam int unsigned WIDTH = 8;
  localparam int unsigned DEPTH = 490;
  localparam int unsigned AW    = $clog2(DEPTH);

  logic clk = 1'b0;
  logic wr_en, rd_en;
  logic [AW-1:0] wr_addr, rd_addr;
  logic [WIDTH-1:0] wr_data, rd_data;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  kws_data_mem #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(string what, logic [WIDTH-1:0] got, logic [WIDTH-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0h expected %0h", what, got, exp);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    @(posedge clk);
    for (int a = 0; a < DEPTH; a++) begin
      wr_en <= 1; wr_addr <= AW'(a); wr_data <= WIDTH'($urandom);
      @(posedge clk);
      model[a] = wr_data;
    end
    wr_en <= 0;
    for (int n = 0; n < 2 * DEPTH; n++) begin
      int a = $urandom_range(DEPTH - 1);
      rd_en <= 1; rd_addr <= AW'(a);
      @(posedge clk);
      rd_en <= 0;
      #1 check("read one cycle after address", rd_data, model[a]);
      // rd_data must hold while rd_en is low
      @(posedge clk);
      #1 check("hold while idle", rd_data, model[a]);
    end
    // read-first on a same-address write
    begin
      int a = 17;
      logic [WIDTH-1:0] nv;
      nv = ~model[a];
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = nv; rd_en = 1; rd_addr = AW'(a);
      @(posedge clk); #1;
      check("read-first", rd_data, model[a]);
      model[a] = nv;
      wr_en = 0;
      @(posedge clk); #1;
      check("new word after write", rd_data, nv);
      rd_en = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
