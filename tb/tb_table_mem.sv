// tb_table_mem: writes random words to random addresses of the table RAM
// and checks every read against a shadow copy, including the one-cycle read
// latency, reads that hold when rd_en is low, and read-during-write of the
// same address returning the old word.
module tb_table_mem;

  localparam int DEPTH = 400;
  localparam int AW    = $clog2(DEPTH);
  typedef logic [99:0] word_t;

  logic clk = 1'b0;
  logic rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  word_t rd_data, wr_data;
  word_t shadow [DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  table_mem #(.DEPTH(DEPTH), .T(word_t)) dut (.*);

  initial begin
    word_t want;
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a);
      wr_data = {$urandom(), $urandom(), $urandom(), 4'(a)};
      shadow[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int k = 0; k < 2000; k++) begin
      @(negedge clk);
      rd_en   = $urandom_range(0, 3) != 0;
      rd_addr = AW'($urandom_range(0, DEPTH - 1));
      wr_en   = $urandom_range(0, 1);
      wr_addr = ($urandom_range(0, 3) == 0) ? rd_addr : AW'($urandom_range(0, DEPTH - 1));
      wr_data = {$urandom(), $urandom(), $urandom(), 4'(k)};
      if (rd_en) want = shadow[rd_addr];       // old word on a collision
      if (wr_en) shadow[wr_addr] = wr_data;
      @(posedge clk); #1;
      checks++;
      if (rd_data !== want) begin
        failures++;
        $display("ERROR: read %0d", rd_addr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
