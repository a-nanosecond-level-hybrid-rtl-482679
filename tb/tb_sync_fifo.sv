// tb_sync_fifo: random pushes and pops against a queue model; checks data
// order, the full and empty flags, and that a push on full and a pop on
// empty are never issued by the testbench (the FIFO asserts on both).
module tb_sync_fifo;

  localparam int DEPTH = 16;
  typedef logic [40:0] word_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic push, pop, full, empty;
  word_t wr_data, rd_data;
  word_t model[$];
  int checks = 0, failures = 0, n_full = 0;

  always #5 clk = ~clk;

  sync_fifo #(.DEPTH(DEPTH), .T(word_t)) dut (.*);

  initial begin
    push = 0; pop = 0; wr_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      checks += 2;
      if (full !== (model.size() == DEPTH) || empty !== (model.size() == 0)) begin
        failures++;
        $display("ERROR: flags full=%0d empty=%0d size=%0d", full, empty, model.size());
      end
      if (!empty && rd_data !== model[0]) begin
        failures++;
        $display("ERROR: head data");
      end
      if (full) n_full++;
      // phases that fill and drain
      push    = !full && ($urandom_range(0, 9) < ((k / 500) % 2 ? 3 : 7));
      pop     = !empty && ($urandom_range(0, 9) < ((k / 500) % 2 ? 7 : 3));
      wr_data = {$urandom(), 9'(k)};
      @(posedge clk);
      if (pop)  void'(model.pop_front());
      if (push) model.push_back(wr_data);
    end
    checks++;
    if (n_full == 0) begin
      failures++;
      $display("ERROR: never full");
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
