// tb_publish_scheduler: checks the snapshot timer and the walk over all
// book sides. Phases: free running with ready always high (walks start
// exactly PERIOD cycles apart and cover every table once, in order);
// random backpressure (valid/table stay put until accepted, still one walk
// per period); ready held low for several periods (only one walk is
// owed afterwards); enable low (no new walk).
module tb_publish_scheduler;

  localparam int NUM_TABLES = 6;
  localparam int PERIOD     = 40;
  localparam int TBL_W      = $clog2(NUM_TABLES);

  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0, req_valid, req_ready = 1'b0;
  logic [TBL_W-1:0] req_table;

  int checks = 0, failures = 0;
  longint cycle = 0;

  // observation state
  int     next_tbl = 0;      // table expected at the next handshake
  int     walks = 0;         // walks completed
  int     starts = 0;
  longint last_start = -1;
  longint spacing = -1;      // cycles between the last two walk starts
  logic   prev_valid = 1'b0, prev_ready = 1'b0;
  logic [TBL_W-1:0] prev_table = '0;

  always #5 clk = ~clk;

  publish_scheduler #(.NUM_TABLES(NUM_TABLES), .PERIOD(PERIOD)) dut (.*);

  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n) begin
      // a request may not change or vanish before it is accepted
      if (prev_valid && !prev_ready) begin
        checks++;
        if (!req_valid || req_table != prev_table) begin
          failures++;
          $display("ERROR: request dropped or changed before acceptance at %0d", cycle);
        end
      end
      if (req_valid && !prev_valid) begin
        starts++;
        if (last_start >= 0) spacing = cycle - last_start;
        last_start = cycle;
      end
      if (req_valid && req_ready) begin
        checks++;
        if (int'(req_table) != next_tbl) begin
          failures++;
          $display("ERROR: table %0d, expected %0d", req_table, next_tbl);
        end
        next_tbl = (next_tbl + 1) % NUM_TABLES;
        if (next_tbl == 0) walks++;
      end
      prev_valid = req_valid;
      prev_ready = req_ready;
      prev_table = req_table;
    end
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("ERROR: %s (walks=%0d starts=%0d spacing=%0d)", what, walks, starts, spacing);
    end
  endtask

  initial begin
    int w0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // disabled: nothing happens
    repeat (3 * PERIOD) @(negedge clk);
    check(starts == 0, "request while disabled");

    // free running, ready high
    req_ready = 1'b1;
    enable    = 1'b1;
    repeat (PERIOD - 1) @(negedge clk);
    check(starts == 0, "walk started before one period");
    repeat (5 * PERIOD) @(negedge clk);
    check(walks == 5 && starts == 5, "one walk per period with ready high");
    check(spacing == longint'(PERIOD), "walks not PERIOD cycles apart");

    // random backpressure
    w0 = walks;
    for (int i = 0; i < 10 * PERIOD; i++) begin
      req_ready = $urandom_range(0, 2) != 0;
      @(negedge clk);
    end
    req_ready = 1'b1;
    repeat (NUM_TABLES + 2) @(negedge clk);
    check(walks - w0 >= 9 && walks - w0 <= 11, "walks under backpressure");

    // ready low for several periods: one owed walk, not several
    while (req_valid) @(negedge clk);
    repeat (PERIOD / 2) @(negedge clk);
    req_ready = 1'b0;
    repeat (4 * PERIOD) @(negedge clk);
    w0 = walks;
    req_ready = 1'b1;
    repeat (2 * NUM_TABLES + 4) @(negedge clk);
    // the walk that started during the stall plus at most one owed walk
    check(walks - w0 >= 2 && walks - w0 <= 3, "owed walks were queued more than once");

    // disabled again: current walks end, no new one
    while (req_valid) @(negedge clk);
    enable = 1'b0;
    w0 = walks;
    repeat (4 * PERIOD) @(negedge clk);
    check(walks - w0 <= 1 && !req_valid, "walk started while disabled");

    $display("walks=%0d", walks);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    $display("ERROR: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

endmodule
