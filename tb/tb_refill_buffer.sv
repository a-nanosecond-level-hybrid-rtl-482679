// tb_refill_buffer: sends refill replies of 0..B items with random gaps,
// checks that the buffer holds each complete reply (table, items in order,
// count, new smallest key, empty flag), refuses beats while full, and
// accepts the next reply only after consume.
module tb_refill_buffer;
  import mdg_pkg::*;

  localparam int TBL_W = 9;
  localparam int B     = 25;
  localparam int NW    = $clog2(B + 1);

  logic clk = 1'b0, rst_n = 1'b0;
  logic rx_valid, rx_ready, rx_item, rx_last, rx_master_empty;
  logic [TBL_W-1:0] rx_table, table_id;
  key_t rx_key, rx_ms, ms;
  vol_t rx_vol;
  logic full, master_empty, consume;
  logic [NW-1:0] n;
  item_t [B-1:0] items;
  int checks = 0, failures = 0, n_blocked = 0;

  always #5 clk = ~clk;

  refill_buffer #(.TBL_W(TBL_W), .B(B)) dut (.*);

  initial begin
    item_t want[B];
    int    cnt, tbl, wait_cycles;
    key_t  wms;
    logic  wempty;
    rx_valid = 0; rx_item = 0; rx_last = 0; rx_key = '0; rx_vol = '0;
    rx_table = '0; rx_ms = '0; rx_master_empty = 0; consume = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 200; r++) begin
      cnt    = (r % 7 == 0) ? 0 : $urandom_range(1, B);
      tbl    = $urandom_range(0, 399);
      wms    = $urandom();
      wempty = $urandom_range(0, 1);
      for (int i = 0; i < B; i++) want[i] = '{key: $urandom(), vol: $urandom()};
      for (int i = 0; i < ((cnt == 0) ? 1 : cnt); i++) begin
        @(negedge clk);
        rx_valid = $urandom_range(0, 3) != 0;
        while (!rx_valid) begin
          @(negedge clk);
          rx_valid = $urandom_range(0, 3) != 0;
        end
        rx_table = TBL_W'(tbl);
        rx_item  = cnt != 0;
        rx_key   = want[i].key;
        rx_vol   = want[i].vol;
        rx_last  = (cnt == 0) || (i == cnt - 1);
        rx_ms    = rx_last ? wms : key_t'($urandom());
        rx_master_empty = rx_last ? wempty : $urandom_range(0, 1);
        checks++;
        if (!rx_ready) begin
          failures++;
          $display("ERROR: not ready while filling");
        end
      end
      @(negedge clk);
      rx_valid = 1;          // offer a beat of the next reply: must be refused
      rx_item  = 1;
      rx_last  = 1;
      checks++;
      if (!full || rx_ready) begin
        failures++;
        $display("ERROR: reply %0d not complete or still ready", r);
      end
      wait_cycles = $urandom_range(0, 3);
      repeat (wait_cycles) begin
        @(negedge clk);
        n_blocked++;
      end
      rx_valid = 0;
      checks++;
      if (int'(table_id) != tbl || int'(n) != cnt || ms != wms || master_empty != wempty) begin
        failures++;
        $display("ERROR: reply %0d header n=%0d want %0d", r, n, cnt);
      end
      for (int i = 0; i < cnt; i++) begin
        checks++;
        if (items[i] != want[i]) begin
          failures++;
          $display("ERROR: reply %0d item %0d", r, i);
        end
      end
      consume = 1;
      @(negedge clk);
      consume = 0;
      checks++;
      if (full) begin
        failures++;
        $display("ERROR: still full after consume");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
