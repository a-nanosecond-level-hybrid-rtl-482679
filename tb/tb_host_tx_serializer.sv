// tb_host_tx_serializer: feeds random batches (spills of 1..B items,
// forwarded deletions, refill requests) through a queue acting as the FIFO
// and checks the beat stream against the batches: one beat per item in
// order, a single beat for deletions and requests (volume = items wanted),
// tx_last on the final beat, and one pop per batch, under random tx_ready.
module tb_host_tx_serializer;
  import mdg_pkg::*;

  localparam int TBL_W = 9;
  localparam int B     = 25;
  localparam int NW    = $clog2(B + 1);

  typedef struct {
    host_op_e op;
    int       tbl;
    int       n;
    item_t    items[B];
  } batch_t;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, in_pop, tx_valid, tx_ready, tx_last;
  host_op_e in_op, tx_op;
  logic [TBL_W-1:0] in_tbl, tx_table;
  logic [NW-1:0] in_n;
  item_t [B-1:0] in_items;
  key_t tx_key;
  vol_t tx_vol;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  host_tx_serializer #(.TBL_W(TBL_W), .B(B)) dut (.*);

  batch_t fifo[$];
  int     beat = 0;

  // present the queue head combinationally, like a fall-through FIFO
  always_comb begin
    in_valid = fifo.size() > 0;
    in_op    = H_INSERT; in_tbl = '0; in_n = '0; in_items = '0;
    if (fifo.size() > 0) begin
      in_op  = fifo[0].op;
      in_tbl = TBL_W'(fifo[0].tbl);
      in_n   = NW'(fifo[0].n);
      for (int i = 0; i < B; i++) in_items[i] = fifo[0].items[i];
    end
  end

  always @(posedge clk) begin
    if (rst_n && tx_valid && tx_ready) begin
      batch_t b;
      int nb;
      b  = fifo[0];
      nb = (b.op == H_INSERT) ? b.n : 1;
      checks++;
      if (tx_op != b.op || int'(tx_table) != b.tbl || tx_last != (beat == nb - 1) ||
          (b.op == H_REFILL_REQ && tx_vol != vol_t'(b.n)) ||
          (b.op != H_REFILL_REQ && (tx_key != b.items[beat].key || tx_vol != b.items[beat].vol))) begin
        failures++;
        $display("ERROR: beat %0d of batch op=%0d n=%0d", beat, b.op, b.n);
      end
      checks++;
      if (in_pop != tx_last) begin
        failures++;
        $display("ERROR: pop");
      end
      if (beat == nb - 1) begin
        beat = 0;
        void'(fifo.pop_front());
      end else beat++;
    end
  end

  int sent = 0;
  initial begin
    tx_ready = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 300; k++) begin
      batch_t b;
      b.op  = host_op_e'($urandom_range(0, 2));
      b.tbl = $urandom_range(0, 399);
      b.n   = (b.op == H_DELETE) ? 1 : (b.op == H_REFILL_REQ ? B : $urandom_range(1, B));
      for (int i = 0; i < B; i++) b.items[i] = '{key: $urandom(), vol: $urandom()};
      fifo.push_back(b);
      sent++;
    end
    while (fifo.size() > 0) begin
      @(negedge clk);
      tx_ready = $urandom_range(0, 3) != 0;
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
