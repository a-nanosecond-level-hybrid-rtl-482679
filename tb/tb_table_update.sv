// tb_table_update: checks the parallel search-and-modify step against a
// reference written as a plain loop: insert onto an existing key adds the
// volume, a new key lands in the last slot, delete subtracts and clears a
// slot whose volume reaches zero or below, and a missing key changes nothing.
module tb_table_update;
  import mdg_pkg::*;

  localparam int N = 50;

  entry_t [N-1:0] tbl_in, tbl_out;
  logic           is_delete, found;
  key_t           key;
  vol_t           vol;
  int checks = 0, failures = 0;

  table_update #(.N(N)) dut (.*);

  // sorted table of `cnt` distinct keys 100, 110, ...; rest invalid
  function automatic entry_t [N-1:0] make_table(int cnt);
    entry_t [N-1:0] t = '0;
    for (int i = 0; i < cnt; i++)
      t[i] = '{valid: 1'b1, key: key_t'(100 + 10 * i), vol: vol_t'(5 + i)};
    return t;
  endfunction

  task automatic check(string what, entry_t [N-1:0] want, logic want_found);
    #1;
    checks++;
    if (tbl_out !== want || found !== want_found) begin
      failures++;
      $display("ERROR: %s", what);
    end
  endtask

  initial begin
    entry_t [N-1:0] w;
    int idx, cnt;
    for (int rep = 0; rep < 300; rep++) begin
      cnt    = $urandom_range(0, N - 1);
      tbl_in = make_table(cnt);
      idx    = $urandom_range(0, N - 1);
      is_delete = $urandom_range(0, 1);
      key    = (idx < cnt && $urandom_range(0, 3) != 0) ? key_t'(100 + 10 * idx)
                                                      : key_t'(101 + 10 * idx);
      vol    = vol_t'($urandom_range(1, 60));
      w = tbl_in;
      if (key % 10 == 0 && idx < cnt) begin
        if (is_delete) begin
          w[idx].vol = tbl_in[idx].vol - vol;
          if (w[idx].vol <= 0) w[idx].valid = 1'b0;
        end else w[idx].vol = tbl_in[idx].vol + vol;
        check("hit", w, 1'b1);
      end else begin
        if (!is_delete) w[N-1] = '{valid: 1'b1, key: key, vol: vol};
        check("miss", w, 1'b0);
      end
    end
    // exact zero clears the slot
    tbl_in = make_table(3); is_delete = 1'b1; key = 110; vol = 6;
    w = tbl_in; w[1].vol = 0; w[1].valid = 1'b0;
    check("delete to zero", w, 1'b1);
    // invalid slots holding the same key are not matched
    tbl_in = make_table(3); tbl_in[5] = '{valid: 1'b0, key: 500, vol: 9};
    is_delete = 1'b0; key = 500; vol = 4;
    w = tbl_in; w[N-1] = '{valid: 1'b1, key: 500, vol: 4};
    check("stale slot ignored", w, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
