// tb_bitonic_sorter: checks the sorting network on random tables against a
// reference sort done in the testbench (valid entries ascending by key,
// invalid entries last), and that every result appears exactly
// log2(NP)*(log2(NP)+1)/2 cycles after its input. Tables are fed back to
// back to check the pipeline, including duplicate keys and empty tables.
module tb_bitonic_sorter;
  import mdg_pkg::*;

  localparam int N      = 50;
  localparam int LOGN   = 6;
  localparam int STAGES = LOGN * (LOGN + 1) / 2;   // 21
  localparam int NTEST  = 200;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  entry_t [N-1:0] in_data, out_data;
  int checks = 0, failures = 0;
  longint cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  bitonic_sorter #(.N(N)) dut (.*);

  entry_t [N-1:0] exp_q[$];
  longint         t_in[$];

  // reference: selection of the valid keys in ascending order
  function automatic entry_t [N-1:0] ref_sort(entry_t [N-1:0] t);
    entry_t [N-1:0] r = '0;
    entry_t v[$];
    foreach (t[i]) if (t[i].valid) v.push_back(t[i]);
    v.sort() with (item.key);
    foreach (v[i]) r[i] = v[i];
    return r;
  endfunction

  function automatic entry_t [N-1:0] rand_table(int mode);
    entry_t [N-1:0] t;
    for (int i = 0; i < N; i++) begin
      t[i].valid = (mode == 0) ? 1'b0 : ($urandom_range(0, 3) != 0);
      t[i].key   = (mode == 2) ? key_t'($urandom_range(0, 7)) : key_t'($urandom());
      t[i].vol   = vol_t'($urandom_range(1, 1000));
    end
    return t;
  endfunction

  // compare ignoring fields of invalid slots and the order of equal keys
  function automatic logic same(entry_t [N-1:0] a, entry_t [N-1:0] b);
    for (int i = 0; i < N; i++) begin
      if (a[i].valid != b[i].valid) return 1'b0;
      if (a[i].valid && a[i].key != b[i].key) return 1'b0;
    end
    return 1'b1;
  endfunction

  // the multiset of (key, vol) pairs must be kept
  function automatic logic same_items(entry_t [N-1:0] a, entry_t [N-1:0] b);
    longint sa = 0, sb = 0;
    for (int i = 0; i < N; i++) begin
      if (a[i].valid) sa += longint'(a[i].vol) * (a[i].key % 977 + 1);
      if (b[i].valid) sb += longint'(b[i].vol) * (b[i].key % 977 + 1);
    end
    return sa == sb;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks += 3;
      if (exp_q.size() == 0) begin
        failures++;
        $display("ERROR: unexpected output");
      end else begin
        entry_t [N-1:0] e;
        longint t0;
        e  = exp_q.pop_front();
        t0 = t_in.pop_front();
        if (!same(out_data, e)) begin
          failures++;
          $display("ERROR: wrong order at cycle %0d", cycle);
        end
        if (!same_items(out_data, e)) begin
          failures++;
          $display("ERROR: items changed");
        end
        if (cycle - t0 != STAGES) begin
          failures++;
          $display("ERROR: latency %0d, want %0d", cycle - t0, STAGES);
        end
      end
    end
  end

  initial begin
    in_valid = 1'b0;
    in_data  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NTEST; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = rand_table(k < 3 ? k : (k % 3 == 0 ? 2 : 1));
      if (in_valid) begin
        exp_q.push_back(ref_sort(in_data));
        t_in.push_back(cycle);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (STAGES + 5) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("ERROR: %0d tables never came out", exp_q.size());
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
