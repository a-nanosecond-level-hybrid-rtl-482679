// table_update: the search-and-modify step of cache-table insertion and
// deletion, done for every slot in parallel in one combinational pass.
//
// Each valid slot compares its key with the order key. On a match an
// insertion adds the order volume and a deletion subtracts it; a deletion
// that leaves zero or less volume clears the slot's valid flag, so the
// sorter moves it to the end of the table. An insertion whose key is in no
// slot writes (key, volume) into the last slot, C[N-1], which the caller
// guarantees is free (the table is spilled before it can fill). The result
// is unsorted; the caller passes it through bitonic_sorter.
//
// Interface: purely combinational. is_delete selects deletion, otherwise
// insertion. found reports whether the key was in the table.
//
// This follows the insertion and deletion routines of the source, with the
// new-key test read as "no slot matched" (found == 0).
module table_update
  import mdg_pkg::*;
#(
  parameter int N = 50
) (
  input  entry_t [N-1:0] tbl_in,
  input  logic           is_delete,
  input  key_t           key,
  input  vol_t           vol,
  output entry_t [N-1:0] tbl_out,
  output logic           found
);

  always_comb begin
    found   = 1'b0;
    tbl_out = tbl_in;
    for (int i = 0; i < N; i++) begin
      if (tbl_in[i].valid && tbl_in[i].key == key) begin
        found = 1'b1;
        if (is_delete) begin
          tbl_out[i].vol = tbl_in[i].vol - vol;
          if (tbl_in[i].vol - vol <= 0) tbl_out[i].valid = 1'b0;
        end else begin
          tbl_out[i].vol = tbl_in[i].vol + vol;
        end
      end
    end
    if (!is_delete && !found) tbl_out[N-1] = '{valid: 1'b1, key: key, vol: vol};
  end

endmodule
