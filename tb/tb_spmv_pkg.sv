// tb_spmv_pkg: host-side preparation of the matrix dataflow for testbenches.
//
// For one core and one batch it takes the non-zeros (local row, column in the
// batch, value) and orders them as the host would before packing:
//  - conflict-aware: a slot takes the first remaining non-zero whose row is
//    not among the previous three slots' rows (window of four); if none
//    exists among the next LOOKAHEAD candidates the slot stays idle;
//  - reuse-aware: among the admissible non-zeros one with the same column as
//    the previous slot is preferred.
// The ordered slots are packed eight per packet (idle slots with column
// 0xFFFF, the last packet padded with idle slots) behind a header beat that
// carries the packet count. reorder=0 packs the non-zeros in their given
// order, to provoke read-after-write conflicts.
package tb_spmv_pkg;
  import cuper_pkg::*;

  localparam int LOOKAHEAD = 64;  // candidates examined per slot

  typedef struct {
    logic [15:0] row;
    logic [15:0] col;
    logic [31:0] val;
  } nz_t;

  function automatic void order_nz(ref nz_t nz [$], output nz_t slots [$],
                                   input bit reorder);
    nz_t rest [$];
    slots.delete();
    rest = nz;
    if (!reorder) begin
      slots = nz;
      return;
    end
    while (rest.size() != 0) begin
      int pick;
      pick = -1;
      for (int i = 0; i < rest.size() && i < LOOKAHEAD; i++) begin
        bit ok;
        ok = 1;
        for (int d = 1; d <= 3; d++)
          if (slots.size() >= d && slots[slots.size() - d].col != IDLE_COL &&
              slots[slots.size() - d].row == rest[i].row) ok = 0;
        if (ok) begin
          if (pick < 0) pick = i;
          if (slots.size() > 0 && slots[slots.size() - 1].col == rest[i].col) begin
            pick = i;
            break;
          end
        end
      end
      if (pick < 0) slots.push_back('{row: 16'd0, col: IDLE_COL, val: 32'd0});
      else begin
        slots.push_back(rest[pick]);
        rest.delete(pick);
      end
    end
  endfunction

  // header beat then packets
  function automatic void pack(ref nz_t slots [$], ref beat_t beats [$]);
    int np;
    np = (slots.size() + NUM_PE - 1) / NUM_PE;
    beats.push_back(beat_t'(np));
    for (int p = 0; p < np; p++) begin
      packet_t pk;
      for (int k = 0; k < NUM_PE; k++) begin
        int i;
        i = p * NUM_PE + k;
        if (i < slots.size()) pk[k] = '{val: slots[i].val, row: slots[i].row, col: slots[i].col};
        else                  pk[k] = '{val: 32'd0, row: 16'd0, col: IDLE_COL};
      end
      beats.push_back(beat_t'(pk));
    end
  endfunction

  // reuse hits the decoder should count for a slot sequence
  function automatic int count_hits(ref nz_t slots [$]);
    int h;
    bit pv;
    logic [15:0] pc;
    h = 0; pv = 0; pc = 0;
    foreach (slots[i]) if (slots[i].col != IDLE_COL) begin
      if (pv && slots[i].col == pc) h++;
      pv = 1; pc = slots[i].col;
    end
    return h;
  endfunction
endpackage
