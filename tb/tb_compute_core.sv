// tb_compute_core: one core fed with three host-ordered batches (the second
// blank), random input gaps and random accumulator back-pressure. The token
// stream leaving the core must be, in order, (row, value * x[col]) for every
// non-zero, a bubble for every idle slot and one end-of-batch per batch; the
// vector beats of the blank batch must be skipped.
module tb_compute_core;
  import cuper_pkg::*;
  import tb_fp_pkg::*;
  import tb_spmv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, pkt_valid, pkt_ready, vb_valid, hdr_ok, batch_go, done, out_valid, out_ready;
  logic [15:0] cfg_batches;
  beat_t pkt_data, vb_data;
  logic [2:0] vb_idx;
  acc_tok_t out_tok;
  logic [31:0] reuse_hits, bram_reads, vec_writes, vec_skips;
  int checks = 0, failures = 0;

  compute_core dut (.*);

  localparam int NB = 3;
  logic [31:0] xs [NB][BATCH_COLS];
  beat_t src [$];
  acc_tok_t exp_q [$];

  bit sfire = 0;
  always @(negedge clk) begin
    if (sfire) void'(src.pop_front());
    pkt_valid = src.size() != 0 && $urandom_range(0, 3) != 0;
    pkt_data  = (src.size() != 0) ? src[0] : '0;
    out_ready = $urandom_range(0, 3) != 0;
    #1;
    sfire = rst_n && pkt_valid && pkt_ready;
    if (rst_n && out_valid && out_ready) begin
      acc_tok_t e;
      e = exp_q.pop_front();
      checks++;
      if (out_tok != e) begin
        failures++;
        if (failures < 10) $display("got %p exp %p", out_tok, e);
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; vb_valid = 0; vb_idx = 0; vb_data = '0; batch_go = 0; cfg_batches = NB;
    for (int b = 0; b < NB; b++) begin
      nz_t nz [$], slots [$];
      nz.delete(); slots.delete();
      for (int i = 0; i < BATCH_COLS; i++) xs[b][i] = rand_f(10);
      if (b != 1)
        for (int i = 0; i < 120; i++)
          nz.push_back('{row: 16'($urandom_range(0, 20)), col: 16'($urandom_range(0, 127)), val: rand_f(10)});
      order_nz(nz, slots, 1);
      pack(slots, src);
      foreach (slots[i]) begin
        if (slots[i].col == IDLE_COL) exp_q.push_back('{kind: K_BUBBLE, row: 0, val: 0});
        else exp_q.push_back('{kind: K_ELEM, row: slots[i].row, val: ref_mul(slots[i].val, xs[b][slots[i].col])});
      end
      for (int i = slots.size(); i % 8 != 0; i++) exp_q.push_back('{kind: K_BUBBLE, row: 0, val: 0});
      exp_q.push_back('{kind: K_EOB, row: 0, val: 0});
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int b = 0; b < NB; b++) begin
      while (!hdr_ok) @(negedge clk);
      for (int j = 0; j < VEC_BEATS; j++) begin
        vb_valid = 1; vb_idx = 3'(j);
        for (int v = 0; v < 16; v++) vb_data[32*v +: 32] = xs[b][j * 16 + v];
        @(negedge clk);
      end
      vb_valid = 0;
      batch_go = 1; @(negedge clk); batch_go = 0;
      @(negedge clk);
      while (!hdr_ok && !done) @(negedge clk);
    end
    while (exp_q.size() != 0) @(negedge clk);
    checks += 2;
    if (!done) failures++;
    if (vec_skips != 8 || vec_writes != 16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
