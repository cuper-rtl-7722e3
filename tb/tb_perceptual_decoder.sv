// tb_perceptual_decoder: three batches of host-ordered packets (the second
// batch blank for this core) with random input gaps and PE back-pressure.
// Checks every lane offered to the PE group (kind, row, value and the fetched
// x), the end-of-batch packets, the statistics (reuse hits, BRAM reads,
// vector beats written and skipped) and done.
module tb_perceptual_decoder;
  import cuper_pkg::*;
  import tb_spmv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, pkt_valid, pkt_ready, vb_valid, hdr_ok, batch_go, done, pe_valid, pe_ready;
  logic [15:0] cfg_batches;
  beat_t pkt_data, vb_data;
  logic [2:0] vb_idx;
  kind_e pe_kind [NUM_PE];
  logic [15:0] pe_row [NUM_PE];
  logic [31:0] pe_val [NUM_PE], pe_x [NUM_PE];
  logic [31:0] reuse_hits, bram_reads, vec_writes, vec_skips;
  int checks = 0, failures = 0;

  perceptual_decoder dut (.*);

  localparam int NB = 3;
  logic [31:0] xs [NB][BATCH_COLS];
  beat_t src [$];
  typedef struct { kind_e kind [NUM_PE]; logic [15:0] row [NUM_PE]; logic [31:0] val [NUM_PE]; logic [31:0] x [NUM_PE]; } lanes_t;
  lanes_t exp_q [$];
  int exp_hits = 0, exp_reads = 0;

  // packet source with gaps
  bit sfire = 0;
  always @(negedge clk) begin
    if (sfire) void'(src.pop_front());
    pkt_valid = src.size() != 0 && $urandom_range(0, 3) != 0;
    pkt_data  = (src.size() != 0) ? src[0] : '0;
    pe_ready  = $urandom_range(0, 2) != 0;
    #1;
    sfire = rst_n && pkt_valid && pkt_ready;
    if (rst_n && pe_valid && pe_ready) begin
      lanes_t e;
      e = exp_q.pop_front();
      for (int k = 0; k < NUM_PE; k++) begin
        checks++;
        if (pe_kind[k] != e.kind[k] ||
            (e.kind[k] == K_ELEM && (pe_row[k] != e.row[k] || pe_val[k] != e.val[k] || pe_x[k] != e.x[k]))) begin
          failures++;
          if (failures < 10) $display("lane %0d kind %0d/%0d x %h/%h", k, pe_kind[k], e.kind[k], pe_x[k], e.x[k]);
        end
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
      for (int i = 0; i < BATCH_COLS; i++) xs[b][i] = 32'(b * 100000 + i * 13 + 1);
      if (b != 1) begin
        for (int i = 0; i < 150; i++)
          nz.push_back('{row: 16'($urandom_range(0, 40)), col: 16'($urandom_range(0, 7) * 16 + $urandom_range(0, 1)), val: 32'($urandom)});
      end
      order_nz(nz, slots, 1);
      pack(slots, src);
      exp_hits += count_hits(slots);
      foreach (slots[i]) if (slots[i].col != IDLE_COL) exp_reads++;
      for (int p = 0; p < (slots.size() + 7) / 8; p++) begin
        lanes_t e;
        for (int k = 0; k < NUM_PE; k++) begin
          int i;
          i = p * 8 + k;
          e.kind[k] = (i < slots.size() && slots[i].col != IDLE_COL) ? K_ELEM : K_BUBBLE;
          if (e.kind[k] == K_ELEM) begin
            e.row[k] = slots[i].row; e.val[k] = slots[i].val; e.x[k] = xs[b][slots[i].col];
          end
        end
        exp_q.push_back(e);
      end
      begin
        lanes_t e;
        for (int k = 0; k < NUM_PE; k++) e.kind[k] = (k == 0) ? K_EOB : K_NOP;
        exp_q.push_back(e);
      end
    end
    exp_reads -= exp_hits;
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
    checks += 5;
    if (!done) begin failures++; $display("not done"); end
    if (reuse_hits != exp_hits) begin failures++; $display("hits %0d exp %0d", reuse_hits, exp_hits); end
    if (bram_reads != exp_reads) begin failures++; $display("reads %0d exp %0d", bram_reads, exp_reads); end
    if (vec_writes != 16) begin failures++; $display("vec writes %0d", vec_writes); end
    if (vec_skips != 8) begin failures++; $display("vec skips %0d", vec_skips); end
    $display("reuse hits %0d, BRAM reads %0d", reuse_hits, bram_reads);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
