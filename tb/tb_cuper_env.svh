// tb_cuper_env.svh: test environment shared by the end-to-end testbenches of
// cuper_top. It holds the HBM channel models, the host-side preparation of a
// random sparse matrix (slicing into 128-column batches, cyclic row-to-core
// allocation, conflict- and reuse-aware ordering, packing behind per-batch
// headers), an FP32 reference of y computed in the order the hardware adds,
// the capture of the written y, and the run task. The including module
// defines MAT_WORDS (beats per matrix channel model) and WATCHDOG (cycles).

  import cuper_pkg::*;
  import tb_fp_pkg::*;
  import tb_spmv_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        start, done;
  logic [15:0] cfg_batches;
  logic [16:0] cfg_rows;
  logic [31:0] cfg_mat_beats [NUM_CH];
  logic [3:0]  cfg_xbar_sel  [NUM_CORES];
  logic        mat_rd_req_valid [NUM_CH], mat_rd_req_ready [NUM_CH];
  rd_req_t     mat_rd_req [NUM_CH];
  logic        mat_rd_rsp_valid [NUM_CH], mat_rd_rsp_ready [NUM_CH];
  beat_t       mat_rd_rsp_data [NUM_CH];
  logic        vec_rd_req_valid, vec_rd_req_ready, vec_rd_rsp_valid, vec_rd_rsp_ready;
  rd_req_t     vec_rd_req;
  beat_t       vec_rd_rsp_data;
  logic        y_wr_valid, y_wr_ready;
  wr_req_t     y_wr_req;
  logic [31:0] st_reuse_hits, st_bram_reads, st_vec_writes, st_vec_skips,
               st_raw_stalls, st_bubbles, st_merges, st_y_beats;

  int checks = 0, failures = 0;
  beat_t chan_beats [NUM_CH][$];
  logic  load_req = 0;

  cuper_top dut (.*);

  for (genvar c = 0; c < NUM_CH; c++) begin : g_hbm
    hbm_rd_model #(.WORDS(MAT_WORDS), .LAT(20 + c), .STALL(1)) u_m (
      .clk, .rst_n, .req_valid (mat_rd_req_valid[c]), .req_ready (mat_rd_req_ready[c]),
      .req (mat_rd_req[c]), .rsp_valid (mat_rd_rsp_valid[c]), .rsp_ready (mat_rd_rsp_ready[c]),
      .rsp_data (mat_rd_rsp_data[c]));
    always @(posedge load_req)
      foreach (chan_beats[c][i]) if (i < MAT_WORDS) u_m.mem[i] = chan_beats[c][i];
  end
  hbm_rd_model #(.WORDS(4096), .LAT(24), .STALL(1)) u_vec (
    .clk, .rst_n, .req_valid (vec_rd_req_valid), .req_ready (vec_rd_req_ready),
    .req (vec_rd_req), .rsp_valid (vec_rd_rsp_valid), .rsp_ready (vec_rd_rsp_ready),
    .rsp_data (vec_rd_rsp_data));

  // y channel: written beats
  logic [31:0] y_mem [int];
  int n_wr = 0;
  always @(posedge clk) begin
    y_wr_ready <= ($urandom_range(0, 7) != 0);
    if (rst_n && y_wr_valid && y_wr_ready) begin
      for (int j = 0; j < VEC_PER_BEAT; j++) y_mem[int'(y_wr_req.addr) * VEC_PER_BEAT + j] = y_wr_req.data[32*j +: 32];
      n_wr++;
    end
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One operation. rows: rows per lane; nb: batches; nnz: non-zeros per
  // (core, batch); blank_core: core with an empty slice column in batch 1;
  // dense_core: core whose batch-0 non-zeros crowd into two rows (idle slots);
  // unordered_core: core whose non-zeros are packed without reordering
  // (-1: none); rot: crossbar rotation (core k reads channel (k+rot)%16).
  // Returns the mechanism counters through the st_* outputs.
  task automatic run_op(int rows, int nb, int nnz, int blank_core, int dense_core,
                        int unordered_core, int rot);
    logic [31:0] xv [];
    logic [31:0] yref [];
    int nrows;
    longint t0;
    nrows = rows * NUM_CORES;
    xv = new[nb * BATCH_COLS];
    yref = new[nrows];
    foreach (xv[i]) xv[i] = rand_f(6);
    for (int b = 0; b < nb; b++)
      for (int j = 0; j < VEC_BEATS; j++)
        for (int v = 0; v < VEC_PER_BEAT; v++)
          u_vec.mem[b * VEC_BEATS + j][32*v +: 32] = xv[b * BATCH_COLS + j * VEC_PER_BEAT + v];
    for (int k = 0; k < NUM_CORES; k++) begin
      beat_t beats [$];
      logic [31:0] psum [];
      int ch;
      ch = (k + rot) % NUM_CH;
      cfg_xbar_sel[k] = 4'(ch);
      psum = new[rows];
      beats.delete();
      for (int b = 0; b < nb; b++) begin
        nz_t nz [$], slots [$];
        logic [31:0] bs [];
        nz.delete(); slots.delete();
        bs = new[rows];
        foreach (bs[r]) bs[r] = 0;
        if (!(k == blank_core && b == 1))
          for (int i = 0; i < nnz; i++) begin
            int lr;
            lr = (k == dense_core && b == 0) ? $urandom_range(0, 1) : $urandom_range(0, rows - 1);
            // columns drawn from a few hot columns and the whole batch
            nz.push_back('{row: 16'(lr),
                           col: 16'(($urandom_range(0, 2) == 0) ? $urandom_range(0, 3) * 17 : $urandom_range(0, BATCH_COLS - 1)),
                           val: rand_f(6)});
          end
        order_nz(nz, slots, k != unordered_core);
        pack(slots, beats);
        foreach (slots[i]) if (slots[i].col != IDLE_COL)
          bs[slots[i].row] = ref_add(bs[slots[i].row], ref_mul(slots[i].val, xv[b * BATCH_COLS + slots[i].col]));
        foreach (psum[r]) psum[r] = (b == 0) ? bs[r] : ref_add(bs[r], psum[r]);
      end
      foreach (psum[r]) yref[r * NUM_CORES + k] = psum[r];
      if (beats.size() > MAT_WORDS) begin
        failures++; $display("matrix channel model too small: %0d beats", beats.size());
      end
      chan_beats[ch] = beats;
      cfg_mat_beats[ch] = 32'(beats.size());
    end
    load_req = 1; #1; load_req = 0;
    cfg_rows = 17'(rows);
    cfg_batches = 16'(nb);
    y_mem.delete();
    n_wr = 0;
    @(negedge clk); start = 1; t0 = cyc; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    $display("operation: %0d rows, %0d batches, %0d cycles", nrows, nb, cyc - t0);
    checks++;
    if (n_wr != (nrows + VEC_PER_BEAT - 1) / VEC_PER_BEAT) begin
      failures++; $display("%0d beats written", n_wr);
    end
    for (int r = 0; r < nrows; r++) begin
      checks++;
      if (!y_mem.exists(r) || y_mem[r] != yref[r]) begin
        failures++;
        if (failures < 10) $display("y[%0d] = %h expected %h", r, y_mem.exists(r) ? y_mem[r] : 32'hx, yref[r]);
      end
    end
    $display("reuse hits %0d, BRAM reads %0d, vector beats written %0d, skipped %0d, bubbles %0d, RAW stall cycles %0d, merges %0d",
             st_reuse_hits, st_bram_reads, st_vec_writes, st_vec_skips, st_bubbles, st_raw_stalls, st_merges);
    checks++;
    if (st_merges != 32'(nb * NUM_CORES)) failures++;
  endtask

  task automatic init();
    start = 0; cfg_batches = 1; cfg_rows = 1;
    for (int c = 0; c < NUM_CH; c++) begin cfg_mat_beats[c] = 0; cfg_xbar_sel[c] = 4'(c); end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
  endtask
