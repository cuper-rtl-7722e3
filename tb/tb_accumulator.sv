// tb_accumulator: (reduced to 16 rows per lane, 10 in use) sixteen lanes fed
// at once with ordered tokens for two batches; every lane's output stream is
// checked against an FP32 reference, lane i delivering addresses r * 16 + i,
// and the summed merge count must be 2 per lane.
module tb_accumulator;
  import cuper_pkg::*;
  import tb_fp_pkg::*;
  import tb_spmv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int L = 16, NR = 10, NB = 2;
  logic start, done;
  logic [16:0] cfg_rows;
  logic [15:0] cfg_batches;
  logic in_valid [L], in_ready [L], out_valid [L], out_ready [L];
  acc_tok_t in_tok [L];
  res_t out [L];
  logic [31:0] raw_stalls, bubbles, merges;
  int checks = 0, failures = 0;

  accumulator #(.ROWS(16)) dut (.*);

  acc_tok_t src [L][$];
  logic [31:0] psum [L][NR];
  int n_out [L];

  for (genvar l = 0; l < L; l++) begin : g_l
    bit sfire = 0;
    always @(negedge clk) begin
      if (sfire) void'(src[l].pop_front());
      in_valid[l] = src[l].size() != 0 && $urandom_range(0, 4) != 0;
      in_tok[l]   = (src[l].size() != 0) ? src[l][0] : '0;
      out_ready[l] = $urandom_range(0, 1);
      #1;
      sfire = rst_n && in_valid[l] && in_ready[l];
      if (rst_n && out_valid[l] && out_ready[l]) begin
        checks++;
        if (out[l].addr != 32'(n_out[l] * 16 + l) || out[l].val != psum[l][n_out[l]] ||
            out[l].last != (n_out[l] == NR - 1)) begin
          failures++;
          if (failures < 10) $display("lane %0d row %0d got %h exp %h", l, n_out[l], out[l].val, psum[l][n_out[l]]);
        end
        n_out[l]++;
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; cfg_rows = NR; cfg_batches = NB;
    for (int l = 0; l < L; l++) begin
      n_out[l] = 0;
      for (int r = 0; r < NR; r++) psum[l][r] = 0;
      for (int b = 0; b < NB; b++) begin
        nz_t nz [$], slots [$];
        logic [31:0] bs [NR];
        nz.delete(); slots.delete();
        for (int r = 0; r < NR; r++) bs[r] = 0;
        for (int i = 0; i < 50; i++)
          nz.push_back('{row: 16'($urandom_range(0, NR - 1)), col: 0, val: rand_f(8)});
        order_nz(nz, slots, 1);
        foreach (slots[i]) begin
          if (slots[i].col == IDLE_COL) src[l].push_back('{kind: K_BUBBLE, row: 0, val: 0});
          else begin
            src[l].push_back('{kind: K_ELEM, row: slots[i].row, val: slots[i].val});
            bs[slots[i].row] = ref_add(bs[slots[i].row], slots[i].val);
          end
        end
        src[l].push_back('{kind: K_EOB, row: 0, val: 0});
        for (int r = 0; r < NR; r++) psum[l][r] = (b == 0) ? bs[r] : ref_add(bs[r], psum[l][r]);
      end
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    for (int l = 0; l < L; l++) begin
      checks++;
      if (n_out[l] != NR) failures++;
    end
    checks += 2;
    if (merges != L * NB) failures++;
    if (raw_stalls != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
