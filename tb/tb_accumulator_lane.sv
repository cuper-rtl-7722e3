// tb_accumulator_lane: (reduced to 64 rows, 40 in use) three batches of
// products into one lane, checked against a reference that adds in the same
// order in FP32: each batch accumulates from zero, the first batch is copied
// into the partial sums, later batches are added. Run 1 sends host-ordered
// tokens (with bubbles) at one per cycle and expects no RAW stall and one
// token accepted per cycle; run 2 sends unordered tokens with many
// back-to-back equal rows and expects stalls and still exact sums. Checks the
// output addresses (r * 16 + lane), the last flag and the merge count.
module tb_accumulator_lane;
  import cuper_pkg::*;
  import tb_fp_pkg::*;
  import tb_spmv_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int ROWS = 64, NR = 40, NB = 3, LANE = 5;
  logic start, in_valid, in_ready, out_valid, out_ready, done;
  logic [16:0] cfg_rows;
  logic [15:0] cfg_batches;
  acc_tok_t in_tok;
  res_t out;
  logic [31:0] raw_stalls, bubbles, merges;
  int checks = 0, failures = 0;

  accumulator_lane #(.ROWS(ROWS), .LANE_ID(LANE)) dut (.*);

  acc_tok_t src [$];
  logic [31:0] psum [NR];
  int n_out;
  longint now = 0, t_first = -1, t_eob = 0;
  int n_tok0;
  bit sfire = 0;

  always @(posedge clk) now <= now + 1;

  always @(negedge clk) begin
    if (sfire) void'(src.pop_front());
    in_valid = src.size() != 0;
    in_tok   = (src.size() != 0) ? src[0] : '0;
    out_ready = $urandom_range(0, 1);
    #1;
    sfire = in_valid && in_ready;
    if (sfire && t_first < 0) t_first = now;
    if (sfire && in_tok.kind == K_EOB && t_eob == 0) t_eob = now;
    if (rst_n && out_valid && out_ready) begin
      checks++;
      if (out.addr != 32'(n_out * 16 + LANE) || out.val != psum[n_out] || out.last != (n_out == NR - 1)) begin
        failures++;
        if (failures < 10) $display("row %0d got %h exp %h", n_out, out.val, psum[n_out]);
      end
      n_out++;
    end
  end

  task automatic run(bit ordered);
    logic [31:0] bsum [NR];
    for (int r = 0; r < NR; r++) psum[r] = 0;
    src.delete();
    n_tok0 = 0;
    for (int b = 0; b < NB; b++) begin
      nz_t nz [$], slots [$];
      nz.delete(); slots.delete();
      for (int r = 0; r < NR; r++) bsum[r] = 0;
      for (int i = 0; i < 200; i++) begin
        int r;
        r = ordered ? ((b == 2) ? $urandom_range(0, 2) : $urandom_range(0, NR - 1)) : ((i / 5) % NR);
        nz.push_back('{row: 16'(r), col: 16'($urandom_range(0, 127)), val: rand_f(8)});
      end
      order_nz(nz, slots, ordered);
      foreach (slots[i]) begin
        if (slots[i].col == IDLE_COL) src.push_back('{kind: K_BUBBLE, row: 0, val: 0});
        else begin
          src.push_back('{kind: K_ELEM, row: slots[i].row, val: slots[i].val});
          bsum[slots[i].row] = ref_add(bsum[slots[i].row], slots[i].val);
        end
      end
      if (b == 0) n_tok0 = src.size();
      src.push_back('{kind: K_EOB, row: 0, val: 0});
      for (int r = 0; r < NR; r++) psum[r] = (b == 0) ? bsum[r] : ref_add(bsum[r], psum[r]);
    end
    n_out = 0; t_first = -1; t_eob = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks += 2;
    if (n_out != NR) begin failures++; $display("n_out %0d", n_out); end
    if (merges != NB) begin failures++; $display("merges %0d", merges); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; cfg_rows = NR; cfg_batches = NB; in_tok = '0; in_valid = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(1);
    checks += 3;
    if (raw_stalls != 0) begin failures++; $display("stalls with ordered input: %0d", raw_stalls); end
    if (bubbles == 0) begin failures++; $display("no bubbles"); end
    // tokens of batch 0 accepted one per cycle once the clear is over
    if (t_eob - t_first > n_tok0 + NR + 2) begin
      failures++; $display("batch 0: %0d tokens took %0d cycles", n_tok0, t_eob - t_first);
    end
    run(0);
    checks++;
    if (raw_stalls == 0) failures++;
    $display("unordered input: %0d RAW stall cycles", raw_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
