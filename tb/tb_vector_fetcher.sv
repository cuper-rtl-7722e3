// tb_vector_fetcher: loads a 128-value segment, then reads random packets whose
// columns repeat often (so the reuse register and the lane chain are used),
// with idle lanes and random hold. Every non-idle lane must deliver x[col];
// hits and idle lanes must not disturb the chain. A second segment and a
// reuse_clear check that no stale value survives a batch change.
module tb_vector_fetcher;
  import cuper_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_en, rd_en, hold, reuse_clear, reuse_col_valid, x_valid, adv;
  logic [2:0] wr_idx;
  beat_t wr_data;
  logic [6:0] rd_col [NUM_PE];
  logic rd_hit [NUM_PE], rd_idle [NUM_PE];
  logic [15:0] reuse_col;
  logic [31:0] x_out [NUM_PE];
  int checks = 0, failures = 0, hits = 0;

  vector_fetcher dut (.*);

  logic [31:0] xseg [BATCH_COLS];
  typedef struct { logic [31:0] v [NUM_PE]; logic idle [NUM_PE]; } exp_t;
  exp_t exp_q [$];
  bit   m_valid;
  logic [6:0] m_col;

  task automatic load_segment(int seed);
    for (int i = 0; i < BATCH_COLS; i++) xseg[i] = 32'(seed * 1000 + i * 7 + 3);
    for (int b = 0; b < VEC_BEATS; b++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 3'(b);
      for (int j = 0; j < 16; j++) wr_data[32*j +: 32] = xseg[b * 16 + j];
    end
    @(negedge clk); wr_en = 0;
    reuse_clear = 1; m_valid = 0;
    @(negedge clk); reuse_clear = 0;
  endtask

  task automatic run_packets(int n);
    int sent = 0;
    while (sent < n || exp_q.size() != 0) begin
      @(negedge clk);
      hold = ($urandom_range(0, 3) == 0);
      rd_en = (sent < n) && ($urandom_range(0, 3) != 0);
      if (rd_en) begin
        exp_t e;
        bit pv;
        logic [6:0] pc;
        int base;
        pv = m_valid; pc = m_col;
        base = $urandom_range(0, 120);
        for (int k = 0; k < NUM_PE; k++) begin
          rd_idle[k] = ($urandom_range(0, 5) == 0);
          rd_col[k]  = 7'(base + $urandom_range(0, 2));
          rd_hit[k]  = !rd_idle[k] && pv && rd_col[k] == pc;
          e.idle[k]  = rd_idle[k];
          e.v[k]     = xseg[rd_col[k]];
          if (!rd_idle[k]) begin pv = 1; pc = rd_col[k]; if (rd_hit[k]) hits++; end
        end
        #1;
        if (!x_valid || !hold) begin
          exp_q.push_back(e);
          m_valid = pv; m_col = pc;
          sent++;
        end
      end
      #1;
      if (x_valid && !hold) begin
        exp_t e;
        e = exp_q.pop_front();
        for (int k = 0; k < NUM_PE; k++) if (!e.idle[k]) begin
          checks++;
          if (x_out[k] != e.v[k]) begin
            failures++;
            if (failures < 10) $display("lane %0d got %h exp %h", k, x_out[k], e.v[k]);
          end
        end
      end
    end
    @(negedge clk); rd_en = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; rd_en = 0; hold = 0; reuse_clear = 0; wr_idx = 0; wr_data = '0; m_valid = 0; m_col = 0;
    for (int k = 0; k < NUM_PE; k++) begin rd_col[k] = 0; rd_hit[k] = 0; rd_idle[k] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    load_segment(1);
    run_packets(400);
    load_segment(2);
    run_packets(400);
    checks++;
    if (hits < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
