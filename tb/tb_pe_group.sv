// tb_pe_group: random packets of elements, bubbles and end-of-batch packets
// under random back-pressure. The output must be, in packet and lane order,
// one token per element (row, value*x rounded as FP32), per bubble and per
// end-of-batch, with no-ops dropped. A final phase with the output always
// ready checks the rate: 160 element tokens leave in 160 consecutive cycles.
module tb_pe_group;
  import cuper_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  kind_e in_kind [NUM_PE];
  logic [15:0] in_row [NUM_PE];
  logic [31:0] in_val [NUM_PE], in_x [NUM_PE];
  acc_tok_t out_tok;
  int checks = 0, failures = 0;
  acc_tok_t exp_q [$];
  bit rand_out = 1;
  int n_out = 0;
  longint first_t = -1, last_t = 0, now = 0;

  pe_group dut (.*);

  always @(posedge clk) now <= now + 1;

  always @(negedge clk) begin
    out_ready = rand_out ? ($urandom_range(0, 2) == 0) : 1'b1;
    #1;
    if (rst_n && out_valid && out_ready) begin
      acc_tok_t e;
      e = exp_q.pop_front();
      checks++;
      if (out_tok != e) begin
        failures++;
        if (failures < 10) $display("got %p exp %p", out_tok, e);
      end
      n_out++;
      if (first_t < 0) first_t = now;
      last_t = now;
    end
  end

  task automatic send(int mode);  // 0 random, 1 all elements, 2 end of batch
    @(negedge clk);
    in_valid = 1;
    for (int k = 0; k < NUM_PE; k++) begin
      int r;
      r = $urandom_range(0, 9);
      in_row[k] = 16'($urandom);
      in_val[k] = rand_f(20);
      in_x[k]   = rand_f(20);
      if (mode == 2)      in_kind[k] = (k == 0) ? K_EOB : K_NOP;
      else if (mode == 1) in_kind[k] = K_ELEM;
      else                in_kind[k] = (r < 7) ? K_ELEM : (r < 9) ? K_BUBBLE : K_NOP;
    end
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    for (int k = 0; k < NUM_PE; k++)
      if (in_kind[k] != K_NOP)
        exp_q.push_back('{kind: in_kind[k], row: in_row[k],
                          val: (in_kind[k] == K_ELEM) ? ref_mul(in_val[k], in_x[k]) : 32'd0});
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0;
    for (int k = 0; k < NUM_PE; k++) begin in_kind[k] = K_NOP; in_row[k] = 0; in_val[k] = 0; in_x[k] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int p = 0; p < 300; p++) send((p % 37 == 36) ? 2 : 0);
    @(negedge clk); in_valid = 0;
    while (exp_q.size() != 0) @(negedge clk);
    // rate
    rand_out = 0; n_out = 0; first_t = -1;
    for (int p = 0; p < 20; p++) send(1);
    @(negedge clk); in_valid = 0;
    while (exp_q.size() != 0) @(negedge clk);
    checks++;
    if (n_out != 160 || last_t - first_t != 159) begin
      failures++; $display("rate: %0d tokens in %0d cycles", n_out, last_t - first_t + 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
