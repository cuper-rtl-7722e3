// tb_sort_node: two sorted streams of different lengths merged by one node,
// three times in a row; the output must be sorted, complete, and carry last
// exactly once per merge.
module tb_sort_node;
  import cuper_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic a_valid, a_ready, b_valid, b_ready, out_valid, out_ready;
  res_t a, b, out;
  int checks = 0, failures = 0;
  logic [31:0] sa [$], sb [$], exp_q [$];
  int ia, ib;

  sort_node dut (.*);

  bit fa = 0, fb = 0;
  int n_last = 0;
  always @(negedge clk) begin
    if (fa) ia++;
    if (fb) ib++;
    a_valid = ia < sa.size() && $urandom_range(0, 2) != 0;
    b_valid = ib < sb.size() && $urandom_range(0, 2) != 0;
    a = '{last: ia == sa.size() - 1, addr: (ia < sa.size()) ? sa[ia] : 0, val: 1};
    b = '{last: ib == sb.size() - 1, addr: (ib < sb.size()) ? sb[ib] : 0, val: 2};
    out_ready = $urandom_range(0, 3) != 0;
    #1;
    fa = rst_n && a_valid && a_ready;
    fb = rst_n && b_valid && b_ready;
    if (rst_n && out_valid && out_ready) check_out();
  end

  task automatic check_out();
    logic [31:0] e;
    e = exp_q.pop_front();
    checks++;
    if (out.addr != e) begin failures++; $display("got %0d exp %0d", out.addr, e); end
    checks++;
    if (out.last != (exp_q.size() == 0)) failures++;
    if (out.last) n_last++;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ia = 0; ib = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int r = 0; r < 3; r++) begin
      logic [31:0] x;
      @(negedge clk);
      sa.delete(); sb.delete(); ia = 0; ib = 0; fa = 0; fb = 0;
      x = 0; for (int i = 0; i < 10 + r * 7; i++) begin x += 32'($urandom_range(1, 5)); sa.push_back(x); end
      x = 0; for (int i = 0; i < 25 - r * 9; i++) begin x += 32'($urandom_range(1, 5)); sb.push_back(x); end
      foreach (sa[i]) exp_q.push_back(sa[i]);
      foreach (sb[i]) exp_q.push_back(sb[i]);
      exp_q.sort();
      while (exp_q.size() != 0) @(negedge clk);
      repeat (5) @(negedge clk);
    end
    checks++;
    if (n_last != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
