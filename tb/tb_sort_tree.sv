// tb_sort_tree: sixteen leaf streams, each an increasing run of addresses
// (lane i holds i, i+16, ... as the accumulator produces them, plus random
// gaps in a second round), fed with random stalls; the root must deliver all
// elements in increasing address order with one last flag at the end.
module tb_sort_tree;
  import cuper_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int L = 16;
  logic in_valid [L], in_ready [L], out_valid, out_ready;
  res_t in_data [L], out;
  int checks = 0, failures = 0;
  int n_out, total;
  logic [31:0] last_addr;
  bit first;

  sort_tree dut (.*);

  int lens [L];
  logic [31:0] streams [L][$];

  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 3) != 0);
    #1;
    if (rst_n && out_valid && out_ready) check_out();
  end

  task automatic check_out();
    checks++;
    if (!first && out.addr <= last_addr) begin failures++; $display("order %0d after %0d", out.addr, last_addr); end
    if (out.val != out.addr * 3) failures++;
    first = 0;
    last_addr = out.addr;
    n_out++;
    checks++;
    if (out.last != (n_out == total)) failures++;
  endtask

  for (genvar l = 0; l < L; l++) begin : g_src
    int idx;
    bit fire;
    always @(negedge clk) begin
      if (!rst_n) begin idx = 0; fire = 0; in_valid[l] = 0; end
      else begin
        if (fire) idx++;
        in_valid[l] = (idx < streams[l].size()) && ($urandom_range(0, 2) != 0);
        if (idx < streams[l].size())
          in_data[l] = '{last: (idx == streams[l].size() - 1), addr: streams[l][idx], val: streams[l][idx] * 3};
        #1;
        fire = in_valid[l] && in_ready[l];
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
    for (int l = 0; l < L; l++) begin in_valid[l] = 0; in_data[l] = '0; end
    for (int round = 0; round < 2; round++) begin
      rst_n = 0;
      total = 0; n_out = 0; first = 1;
      for (int l = 0; l < L; l++) begin
        logic [31:0] a;
        streams[l].delete();
        a = 32'(l);
        for (int i = 0; i < 20 + (round ? int'($urandom_range(0, 30)) : 0); i++) begin
          streams[l].push_back(a);
          a += (round == 0) ? 32'd16 : 32'(16 * $urandom_range(1, 3));
        end
        total += streams[l].size();
      end
      repeat (3) @(posedge clk);
      @(negedge clk) rst_n = 1;
      while (n_out < total) @(posedge clk);
      repeat (10) @(posedge clk);
      checks++;
      if (n_out != total) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
