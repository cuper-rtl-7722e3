// tb_crossbar_switch: random permutations; every core must see its selected
// channel's valid and data, and each channel must see the ready of the core
// that selected it.
module tb_crossbar_switch;
  import cuper_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int N = 16;
  logic [3:0] sel [N];
  logic in_valid [N], in_ready [N], out_valid [N], out_ready [N];
  beat_t in_data [N], out_data [N];
  int checks = 0, failures = 0;

  crossbar_switch dut (.*);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [N];
    for (int c = 0; c < N; c++) begin sel[c] = 4'(c); in_valid[c] = 0; out_ready[c] = 0; in_data[c] = '0; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int c = 0; c < N; c++) perm[c] = c;
      perm.shuffle();
      for (int c = 0; c < N; c++) begin
        sel[c] = 4'(perm[c]);
        in_valid[c] = 1'($urandom);
        out_ready[c] = 1'($urandom);
        in_data[c] = {16{32'($urandom)}};
      end
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (out_valid[k] != in_valid[perm[k]] || out_data[k] != in_data[perm[k]]) failures++;
        checks++;
        if (in_ready[perm[k]] != out_ready[k]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
