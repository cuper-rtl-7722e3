// tb_result_receiver: 37 values, the last flagged; expects two full beats and
// a third holding five values and zeros, with last on the third only.
module tb_result_receiver;
  import cuper_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready, out_last;
  res_t in;
  beat_t out_data;
  int checks = 0, failures = 0;
  int nb = 0;
  localparam int NV = 37;

  result_receiver dut (.*);

  always @(posedge clk) begin
    out_ready <= 1'($urandom);
    if (rst_n && out_valid && out_ready) begin
      for (int j = 0; j < 16; j++) begin
        int v;
        v = nb * 16 + j;
        checks++;
        if (out_data[32*j +: 32] != ((v < NV) ? 32'(v + 100) : 32'd0)) failures++;
      end
      checks++;
      if (out_last != (nb == 2)) failures++;
      nb++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      in_valid = 1; in = '{last: (i == NV - 1), addr: 32'(i), val: 32'(i + 100)};
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    repeat (30) @(negedge clk);
    checks++;
    if (nb != 3) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
