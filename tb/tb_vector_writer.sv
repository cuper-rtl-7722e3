// tb_vector_writer: beats with random gaps and a channel with random
// back-pressure; checks data, consecutive addresses, beat count and done.
module tb_vector_writer;
  import cuper_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, in_valid, in_ready, in_last, wr_valid, wr_ready, done;
  beat_t in_data;
  wr_req_t wr_req;
  logic [31:0] beats;
  int checks = 0, failures = 0;
  int nw = 0;
  localparam int NB = 40;

  vector_writer dut (.*);

  always @(posedge clk) begin
    wr_ready <= 1'($urandom);
    if (rst_n && wr_valid && wr_ready) begin
      checks++;
      if (wr_req.addr != 32'(nw) || wr_req.data != {16{32'(nw * 11)}}) failures++;
      nw++;
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; in_valid = 0; in_last = 0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < NB; i++) begin
      in_valid = 1; in_data = {16{32'(i * 11)}}; in_last = (i == NB - 1);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (done) failures++;
      if ($urandom_range(0, 2) == 0) @(negedge clk);
    end
    while (!done) @(negedge clk);
    checks++;
    if (nw != NB || beats != NB) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
