// tb_vector_loader: loads the segments of several batches from a channel
// model; checks the request address, the broadcast beats and their indices,
// and that done arrives with the eighth beat.
module tb_vector_loader;
  import cuper_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start, busy, done, rd_req_valid, rd_req_ready, rd_rsp_valid, rd_rsp_ready, bc_valid;
  logic [15:0] batch;
  rd_req_t rd_req;
  beat_t rd_rsp_data, bc_data;
  logic [2:0] bc_idx;
  int checks = 0, failures = 0;
  int nb;

  vector_loader dut (.*);
  hbm_rd_model #(.WORDS(256), .LAT(5), .STALL(1)) u_m (
    .clk, .rst_n, .req_valid (rd_req_valid), .req_ready (rd_req_ready), .req (rd_req),
    .rsp_valid (rd_rsp_valid), .rsp_ready (rd_rsp_ready), .rsp_data (rd_rsp_data));
  initial for (int i = 0; i < 256; i++) u_m.mem[i] = {16{32'(i * 3 + 1)}};

  always @(negedge clk) if (rst_n && bc_valid) begin
    checks++;
    if (bc_data != {16{32'((int'(batch) * 8 + nb) * 3 + 1)}} || bc_idx != 3'(nb)) begin failures++; $display("beat %0d batch %0d data %h", nb, batch, bc_data[31:0]); end
    nb++;
    if (nb == 8) begin
      checks++;
      if (!done) begin failures++; $display("no done"); end
    end else if (done) begin
      checks++; failures++; $display("early done");
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; batch = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int b = 0; b < 6; b++) begin
      @(negedge clk);
      batch = 16'((b * 5) % 13); nb = 0;
      start = 1; @(negedge clk); start = 0;
      while (!(rd_req_valid && rd_req_ready)) @(negedge clk);
      checks++;
      if (rd_req.addr != 32'(batch) * 8 || rd_req.len != 9'd8) begin failures++; $display("req %0d", rd_req.addr); end
      while (busy) @(negedge clk);
      @(negedge clk);
      checks++;
      if (nb != 8) begin failures++; $display("nb %0d", nb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
