// tb_matrix_loader: 16 channel models with random latency stalls and a
// consumer with random back-pressure; every channel must deliver exactly its
// configured beats, in address order, and busy must fall at the end.
module tb_matrix_loader;
  import cuper_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int N = 16;
  logic start, busy;
  logic [31:0] cfg_beats [N];
  logic rd_req_valid [N], rd_req_ready [N], rd_rsp_valid [N], rd_rsp_ready [N];
  rd_req_t rd_req [N];
  beat_t rd_rsp_data [N];
  logic out_valid [N], out_ready [N];
  beat_t out_data [N];
  int checks = 0, failures = 0;
  int got [N];
  bit rand_ready = 1;

  matrix_loader dut (.*);

  for (genvar c = 0; c < N; c++) begin : g_m
    hbm_rd_model #(.WORDS(512), .LAT(6 + c), .STALL(1)) u_m (
      .clk, .rst_n, .req_valid (rd_req_valid[c]), .req_ready (rd_req_ready[c]), .req (rd_req[c]),
      .rsp_valid (rd_rsp_valid[c]), .rsp_ready (rd_rsp_ready[c]), .rsp_data (rd_rsp_data[c]));
    initial for (int i = 0; i < 512; i++) u_m.mem[i] = {480'(c * 7 + 1), 32'(i)};
    always @(posedge clk) begin
      out_ready[c] <= rand_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
      if (rst_n && out_valid[c] && out_ready[c]) begin
        checks++;
        if (out_data[c] != {480'(c * 7 + 1), 32'(got[c])}) begin
          failures++;
          if (failures < 10) $display("ch %0d beat %0d wrong", c, got[c]);
        end
        got[c]++;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0;
    for (int c = 0; c < N; c++) begin cfg_beats[c] = 0; got[c] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(negedge clk);
    for (int c = 0; c < N; c++) cfg_beats[c] = (c == 3) ? 0 : 32'($urandom_range(1, 300));
    start = 1; @(negedge clk); start = 0;
    @(negedge clk);
    while (busy) @(negedge clk);
    repeat (20) @(negedge clk);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (got[c] != int'(cfg_beats[c])) begin
        failures++; $display("ch %0d got %0d of %0d", c, got[c], cfg_beats[c]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
