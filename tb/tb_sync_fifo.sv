// tb_sync_fifo: random pushes and pops against a queue model; checks order,
// the full and empty flags and the count.
module tb_sync_fifo;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  localparam int D = 5;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [15:0] in_data, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [15:0] model [$];

  sync_fifo #(.WIDTH(16), .DEPTH(D)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      in_valid  = $urandom_range(0, 99) < ((i / 500) % 2 ? 70 : 30);
      out_ready = $urandom_range(0, 99) < ((i / 500) % 2 ? 30 : 70);
      in_data   = 16'($urandom);
      #1;
      checks++;
      if (count != 3'(model.size()) || in_ready != (model.size() < D) || out_valid != (model.size() > 0)) begin
        failures++;
        if (failures < 10) $display("flags: count %0d model %0d", count, model.size());
      end
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != model[0]) failures++;
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
