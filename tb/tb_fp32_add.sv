// tb_fp32_add: random sums and differences (including cancellation) and
// special values against the reference, plus the 4-cycle latency.
module tb_fp32_add;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [31:0] a, b, s;
  int checks = 0, failures = 0;

  fp32_add dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .s);

  logic [31:0] exp_q [$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    logic [31:0] e;
    e = exp_q.pop_front();
    checks++;
    if (s !== e) begin
      failures++;
      if (failures < 10) $display("mismatch %h got %h exp %h", s, s, e);
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk);
    // latency: input in cycle t, result valid in cycle t+4
    @(negedge clk); in_valid = 1; a = 32'h3F800000; b = 32'h40000000; exp_q.push_back(32'h40400000);
    @(negedge clk); in_valid = 0;
    repeat (2) @(negedge clk);
    checks++; if (out_valid) begin failures++; $display("too early"); end
    @(negedge clk);
    checks++; if (!(out_valid && s == 32'h40400000)) begin failures++; $display("latency wrong"); end
    @(negedge clk);
    in_valid = 1;
    a = 32'h3F800000; b = 32'hBF800000; exp_q.push_back(32'h0); @(negedge clk);
    a = 32'h0;        b = 32'h40490FDB; exp_q.push_back(32'h40490FDB); @(negedge clk);
    a = 32'h7F800000; b = 32'hFF800000; exp_q.push_back(32'h7FC00000); @(negedge clk);
    a = 32'h7F7FFFFF; b = 32'h7F7FFFFF; exp_q.push_back(32'h7F800000); @(negedge clk);
    a = 32'h4B800000; b = 32'h3F800001; exp_q.push_back(ref_add(32'h4B800000, 32'h3F800001)); @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      a = rand_f(12);
      b = (i % 4 == 0) ? {~a[31], a[30:23], 23'($urandom)} : rand_f(12);   // near cancellation
      exp_q.push_back(ref_add(a, b));
      @(negedge clk);
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
