// tb_fp32_mul: random and special-value products against the reference,
// one operand pair per cycle, and the 2-cycle latency. Operands with short
// significands produce exact half-way products to test rounding to even.
module tb_fp32_mul;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [31:0] a, b, p;
  int checks = 0, failures = 0;

  fp32_mul dut (.clk, .rst_n, .in_valid, .a, .b, .out_valid, .p);

  logic [31:0] exp_q [$];
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

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
    if (p !== e) begin
      failures++;
      if (failures < 10) $display("mismatch got %h exp %h", p, e);
    end
  end

  initial begin
    in_valid = 0; a = 0; b = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    @(posedge clk);
    // latency
    @(negedge clk); in_valid = 1; a = 32'h3FC00000; b = 32'h40000000; exp_q.push_back(32'h40400000);
    @(negedge clk); in_valid = 0;
    @(negedge clk);
    checks++; if (!(out_valid && p == 32'h40400000)) begin failures++; $display("latency wrong"); end
    @(negedge clk);
    // specials
    in_valid = 1;
    a = 32'h0; b = 32'h40000000; exp_q.push_back(32'h0); @(negedge clk);
    a = 32'h80000000; b = 32'h40000000; exp_q.push_back(32'h80000000); @(negedge clk);
    a = 32'h7F800000; b = 32'h0; exp_q.push_back(32'h7FC00000); @(negedge clk);
    a = 32'h7F800000; b = 32'hC0000000; exp_q.push_back(32'hFF800000); @(negedge clk);
    a = 32'h7F000000; b = 32'h7F000000; exp_q.push_back(32'h7F800000); @(negedge clk);
    for (int i = 0; i < 20000; i++) begin
      a = rand_f(40); b = rand_f(40);
      exp_q.push_back(ref_mul(a, b));
      @(negedge clk);
    end
    // short significands (13 and 12 bits): the 25-bit product is often an
    // exact half-way case, which must round to even
    for (int i = 0; i < 2000; i++) begin
      a = {1'b0, 8'(120 + $urandom_range(0, 14)), 12'($urandom), 11'd0};
      b = {1'($urandom), 8'(120 + $urandom_range(0, 14)), 11'($urandom), 12'd0};
      exp_q.push_back(ref_mul(a, b));
      @(negedge clk);
    end
    in_valid = 0;
    repeat (5) @(negedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
