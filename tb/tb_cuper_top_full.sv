// tb_cuper_top_full: one complete operation of the accelerator at its default
// parameters and its full row capacity: 16 lanes x 65536 rows = 1,048,576
// rows, 2 column batches (256 columns). Every y element is compared
// bit-exactly with an FP32 reference that adds in the hardware's order. The
// same counters as in tb_cuper_top must show reuse, skipped vector writes,
// bubbles and merges.
module tb_cuper_top_full;
  localparam int MAT_WORDS = 1024;
  localparam int WATCHDOG  = 2000000;
  `include "tb_cuper_env.svh"

  initial begin
    init();
    run_op(65536, 2, 200, 9, 2, -1, 0);
    checks += 4;
    if (st_reuse_hits == 0) begin failures++; $display("no reuse"); end
    if (st_vec_skips == 0)  begin failures++; $display("no skipped vector writes"); end
    if (st_bubbles == 0)    begin failures++; $display("no bubbles"); end
    if (st_merges == 0)     begin failures++; $display("no merges"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
