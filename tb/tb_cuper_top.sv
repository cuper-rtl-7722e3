// tb_cuper_top: end-to-end runs of the whole accelerator at its default
// parameters, with small runtime sizes (8 rows per lane = 128 rows, 3 batches
// = 384 columns). HBM channels are behavioural models with latency and random
// stalls; y is compared bit-exactly with an FP32 reference that adds in the
// hardware's order.
// Run 1 (host-ordered dataflow, identity crossbar) must show vector reuse,
// skipped vector writes for a blank slice column, idle-slot bubbles, ping-pong
// merges, and no RAW stall. Run 2 packs one core's non-zeros without
// reordering and rotates the crossbar: RAW stalls must occur and y must still
// be exact.
module tb_cuper_top;
  localparam int MAT_WORDS = 1024;
  localparam int WATCHDOG  = 400000;
  `include "tb_cuper_env.svh"

  initial begin
    init();
    run_op(8, 3, 60, 5, 3, -1, 0);
    checks += 5;
    if (st_reuse_hits == 0) begin failures++; $display("no reuse"); end
    if (st_vec_skips == 0)  begin failures++; $display("no skipped vector writes"); end
    if (st_bubbles == 0)    begin failures++; $display("no bubbles"); end
    if (st_merges == 0)     begin failures++; $display("no merges"); end
    if (st_raw_stalls != 0) begin failures++; $display("RAW stalls with ordered input"); end
    run_op(8, 2, 60, -1, -1, 6, 5);
    checks++;
    if (st_raw_stalls == 0) begin failures++; $display("no RAW stall with unordered input"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
