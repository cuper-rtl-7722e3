// tb_cuper_workloads: the accelerator at its default parameters on matrices
// with the shapes of three benchmark matrices of the SuiteSparse collection:
// the same number of rows (rounded up to a multiple of 16), the same number
// of 128-column batches and about the same number of non-zeros, spread evenly
// over cores and batches with random rows and columns (the real sparsity
// patterns are not reproduced). Every y element is checked bit-exactly.
//   sit100      10,262 rows,  61K non-zeros:  642 rows/lane,  81 batches,  47 per core and batch
//   Si10H16     17,077 rows, 875K non-zeros: 1068 rows/lane, 134 batches, 408 per core and batch
//   finance256  37,376 rows, 298K non-zeros: 2336 rows/lane, 292 batches,  64 per core and batch
// Every batch takes at least rows/lane cycles, the time one lane needs to
// merge a finished batch buffer into its partial sums.
module tb_cuper_workloads;
  localparam int MAT_WORDS = 16384;
  localparam int WATCHDOG  = 4000000;
  `include "tb_cuper_env.svh"

  initial begin
    init();
    $display("sit100-sized");
    run_op(642, 81, 47, 4, 1, -1, 0);
    $display("Si10H16-sized");
    run_op(1068, 134, 408, 11, 6, -1, 0);
    $display("finance256-sized");
    run_op(2336, 292, 64, 2, 13, -1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
