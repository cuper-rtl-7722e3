// accumulator: the sixteen adders of the accumulator, one lane per core.
//
// Lane i takes core i's token stream and holds the partial sums of the rows
// that core owns (global rows i, i+16, i+32, ...). After the last batch each
// lane streams its sums in increasing address order to one leaf of the
// sorting tree. done is high when every lane has streamed all its rows. The
// statistics are summed over the lanes. See accumulator_lane for the inside.
module accumulator
  import cuper_pkg::*;
#(
  parameter int unsigned N_LANES  = NUM_CORES,
  parameter int unsigned ROWS     = 65536,
  parameter int unsigned IN_DEPTH = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [16:0] cfg_rows,
  input  logic [15:0] cfg_batches,
  input  logic        in_valid [N_LANES],
  output logic        in_ready [N_LANES],
  input  acc_tok_t    in_tok   [N_LANES],
  output logic        out_valid [N_LANES],
  input  logic        out_ready [N_LANES],
  output res_t        out       [N_LANES],
  output logic        done,
  output logic [31:0] raw_stalls,
  output logic [31:0] bubbles,
  output logic [31:0] merges
);
  logic [N_LANES-1:0] l_done;
  logic [31:0] l_stall [N_LANES];
  logic [31:0] l_bub   [N_LANES];
  logic [31:0] l_merge [N_LANES];

  for (genvar i = 0; i < N_LANES; i++) begin : g_lane
    accumulator_lane #(
      .ROWS (ROWS), .IN_DEPTH (IN_DEPTH), .NUM_LANES (N_LANES), .LANE_ID (i)
    ) u_lane (
      .clk, .rst_n, .start, .cfg_rows, .cfg_batches,
      .in_valid (in_valid[i]), .in_ready (in_ready[i]), .in_tok (in_tok[i]),
      .out_valid (out_valid[i]), .out_ready (out_ready[i]), .out (out[i]),
      .done (l_done[i]),
      .raw_stalls (l_stall[i]), .bubbles (l_bub[i]), .merges (l_merge[i])
    );
  end

  assign done = &l_done;
  always_comb begin
    raw_stalls = '0; bubbles = '0; merges = '0;
    for (int i = 0; i < N_LANES; i++) begin
      raw_stalls += l_stall[i];
      bubbles    += l_bub[i];
      merges     += l_merge[i];
    end
  end
endmodule
