// sort_tree: the multi-way sorting tree.
//
// LEAVES address-sorted streams (one per accumulator lane) enter leaf FIFOs;
// LEAVES-1 sort_node comparators in log2(LEAVES) levels merge them pairwise,
// each level moving the smaller address of its two child buffers into its own
// buffer, until the root delivers one stream sorted by address, ended by a
// single last flag. With 16 leaves there are 8 + 4 + 2 + 1 comparators, as
// the architecture figure draws them. Nodes are numbered as a heap: node n
// (1 <= n < LEAVES) reads streams 2n and 2n+1 and writes stream n; streams
// LEAVES .. 2*LEAVES-1 are the leaf FIFOs, stream 1 is the output.
// Throughput is one element per cycle at the root.
module sort_tree
  import cuper_pkg::*;
#(
  parameter int unsigned LEAVES     = NUM_CORES,
  parameter int unsigned NODE_DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid [LEAVES],
  output logic in_ready [LEAVES],
  input  res_t in_data  [LEAVES],
  output logic out_valid,
  input  logic out_ready,
  output res_t out
);
  logic s_valid [2*LEAVES];
  logic s_ready [2*LEAVES];
  res_t s_data  [2*LEAVES];

  for (genvar l = 0; l < LEAVES; l++) begin : g_leaf
    logic [$clog2(NODE_DEPTH+1)-1:0] fill;
    sync_fifo #(.WIDTH($bits(res_t)), .DEPTH(NODE_DEPTH)) u_leaf (
      .clk, .rst_n,
      .in_valid (in_valid[l]), .in_ready (in_ready[l]), .in_data (in_data[l]),
      .out_valid (s_valid[LEAVES+l]), .out_ready (s_ready[LEAVES+l]),
      .out_data (s_data[LEAVES+l]), .count (fill)
    );
  end

  for (genvar n = 1; n < LEAVES; n++) begin : g_node
    sort_node #(.DEPTH(NODE_DEPTH)) u_node (
      .clk, .rst_n,
      .a_valid (s_valid[2*n]),   .a_ready (s_ready[2*n]),   .a (s_data[2*n]),
      .b_valid (s_valid[2*n+1]), .b_ready (s_ready[2*n+1]), .b (s_data[2*n+1]),
      .out_valid (s_valid[n]),   .out_ready (s_ready[n]),   .out (s_data[n])
    );
  end

  assign out_valid  = s_valid[1];
  assign s_ready[1] = out_ready;
  assign out        = s_data[1];
  // stream 0 is not used
  assign s_valid[0] = 1'b0;
  assign s_data[0]  = '0;

  initial assert (LEAVES >= 2 && (LEAVES & (LEAVES - 1)) == 0);
endmodule
