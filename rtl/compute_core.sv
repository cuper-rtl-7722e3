// compute_core: one dedicated computational core.
//
// A perceptual decoder (controller + vector fetcher) turns the core's packet
// stream into (row, value, x) lanes; the PE group multiplies them and emits a
// single ordered token stream (K_ELEM / K_BUBBLE / K_EOB) towards the core's
// accumulator lane. Throughput: one packet per cycle into the PEs, one token
// per cycle out of the core. The composition follows the architecture figure;
// the interfaces are this design's.
module compute_core
  import cuper_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] cfg_batches,
  input  logic        pkt_valid,
  output logic        pkt_ready,
  input  beat_t       pkt_data,
  input  logic        vb_valid,
  input  logic [$clog2(VEC_BEATS)-1:0] vb_idx,
  input  beat_t       vb_data,
  output logic        hdr_ok,
  input  logic        batch_go,
  output logic        done,
  output logic        out_valid,
  input  logic        out_ready,
  output acc_tok_t    out_tok,
  output logic [31:0] reuse_hits,
  output logic [31:0] bram_reads,
  output logic [31:0] vec_writes,
  output logic [31:0] vec_skips
);
  logic        pe_valid, pe_ready;
  kind_e       pe_kind [NUM_PE];
  logic [15:0] pe_row  [NUM_PE];
  logic [31:0] pe_val  [NUM_PE];
  logic [31:0] pe_x    [NUM_PE];

  perceptual_decoder u_dec (
    .clk, .rst_n, .start, .cfg_batches,
    .pkt_valid, .pkt_ready, .pkt_data,
    .vb_valid, .vb_idx, .vb_data, .hdr_ok, .batch_go, .done,
    .pe_valid, .pe_ready, .pe_kind, .pe_row, .pe_val, .pe_x,
    .reuse_hits, .bram_reads, .vec_writes, .vec_skips
  );

  pe_group #(.FIFO_DEPTH(FIFO_DEPTH)) u_pes (
    .clk, .rst_n,
    .in_valid (pe_valid), .in_ready (pe_ready),
    .in_kind (pe_kind), .in_row (pe_row), .in_val (pe_val), .in_x (pe_x),
    .out_valid, .out_ready, .out_tok
  );
endmodule
