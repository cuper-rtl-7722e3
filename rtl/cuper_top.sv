// cuper_top: sparse matrix-vector multiplier y = A x for HBM-equipped FPGAs.
//
// Dataflow (one run):
//   matrix loader  streams 16 HBM channels of packed non-zeros (8 per beat);
//   crossbar       hands channel sel[k] to core k;
//   vector loader  reads the 128-value x segment of each batch from the
//                  vector channel and broadcasts it to the cores;
//   16 cores       decode packets, fetch x with reuse, multiply in 8 PEs;
//   accumulator    16 lanes add the products into ping-pong batch buffers
//                  and merge them into the partial sums after every batch;
//   sorting tree   merges the 16 lanes' sums into address order;
//   result receiver + vector writer  pack 16 sums per beat and write y.
//
// The batch sequencer here is this design's own: for each batch it waits
// until every core has read its header beat, has the vector loader load and
// broadcast the segment, releases the cores (batch_go), and waits until every
// core is back at the next header (or finished). The x segment in the cores
// is therefore never overwritten while a core still reads it. done rises when
// the last result beat has been written.
//
// Configuration (held stable during a run): cfg_batches, cfg_rows (rows per
// lane; y has 16 * cfg_rows entries), cfg_mat_beats (beats per matrix
// channel, headers included), cfg_xbar_sel (source channel of each core).
// The statistics count what the mechanisms did during the run.
module cuper_top
  import cuper_pkg::*;
#(
  parameter int unsigned ROWS = 65536   // rows per accumulator lane
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] cfg_batches,
  input  logic [16:0] cfg_rows,
  input  logic [31:0] cfg_mat_beats [NUM_CH],
  input  logic [3:0]  cfg_xbar_sel  [NUM_CORES],
  output logic        done,
  // HBM channels 1..16: matrix dataflow
  output logic        mat_rd_req_valid [NUM_CH],
  input  logic        mat_rd_req_ready [NUM_CH],
  output rd_req_t     mat_rd_req       [NUM_CH],
  input  logic        mat_rd_rsp_valid [NUM_CH],
  output logic        mat_rd_rsp_ready [NUM_CH],
  input  beat_t       mat_rd_rsp_data  [NUM_CH],
  // HBM channel 0: vector x
  output logic        vec_rd_req_valid,
  input  logic        vec_rd_req_ready,
  output rd_req_t     vec_rd_req,
  input  logic        vec_rd_rsp_valid,
  output logic        vec_rd_rsp_ready,
  input  beat_t       vec_rd_rsp_data,
  // HBM channel 17: vector y
  output logic        y_wr_valid,
  input  logic        y_wr_ready,
  output wr_req_t     y_wr_req,
  // statistics
  output logic [31:0] st_reuse_hits,
  output logic [31:0] st_bram_reads,
  output logic [31:0] st_vec_writes,
  output logic [31:0] st_vec_skips,
  output logic [31:0] st_raw_stalls,
  output logic [31:0] st_bubbles,
  output logic [31:0] st_merges,
  output logic [31:0] st_y_beats
);
  // ---------------- matrix loader and crossbar
  logic  ml_busy;
  logic  ch_valid [NUM_CH];
  logic  ch_ready [NUM_CH];
  beat_t ch_data  [NUM_CH];
  logic  core_pkt_valid [NUM_CORES];
  logic  core_pkt_ready [NUM_CORES];
  beat_t core_pkt_data  [NUM_CORES];

  matrix_loader u_mload (
    .clk, .rst_n, .start, .cfg_beats (cfg_mat_beats), .busy (ml_busy),
    .rd_req_valid (mat_rd_req_valid), .rd_req_ready (mat_rd_req_ready), .rd_req (mat_rd_req),
    .rd_rsp_valid (mat_rd_rsp_valid), .rd_rsp_ready (mat_rd_rsp_ready), .rd_rsp_data (mat_rd_rsp_data),
    .out_valid (ch_valid), .out_ready (ch_ready), .out_data (ch_data)
  );

  crossbar_switch u_xbar (
    .clk, .rst_n, .sel (cfg_xbar_sel),
    .in_valid (ch_valid), .in_ready (ch_ready), .in_data (ch_data),
    .out_valid (core_pkt_valid), .out_ready (core_pkt_ready), .out_data (core_pkt_data)
  );

  // ---------------- vector loader
  logic        vl_start, vl_busy, vl_done, vb_valid;
  logic [15:0] batch;
  logic [$clog2(VEC_BEATS)-1:0] vb_idx;
  beat_t       vb_data;

  vector_loader u_vload (
    .clk, .rst_n, .start (vl_start), .batch, .busy (vl_busy), .done (vl_done),
    .rd_req_valid (vec_rd_req_valid), .rd_req_ready (vec_rd_req_ready), .rd_req (vec_rd_req),
    .rd_rsp_valid (vec_rd_rsp_valid), .rd_rsp_ready (vec_rd_rsp_ready), .rd_rsp_data (vec_rd_rsp_data),
    .bc_valid (vb_valid), .bc_idx (vb_idx), .bc_data (vb_data)
  );

  // ---------------- cores
  logic     batch_go;
  logic [NUM_CORES-1:0] c_hdr_ok, c_done;
  logic     c_out_valid [NUM_CORES];
  logic     c_out_ready [NUM_CORES];
  acc_tok_t c_out_tok   [NUM_CORES];
  logic [31:0] c_hits [NUM_CORES], c_reads [NUM_CORES], c_vw [NUM_CORES], c_vs [NUM_CORES];

  for (genvar k = 0; k < NUM_CORES; k++) begin : g_core
    compute_core u_core (
      .clk, .rst_n, .start, .cfg_batches,
      .pkt_valid (core_pkt_valid[k]), .pkt_ready (core_pkt_ready[k]), .pkt_data (core_pkt_data[k]),
      .vb_valid, .vb_idx, .vb_data,
      .hdr_ok (c_hdr_ok[k]), .batch_go, .done (c_done[k]),
      .out_valid (c_out_valid[k]), .out_ready (c_out_ready[k]), .out_tok (c_out_tok[k]),
      .reuse_hits (c_hits[k]), .bram_reads (c_reads[k]), .vec_writes (c_vw[k]), .vec_skips (c_vs[k])
    );
  end

  always_comb begin
    st_reuse_hits = '0; st_bram_reads = '0; st_vec_writes = '0; st_vec_skips = '0;
    for (int k = 0; k < NUM_CORES; k++) begin
      st_reuse_hits += c_hits[k];
      st_bram_reads += c_reads[k];
      st_vec_writes += c_vw[k];
      st_vec_skips  += c_vs[k];
    end
  end

  // ---------------- accumulator, sorting tree, result path
  logic acc_done;
  logic l_valid [NUM_CORES];
  logic l_ready [NUM_CORES];
  res_t l_data  [NUM_CORES];

  accumulator #(.ROWS (ROWS)) u_acc (
    .clk, .rst_n, .start, .cfg_rows, .cfg_batches,
    .in_valid (c_out_valid), .in_ready (c_out_ready), .in_tok (c_out_tok),
    .out_valid (l_valid), .out_ready (l_ready), .out (l_data),
    .done (acc_done),
    .raw_stalls (st_raw_stalls), .bubbles (st_bubbles), .merges (st_merges)
  );

  logic t_valid, t_ready;
  res_t t_data;
  sort_tree u_sort (
    .clk, .rst_n,
    .in_valid (l_valid), .in_ready (l_ready), .in_data (l_data),
    .out_valid (t_valid), .out_ready (t_ready), .out (t_data)
  );

  logic  rr_valid, rr_ready, rr_last;
  beat_t rr_data;
  result_receiver u_recv (
    .clk, .rst_n,
    .in_valid (t_valid), .in_ready (t_ready), .in (t_data),
    .out_valid (rr_valid), .out_ready (rr_ready), .out_data (rr_data), .out_last (rr_last)
  );

  logic vw_done;
  vector_writer u_vwrite (
    .clk, .rst_n, .start,
    .in_valid (rr_valid), .in_ready (rr_ready), .in_data (rr_data), .in_last (rr_last),
    .wr_valid (y_wr_valid), .wr_ready (y_wr_ready), .wr_req (y_wr_req),
    .done (vw_done), .beats (st_y_beats)
  );

  // ---------------- batch sequencer
  typedef enum logic [2:0] {S_IDLE, S_HDR, S_VLOAD, S_VWAIT, S_RUN, S_DRAIN, S_DONE} seq_e;
  seq_e seq;

  assign vl_start = (seq == S_VLOAD);
  assign done     = (seq == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      seq <= S_IDLE; batch <= '0; batch_go <= 1'b0;
    end else begin
      batch_go <= 1'b0;
      case (seq)
        S_IDLE: ;
        S_HDR:   if (&c_hdr_ok) seq <= S_VLOAD;
        S_VLOAD: seq <= S_VWAIT;
        S_VWAIT: if (vl_done) begin
          batch_go <= 1'b1;
          seq      <= S_RUN;
        end
        S_RUN: if (!batch_go && &(c_hdr_ok | c_done)) begin
          batch <= batch + 1;
          seq   <= (batch + 16'd1 == cfg_batches) ? S_DRAIN : S_VLOAD;
        end
        S_DRAIN: if (vw_done && acc_done) seq <= S_DONE;
        S_DONE: ;
        default: seq <= S_IDLE;
      endcase
      if (start) begin
        seq   <= S_HDR;
        batch <= '0;
      end
    end
  end

  a_vl_idle_on_start: assert property (@(posedge clk) disable iff (!rst_n) vl_start |-> !vl_busy);
endmodule
