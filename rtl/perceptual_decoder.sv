// perceptual_decoder: the controller of a computational core together with its
// vector fetcher.
//
// Per batch the core's packet stream holds a header beat (bits [31:0] =
// number of packets, this design's encoding) and then the packets. The
// decoder:
//   HDR   takes the header beat;
//   WAITV reports hdr_ok and stores the broadcast vector segment into the
//         fetcher's BRAM -- unless the packet count is 0: then the core's slice
//         column is blank and the writes are skipped (counted in vec_skips);
//         batch_go from the sequencer ends the phase;
//   RUN   takes one packet per cycle while the PE group has room: splits it
//         into eight (column, row, value) elements, flags idle slots
//         (column IDLE_COL) and reuse hits (column equal to the previous
//         non-idle element's, the first lane comparing with the reuse
//         register), and starts the BRAM read of the remaining lanes;
//   EOB   sends an end-of-batch packet (lane 0 K_EOB, others K_NOP), then
//         returns to HDR or, after cfg_batches batches, to DONE.
// One cycle after a packet is taken its eight (kind, row, value, x) lanes are
// offered to the PE group with pe_valid/pe_ready. Idle slots become K_BUBBLE.
// Splitting the packet, the reuse check, the MUX and the skipping of blank
// slices follow the document; the header, the FSM and the batch barrier are
// this design's.
module perceptual_decoder
  import cuper_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] cfg_batches,
  // packet stream from the crossbar
  input  logic        pkt_valid,
  output logic        pkt_ready,
  input  beat_t       pkt_data,
  // vector segment broadcast and batch barrier
  input  logic        vb_valid,
  input  logic [$clog2(VEC_BEATS)-1:0] vb_idx,
  input  beat_t       vb_data,
  output logic        hdr_ok,
  input  logic        batch_go,
  output logic        done,
  // to the PE group
  output logic        pe_valid,
  input  logic        pe_ready,
  output kind_e       pe_kind [NUM_PE],
  output logic [15:0] pe_row  [NUM_PE],
  output logic [31:0] pe_val  [NUM_PE],
  output logic [31:0] pe_x    [NUM_PE],
  // statistics
  output logic [31:0] reuse_hits,
  output logic [31:0] bram_reads,
  output logic [31:0] vec_writes,
  output logic [31:0] vec_skips
);
  typedef enum logic [2:0] {IDLE, HDR, WAITV, RUN, EOB, DONE} state_e;
  state_e state;
  logic [31:0] remaining;
  logic [15:0] batch;

  packet_t pkt;
  assign pkt = packet_t'(pkt_data);

  // fetcher
  logic        rd_en, reuse_clear, x_valid, adv, reuse_col_valid;
  logic [15:0] reuse_col;
  logic [6:0]  rd_col  [NUM_PE];
  logic        rd_hit  [NUM_PE];
  logic        rd_idle [NUM_PE];
  logic [31:0] x_out   [NUM_PE];

  wire can_issue = !x_valid || pe_ready;

  // lane analysis of the packet on the input
  logic [3:0] n_hit, n_read;
  always_comb begin
    logic        pv;
    logic [15:0] pc;
    pv = reuse_col_valid;
    pc = reuse_col;
    n_hit = '0; n_read = '0;
    for (int k = 0; k < NUM_PE; k++) begin
      rd_idle[k] = (pkt[k].col == IDLE_COL) || (state == EOB);
      rd_col[k]  = pkt[k].col[6:0];
      rd_hit[k]  = !rd_idle[k] && pv && (pkt[k].col == pc);
      if (!rd_idle[k]) begin
        pv = 1'b1;
        pc = pkt[k].col;
        if (rd_hit[k]) n_hit++;
        else           n_read++;
      end
    end
  end

  wire take_pkt = (state == RUN) && pkt_valid && can_issue;
  wire take_eob = (state == EOB) && can_issue;
  assign rd_en  = take_pkt || take_eob;
  assign pkt_ready = (state == HDR) || take_pkt;
  assign hdr_ok = (state == WAITV);
  assign done   = (state == DONE);
  assign reuse_clear = batch_go;

  // stage-1 registers of the element fields (the x values sit in the fetcher)
  kind_e       s_kind [NUM_PE];
  logic [15:0] s_row  [NUM_PE];
  logic [31:0] s_val  [NUM_PE];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      remaining  <= '0;
      batch      <= '0;
      reuse_hits <= '0;
      bram_reads <= '0;
      vec_writes <= '0;
      vec_skips  <= '0;
      for (int k = 0; k < NUM_PE; k++) begin
        s_kind[k] <= K_NOP; s_row[k] <= '0; s_val[k] <= '0;
      end
    end else begin
      case (state)
        IDLE: ;
        HDR: if (pkt_valid) begin
          remaining <= pkt_data[31:0];
          state     <= WAITV;
        end
        WAITV: begin
          if (vb_valid) begin
            if (remaining != 0) vec_writes <= vec_writes + 1;
            else                vec_skips  <= vec_skips + 1;
          end
          if (batch_go) state <= (remaining != 0) ? RUN : EOB;
        end
        RUN: if (take_pkt) begin
          remaining  <= remaining - 1;
          reuse_hits <= reuse_hits + 32'(n_hit);
          bram_reads <= bram_reads + 32'(n_read);
          if (remaining == 1) state <= EOB;
        end
        EOB: if (take_eob) begin
          batch <= batch + 1;
          state <= (batch + 16'd1 == cfg_batches) ? DONE : HDR;
        end
        DONE: ;
        default: state <= IDLE;
      endcase
      if (start) begin
        state <= HDR;
        batch <= '0;
        reuse_hits <= '0; bram_reads <= '0; vec_writes <= '0; vec_skips <= '0;
      end
      if (rd_en) begin
        for (int k = 0; k < NUM_PE; k++) begin
          if (take_eob) begin
            s_kind[k] <= (k == 0) ? K_EOB : K_NOP;
          end else begin
            s_kind[k] <= rd_idle[k] ? K_BUBBLE : K_ELEM;
          end
          s_row[k] <= pkt[k].row;
          s_val[k] <= pkt[k].val;
        end
      end
    end
  end

  vector_fetcher u_fetch (
    .clk, .rst_n,
    .wr_en   (hdr_ok && vb_valid && remaining != 0),
    .wr_idx  (vb_idx),
    .wr_data (vb_data),
    .rd_en, .rd_col, .rd_hit, .rd_idle,
    .hold    (!pe_ready),
    .reuse_clear,
    .reuse_col, .reuse_col_valid,
    .x_out, .x_valid, .adv
  );

  assign pe_valid = x_valid;
  assign pe_kind  = s_kind;
  assign pe_row   = s_row;
  assign pe_val   = s_val;
  assign pe_x     = x_out;
endmodule
