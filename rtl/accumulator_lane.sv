// accumulator_lane: one adder of the accumulator with its buffers.
//
// Tokens from one core wait in an input FIFO (the adder is slower than the
// delivery). A K_ELEM token does buf[act][row] += value through the 4-cycle
// FP32 adder: the old value is read when the token is issued and the sum is
// written back 4 cycles later; a result being written in the cycle of a read
// of the same row is forwarded. A row still inside the first three adder
// stages would be read stale (a read-after-write conflict): such a token is
// held and raw_stalls counts the cycles. The host's conflict-aware reordering
// keeps any four consecutive tokens on distinct rows, so with reordered input
// the guard never fires. K_BUBBLE tokens leave the adder unused for a cycle.
//
// Two batch buffers (ping and pong) alternate. A K_EOB token, once the adder
// has drained, swaps them; the merge engine then adds the finished buffer
// into the partial-sums buffer (copying it for the first batch) and clears
// it, one row per cycle through a second adder, while the other buffer takes
// the next batch. A second K_EOB waits until that merge has ended, so a batch
// lasts at least cfg_rows cycles, however few tokens it has. After
// cfg_batches batches the lane streams psum[0..cfg_rows-1] as
// (global address = r * NUM_LANES + LANE_ID, value), the last flagged.
// On start both batch buffers are cleared, taking cfg_rows cycles.
//
// The input FIFO per adder, the 4-cycle adder, the URAM partial-sums buffer
// and the ping-pong scheme are the document's; the RAW guard, forwarding,
// sizes and the readout order are this design's.
module accumulator_lane
  import cuper_pkg::*;
#(
  parameter int unsigned ROWS      = 65536,
  parameter int unsigned IN_DEPTH  = 16,
  parameter int unsigned NUM_LANES = NUM_CORES,
  parameter int unsigned LANE_ID   = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [16:0] cfg_rows,
  input  logic [15:0] cfg_batches,
  input  logic        in_valid,
  output logic        in_ready,
  input  acc_tok_t    in_tok,
  output logic        out_valid,
  input  logic        out_ready,
  output res_t        out,
  output logic        done,
  output logic [31:0] raw_stalls,
  output logic [31:0] bubbles,
  output logic [31:0] merges
);
  localparam int unsigned AW = $clog2(ROWS);

  logic [31:0] bank0 [ROWS];
  logic [31:0] bank1 [ROWS];
  logic [31:0] psum  [ROWS];

  typedef enum logic [2:0] {IDLE, CLEAR, RUN, OUT, FIN} state_e;
  state_e state;
  logic        act;          // bank taking the current batch
  logic [15:0] batches_done;
  logic [AW:0] r;            // CLEAR / OUT row counter

  // ---------------- input FIFO
  logic     f_valid, f_ready;
  logic [$clog2(IN_DEPTH+1)-1:0] f_count;
  acc_tok_t f_tok;
  sync_fifo #(.WIDTH($bits(acc_tok_t)), .DEPTH(IN_DEPTH)) u_in (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data (in_tok),
    .out_valid (f_valid), .out_ready (f_ready), .out_data (f_tok),
    .count (f_count)
  );

  // ---------------- accumulate pipeline
  logic          t_v   [ADD_LAT];   // row tracking, aligned with the adder stages
  logic [AW-1:0] t_row [ADD_LAT];
  logic          a_in_v, a_out_v;
  logic [31:0]   a_in_old, a_out;
  logic [AW-1:0] row;
  logic          hazard, pipe_empty;
  logic [31:0]   old_val;

  assign row = f_tok.row[AW-1:0];

  always_comb begin
    hazard = 1'b0;
    pipe_empty = 1'b1;
    for (int i = 0; i < ADD_LAT; i++) if (t_v[i]) pipe_empty = 1'b0;
    for (int i = 0; i < ADD_LAT - 1; i++)
      if (t_v[i] && t_row[i] == row) hazard = 1'b1;
    old_val = act ? bank1[row] : bank0[row];
    if (t_v[ADD_LAT-1] && t_row[ADD_LAT-1] == row) old_val = a_out;   // forward
  end

  // merge engine
  logic          m_busy, m_first, m_bank;
  logic [AW:0]   m_r;
  logic          m_issue;
  logic          mt_v   [ADD_LAT];
  logic [AW-1:0] mt_row [ADD_LAT];
  logic          m_out_v;
  logic [31:0]   m_out;

  wire is_elem = f_valid && f_tok.kind == K_ELEM;
  wire is_bub  = f_valid && f_tok.kind == K_BUBBLE;
  wire is_eob  = f_valid && f_tok.kind == K_EOB;
  wire eob_ok  = pipe_empty && !m_busy;

  always_comb begin
    f_ready = 1'b0;
    a_in_v  = 1'b0;
    if (state == RUN) begin
      if (is_elem && !hazard) begin f_ready = 1'b1; a_in_v = 1'b1; end
      if (is_bub)             f_ready = 1'b1;
      if (is_eob && eob_ok)   f_ready = 1'b1;
      if (f_valid && f_tok.kind == K_NOP) f_ready = 1'b1;
    end
  end
  assign a_in_old = old_val;

  fp32_add u_acc_add (
    .clk, .rst_n, .in_valid (a_in_v), .a (a_in_old), .b (f_tok.val),
    .out_valid (a_out_v), .s (a_out)
  );

  // merge adder
  logic [AW-1:0] m_row;
  logic [31:0]   m_a, m_b;
  assign m_row   = m_r[AW-1:0];
  assign m_issue = m_busy && (m_r < cfg_rows);
  assign m_a     = m_bank ? bank1[m_row] : bank0[m_row];
  assign m_b     = m_first ? 32'd0 : psum[m_row];

  fp32_add u_merge_add (
    .clk, .rst_n, .in_valid (m_issue), .a (m_a), .b (m_b),
    .out_valid (m_out_v), .s (m_out)
  );

  logic m_pipe_empty;
  always_comb begin
    m_pipe_empty = 1'b1;
    for (int i = 0; i < ADD_LAT; i++) if (mt_v[i]) m_pipe_empty = 1'b0;
  end

  // ---------------- memories
  always_ff @(posedge clk) begin
    if (state == CLEAR) begin
      bank0[r[AW-1:0]] <= '0;
      bank1[r[AW-1:0]] <= '0;
    end else begin
      // accumulate write-back into the active bank, merge clear of the other
      if (a_out_v && !act)  bank0[t_row[ADD_LAT-1]] <= a_out;
      if (a_out_v && act)   bank1[t_row[ADD_LAT-1]] <= a_out;
      if (m_issue && !m_bank) bank0[m_row] <= '0;
      if (m_issue && m_bank)  bank1[m_row] <= '0;
    end
    if (m_out_v) psum[mt_row[ADD_LAT-1]] <= m_out;
  end

  // ---------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= IDLE; act <= 1'b0; batches_done <= '0; r <= '0;
      m_busy <= 1'b0; m_first <= 1'b0; m_bank <= 1'b0; m_r <= '0;
      raw_stalls <= '0; bubbles <= '0; merges <= '0;
      for (int i = 0; i < ADD_LAT; i++) begin
        t_v[i] <= 1'b0; t_row[i] <= '0; mt_v[i] <= 1'b0; mt_row[i] <= '0;
      end
    end else begin
      // pipeline trackers
      t_v[0] <= a_in_v;  t_row[0] <= row;
      mt_v[0] <= m_issue; mt_row[0] <= m_row;
      for (int i = 1; i < ADD_LAT; i++) begin
        t_v[i] <= t_v[i-1];   t_row[i] <= t_row[i-1];
        mt_v[i] <= mt_v[i-1]; mt_row[i] <= mt_row[i-1];
      end

      if (m_issue) m_r <= m_r + 1'b1;
      if (m_busy && !m_issue && m_pipe_empty) m_busy <= 1'b0;

      case (state)
        IDLE: ;
        CLEAR: begin
          r <= r + 1'b1;
          if (r + 1'b1 >= (AW+1)'(cfg_rows)) state <= RUN;
        end
        RUN: begin
          if (is_elem && hazard) raw_stalls <= raw_stalls + 1;
          if (is_bub) bubbles <= bubbles + 1;
          if (is_eob && eob_ok) begin
            m_busy  <= 1'b1;
            m_first <= (batches_done == 0);
            m_bank  <= act;
            m_r     <= '0;
            act     <= ~act;
            merges  <= merges + 1;
            batches_done <= batches_done + 1;
          end
          if (batches_done == cfg_batches && !m_busy) begin
            state <= OUT;
            r     <= '0;
          end
        end
        OUT: if (out_ready) begin
          r <= r + 1'b1;
          if (r + 1'b1 >= (AW+1)'(cfg_rows)) state <= FIN;
        end
        FIN: ;
        default: state <= IDLE;
      endcase

      if (start) begin
        state <= CLEAR; r <= '0; act <= 1'b0; batches_done <= '0;
        raw_stalls <= '0; bubbles <= '0; merges <= '0;
      end
    end
  end

  assign out_valid = (state == OUT);
  assign out = '{last: (r + 1'b1 >= (AW+1)'(cfg_rows)),
                 addr: 32'(r) * 32'(NUM_LANES) + 32'(LANE_ID),
                 val:  psum[r[AW-1:0]]};
  assign done = (state == FIN);

  a_rows_fit: assert property (@(posedge clk) disable iff (!rst_n)
    (is_elem && state == RUN) |-> (32'(f_tok.row) < 32'(cfg_rows)));
endmodule
