// pe: one processing element of a core's PE group.
//
// It multiplies a matrix value by its vector value (fp32_mul, 2 cycles) and
// pushes the product, together with the row address and the token kind, into
// its FIFO. Bubbles, end-of-batch and no-op tokens pass through the same
// pipeline unchanged so that the FIFO keeps element order. in_ready is high
// while the FIFO has room for one more token beyond those already in the
// multiplier, so a token accepted is never lost. The multiplier and the FIFO
// after it are drawn in the document; the FIFO depth is this design's.
module pe
  import cuper_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  kind_e       in_kind,
  input  logic [15:0] in_row,
  input  logic [31:0] in_val,
  input  logic [31:0] in_x,
  output logic        out_valid,
  input  logic        out_ready,
  output acc_tok_t    out_tok
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic        p_valid;
  logic [31:0] prod;
  kind_e       k_d [2];
  logic [15:0] r_d [2];
  logic        v_d [2];
  logic [CW-1:0] count;

  fp32_mul u_mul (
    .clk, .rst_n,
    .in_valid (in_valid && in_ready),
    .a (in_val), .b (in_x),
    .out_valid (p_valid), .p (prod)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2; i++) begin
        k_d[i] <= K_NOP; r_d[i] <= '0; v_d[i] <= 1'b0;
      end
    end else begin
      v_d[0] <= in_valid && in_ready;
      k_d[0] <= in_kind;
      r_d[0] <= in_row;
      v_d[1] <= v_d[0];
      k_d[1] <= k_d[0];
      r_d[1] <= r_d[0];
    end
  end

  logic [CW:0] inflight;
  assign inflight = (CW+1)'(v_d[0]) + (CW+1)'(v_d[1]);
  assign in_ready = ({1'b0, count} + inflight) < (CW+1)'(FIFO_DEPTH);

  acc_tok_t push_tok;
  assign push_tok = '{kind: k_d[1], row: r_d[1],
                      val: (k_d[1] == K_ELEM) ? prod : 32'd0};

  logic fifo_in_ready;
  sync_fifo #(.WIDTH($bits(acc_tok_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (v_d[1]), .in_ready (fifo_in_ready), .in_data (push_tok),
    .out_valid, .out_ready, .out_data (out_tok),
    .count
  );

  a_pv_aligned: assert property (@(posedge clk) disable iff (!rst_n) p_valid == v_d[1]);
  a_no_drop:    assert property (@(posedge clk) disable iff (!rst_n) v_d[1] |-> fifo_in_ready);
endmodule
