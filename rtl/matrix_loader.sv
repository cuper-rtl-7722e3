// matrix_loader: streaming reader of the matrix dataflow on NUM_CH HBM channels.
//
// After start, every channel c reads cfg_beats[c] consecutive 512-bit beats
// from beat address 0 of its own channel, in bursts of up to BURST beats. A
// burst is requested only when the channel's buffer has room for all of it
// (free FIFO space minus beats still in flight), so responses are never
// refused and the channel streams without gaps while the consumer keeps up.
// Each channel's beats leave through a FIFO_DEPTH-deep buffer towards the
// crossbar switch. The document says only that the loader supports highly
// concurrent streaming reads; the burst and credit scheme is this design's.
//
// Interface per channel: rd_req (valid/ready, address+length), rd_rsp
// (valid/ready, data), out (valid/ready, data). busy stays high until every
// channel has issued all its requests and emptied its buffer.
module matrix_loader
  import cuper_pkg::*;
#(
  parameter int unsigned N_CH       = NUM_CH,
  parameter int unsigned BURST      = 32,
  parameter int unsigned FIFO_DEPTH = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [31:0]         cfg_beats [N_CH],
  output logic                busy,
  // HBM read channels
  output logic                rd_req_valid [N_CH],
  input  logic                rd_req_ready [N_CH],
  output rd_req_t             rd_req       [N_CH],
  input  logic                rd_rsp_valid [N_CH],
  output logic                rd_rsp_ready [N_CH],
  input  beat_t               rd_rsp_data  [N_CH],
  // packet streams to the crossbar
  output logic                out_valid [N_CH],
  input  logic                out_ready [N_CH],
  output beat_t               out_data  [N_CH]
);
  localparam int unsigned CW = $clog2(FIFO_DEPTH + 1);

  logic [N_CH-1:0] ch_busy;
  assign busy = |ch_busy;

  for (genvar c = 0; c < N_CH; c++) begin : g_ch
    logic [31:0] next_addr, remaining;
    logic [CW-1:0] in_flight, fill;
    logic [CW:0]   free_space;
    logic [8:0]    blen;
    logic          req_v;
    logic          fifo_in_ready;

    assign blen = (remaining >= BURST) ? 9'(BURST) : remaining[8:0];
    assign free_space = (CW+1)'(FIFO_DEPTH) - {1'b0, fill} - {1'b0, in_flight};
    assign rd_req_valid[c] = req_v;
    assign rd_req[c]       = '{addr: next_addr, len: blen};
    assign rd_rsp_ready[c] = fifo_in_ready;
    assign ch_busy[c]      = (remaining != 0) || (in_flight != 0) || (fill != 0);

    wire rsp_fire = rd_rsp_valid[c] && fifo_in_ready;
    wire req_fire = req_v && rd_req_ready[c];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        next_addr <= '0;
        remaining <= '0;
        in_flight <= '0;
        req_v     <= 1'b0;
      end else begin
        if (start) begin
          next_addr <= '0;
          remaining <= cfg_beats[c];
          req_v     <= 1'b0;
        end else if (req_v) begin
          if (req_fire) begin
            next_addr <= next_addr + 32'(blen);
            remaining <= remaining - 32'(blen);
            req_v     <= 1'b0;
          end
        end else if (remaining != 0 && free_space >= (CW+1)'(blen)) begin
          req_v <= 1'b1;
        end
        // beats in flight: added on a request, removed on each response
        in_flight <= in_flight + (req_fire ? CW'(blen) : '0) - (rsp_fire ? CW'(1) : '0);
      end
    end

    sync_fifo #(.WIDTH(BEAT_W), .DEPTH(FIFO_DEPTH)) u_buf (
      .clk, .rst_n,
      .in_valid (rd_rsp_valid[c]), .in_ready (fifo_in_ready), .in_data (rd_rsp_data[c]),
      .out_valid(out_valid[c]),    .out_ready(out_ready[c]),  .out_data(out_data[c]),
      .count    (fill)
    );
  end

  initial assert (BURST <= FIFO_DEPTH && BURST <= 256);
endmodule
