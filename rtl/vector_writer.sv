// vector_writer: streams the result vector to its HBM channel.
//
// Each 512-bit beat from the result receiver becomes one write request at the
// next beat address, starting from 0 after start. The beat is held in a
// register until the channel accepts it (wr_valid/wr_ready), so the writer
// adds one cycle of latency and sustains one beat per cycle. done goes high
// after the beat flagged last has been accepted and stays high until the next
// start; beats counts the beats written. The 512-bit, 16-value width is the
// document's; the addressing is this design's.
module vector_writer
  import cuper_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        in_valid,
  output logic        in_ready,
  input  beat_t       in_data,
  input  logic        in_last,
  output logic        wr_valid,
  input  logic        wr_ready,
  output wr_req_t     wr_req,
  output logic        done,
  output logic [31:0] beats
);
  logic last_q;

  assign in_ready = !wr_valid || wr_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_valid <= 1'b0; wr_req <= '0; last_q <= 1'b0; done <= 1'b0; beats <= '0;
    end else begin
      if (wr_valid && wr_ready) begin
        wr_valid <= 1'b0;
        beats    <= beats + 1;
        if (last_q) done <= 1'b1;
      end
      if (in_valid && in_ready) begin
        wr_valid    <= 1'b1;
        wr_req.data <= in_data;
        wr_req.addr <= beats + ((wr_valid && wr_ready) ? 32'd1 : 32'd0);
        last_q      <= in_last;
      end
      if (start) begin
        done <= 1'b0; beats <= '0;
      end
    end
  end
endmodule
