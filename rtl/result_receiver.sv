// result_receiver: packs the sorted result stream into 512-bit beats.
//
// Values arrive one per cycle from the sorting tree, in address order; every
// VEC_PER_BEAT (16) of them form one beat, value j in bits [32j+31:32j]. The
// element with last closes the beat early, the rest of it zero, and the beat
// leaves with out_last. The beat waits in an output register until the
// vector writer takes it; the input is stalled meanwhile. The packing width
// follows the writer's 512-bit port; the rest is this design's.
module result_receiver
  import cuper_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  res_t  in,
  output logic  out_valid,
  input  logic  out_ready,
  output beat_t out_data,
  output logic  out_last
);
  logic [$clog2(VEC_PER_BEAT)-1:0] idx;
  beat_t acc;

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx <= '0; acc <= '0;
      out_valid <= 1'b0; out_data <= '0; out_last <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        if (idx == $bits(idx)'(VEC_PER_BEAT - 1) || in.last) begin
          beat_t b;
          b = acc;
          b[32*idx +: 32] = in.val;
          out_data  <= b;
          out_valid <= 1'b1;
          out_last  <= in.last;
          acc <= '0;
          idx <= '0;
        end else begin
          acc[32*idx +: 32] <= in.val;
          idx <= idx + 1'b1;
        end
      end
    end
  end
endmodule
