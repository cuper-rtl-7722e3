// crossbar_switch: N x N switch between the matrix loader's channel streams
// and the computational cores.
//
// Core k takes its packet stream from channel sel[k]. sel must be a
// permutation (checked by an assertion); a channel that no core selects is
// held (in_ready low). The path is combinational: valid and data go forward,
// ready goes back, with no added latency. The document says the crossbar
// balances the load of the cores; a static, configurable source per core is
// this design's reading of it (the identity mapping matches the cyclic
// channel allocation of rows).
module crossbar_switch
  import cuper_pkg::*;
#(
  parameter int unsigned N = NUM_CH
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-1:0] sel [N],
  input  logic                 in_valid  [N],
  output logic                 in_ready  [N],
  input  beat_t                in_data   [N],
  output logic                 out_valid [N],
  input  logic                 out_ready [N],
  output beat_t                out_data  [N]
);
  always_comb begin
    for (int c = 0; c < N; c++) in_ready[c] = 1'b0;
    for (int k = 0; k < N; k++) begin
      out_valid[k] = in_valid[sel[k]];
      out_data[k]  = in_data[sel[k]];
      if (out_ready[k]) in_ready[sel[k]] = 1'b1;
    end
  end

  // sel is a permutation: no two cores read the same channel
  logic perm_ok;
  always_comb begin
    perm_ok = 1'b1;
    for (int i = 0; i < N; i++)
      for (int j = i + 1; j < N; j++)
        if (sel[i] == sel[j]) perm_ok = 1'b0;
  end
  a_perm: assert property (@(posedge clk) disable iff (!rst_n) perm_ok);
endmodule
