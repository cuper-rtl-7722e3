// vector_fetcher: a core's copy of the batch's input-vector segment, with the
// reuse register and the lane multiplexers.
//
// The BRAM holds the BATCH_COLS vector values of the current batch; it is
// written one 16-value beat at a time from the vector loader's broadcast. A
// packet's eight lanes are served in two steps:
//   cycle of rd_en : every lane that is neither idle nor a reuse hit reads the
//                    BRAM (registered read, eight read ports);
//   next cycle     : lane k outputs its BRAM value, or, for a hit or an idle
//                    lane, the value of lane k-1; lane 0's predecessor is the
//                    reuse register.
// The reuse register holds the column and value of the last non-idle element
// delivered, so a run of equal columns, inside a packet or across packets,
// reads the BRAM once. The controller (perceptual decoder) decides the hits
// by comparing columns with reuse_col; this block only keeps the register and
// does the multiplexing. A read is taken when rd_en is high and the second
// step is free (!x_valid || !hold). hold freezes the second step (back-pressure from the
// PE group). reuse_clear invalidates the register when a new batch starts.
// Reuse registers and the MUX are the document's; one register per core,
// chained through the lanes, is this design's reading of "flexible".
module vector_fetcher
  import cuper_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // segment write from the vector loader
  input  logic        wr_en,
  input  logic [$clog2(VEC_BEATS)-1:0] wr_idx,
  input  beat_t       wr_data,
  // read request of one packet
  input  logic        rd_en,
  input  logic [6:0]  rd_col  [NUM_PE],
  input  logic        rd_hit  [NUM_PE],   // take the previous lane's value
  input  logic        rd_idle [NUM_PE],   // idle slot, also takes the previous value
  input  logic        hold,               // keep the second-step registers
  input  logic        reuse_clear,
  output logic [15:0] reuse_col,
  output logic        reuse_col_valid,
  // values of the packet read in the previous rd_en cycle
  output logic [31:0] x_out [NUM_PE],
  output logic        x_valid,            // x_out holds a packet's values
  output logic        adv                 // second step consumed (reuse value updated)
);
  logic [31:0] bram [BATCH_COLS];
  logic [31:0] x_q     [NUM_PE];
  logic        pass_q  [NUM_PE];
  logic        s_valid;
  logic [31:0] reuse_val;

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int j = 0; j < VEC_PER_BEAT; j++)
        bram[int'(wr_idx) * VEC_PER_BEAT + j] <= wr_data[32*j +: 32];
  end

  // second step: the MUX chain
  always_comb begin
    logic [31:0] prev;
    prev = reuse_val;
    for (int k = 0; k < NUM_PE; k++) begin
      x_out[k] = pass_q[k] ? prev : x_q[k];
      prev     = x_out[k];
    end
  end

  assign adv = s_valid && !hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_valid         <= 1'b0;
      reuse_val       <= '0;
      reuse_col       <= '0;
      reuse_col_valid <= 1'b0;
      for (int k = 0; k < NUM_PE; k++) begin
        x_q[k]    <= '0;
        pass_q[k] <= 1'b0;
      end
    end else begin
      if (adv) reuse_val <= x_out[NUM_PE-1];
      if (!hold || !s_valid) begin
        s_valid <= rd_en;
        if (rd_en) begin
          for (int k = 0; k < NUM_PE; k++) begin
            pass_q[k] <= rd_hit[k] | rd_idle[k];
            if (!(rd_hit[k] | rd_idle[k])) x_q[k] <= bram[rd_col[k]];
          end
        end
      end
      if (reuse_clear) begin
        reuse_col_valid <= 1'b0;
      end else if (rd_en && (!hold || !s_valid)) begin
        for (int k = 0; k < NUM_PE; k++)
          if (!rd_idle[k]) begin
            reuse_col       <= {9'd0, rd_col[k]};
            reuse_col_valid <= 1'b1;
          end
      end
    end
  end

  assign x_valid = s_valid;
endmodule
