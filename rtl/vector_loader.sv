// vector_loader: loads the input-vector segment of one batch from HBM.
//
// On start it requests VEC_BEATS (= BATCH_COLS / 16 = 8) beats from beat
// address batch * VEC_BEATS of the vector channel and broadcasts every beat,
// with its index inside the segment, to all cores (bc_valid for one cycle per
// beat; the cores always accept). done pulses in the same cycle as the last
// beat's broadcast. A beat holds 16 FP32 values, element j in bits
// [32j+31:32j]. The 512-bit width and 16 values per cycle follow the
// document; the segment layout in memory is this design's choice.
module vector_loader
  import cuper_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [15:0] batch,
  output logic        busy,
  output logic        done,
  // HBM read channel
  output logic        rd_req_valid,
  input  logic        rd_req_ready,
  output rd_req_t     rd_req,
  input  logic        rd_rsp_valid,
  output logic        rd_rsp_ready,
  input  beat_t       rd_rsp_data,
  // broadcast to the cores
  output logic        bc_valid,
  output logic [$clog2(VEC_BEATS)-1:0] bc_idx,
  output beat_t       bc_data
);
  typedef enum logic [1:0] {IDLE, REQ, RECV} state_e;
  state_e state;
  logic [$clog2(VEC_BEATS):0] got;
  logic [31:0] base;

  assign rd_req_valid = (state == REQ);
  assign rd_req       = '{addr: base, len: 9'(VEC_BEATS)};
  assign rd_rsp_ready = (state == RECV);
  assign busy         = (state != IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= IDLE;
      got      <= '0;
      base     <= '0;
      done     <= 1'b0;
      bc_valid <= 1'b0;
      bc_idx   <= '0;
      bc_data  <= '0;
    end else begin
      done     <= 1'b0;
      bc_valid <= 1'b0;
      case (state)
        IDLE: if (start) begin
          base  <= 32'(batch) * 32'(VEC_BEATS);
          got   <= '0;
          state <= REQ;
        end
        REQ: if (rd_req_ready) state <= RECV;
        RECV: if (rd_rsp_valid) begin
          bc_valid <= 1'b1;
          bc_idx   <= got[$clog2(VEC_BEATS)-1:0];
          bc_data  <= rd_rsp_data;
          got      <= got + 1'b1;
          if (32'(got) == VEC_BEATS - 1) begin
            state <= IDLE;
            done  <= 1'b1;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end
endmodule
