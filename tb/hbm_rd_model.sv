// hbm_rd_model: behavioural model of one HBM channel's read side, for
// testbenches only. Burst requests (beat address, length) are queued; each
// is answered, LAT cycles after it was accepted at the earliest, by its beats
// in order. With STALL set, the request and response sides randomly pause.
// The memory array mem is filled by the testbench through a hierarchical
// reference.
module hbm_rd_model
  import cuper_pkg::*;
#(
  parameter int unsigned WORDS = 1024,
  parameter int unsigned LAT   = 8,
  parameter bit          STALL = 1'b0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    req_valid,
  output logic    req_ready,
  input  rd_req_t req,
  output logic    rsp_valid,
  input  logic    rsp_ready,
  output beat_t   rsp_data
);
  beat_t mem [WORDS];
  typedef struct { logic [31:0] addr; int len; longint t; } pend_t;
  pend_t q [$];
  longint now = 0;
  logic [31:0] cur_addr;
  int cur_left = 0;
  logic stall_rsp, stall_req;

  always @(posedge clk) now <= now + 1;

  always @(posedge clk) begin
    stall_rsp <= STALL && ($urandom_range(0, 3) == 0);
    stall_req <= STALL && ($urandom_range(0, 3) == 0);
  end

  assign req_ready = rst_n && !stall_req && (q.size() < 8);
  assign rsp_valid = rst_n && (cur_left > 0) && !stall_rsp;
  assign rsp_data  = mem[cur_addr % WORDS];

  always @(posedge clk) begin
    if (!rst_n) begin
      q.delete();
      cur_left <= 0;
      cur_addr <= '0;
    end else begin
      if (req_valid && req_ready) q.push_back('{req.addr, int'(req.len), now + LAT});
      if (rsp_valid && rsp_ready) begin
        cur_addr <= cur_addr + 1;
        cur_left <= cur_left - 1;
      end
      if ((cur_left == 0 || (cur_left == 1 && rsp_valid && rsp_ready)) &&
          q.size() > 0 && q[0].t <= now) begin
        pend_t p;
        p = q.pop_front();
        cur_addr <= p.addr;
        cur_left <= p.len;
      end
    end
  end
endmodule
