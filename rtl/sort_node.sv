// sort_node: one comparator of the multi-way sorting tree.
//
// Two child streams, each sorted by address and ended by an element with
// last set, are merged into one sorted stream written into the node's FIFO
// (the parent-node buffer). While both children still deliver, the head with
// the smaller address moves up (ties: child a). Once a child has delivered
// its last element, the other child's elements move up unchanged, and the
// final element of the second child to end leaves with last set; then the
// node is ready for a new pair of streams. One element per cycle.
// The comparator moving the smaller address into the parent buffer is the
// document's; the last-flag protocol and the FIFO depth are this design's.
module sort_node
  import cuper_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic a_valid,
  output logic a_ready,
  input  res_t a,
  input  logic b_valid,
  output logic b_ready,
  input  res_t b,
  output logic out_valid,
  input  logic out_ready,
  output res_t out
);
  logic a_done, b_done;
  logic [$clog2(DEPTH+1)-1:0] fill;
  logic push, push_ready, take_a, take_b;
  res_t push_d;

  always_comb begin
    take_a = 1'b0;
    take_b = 1'b0;
    if (b_done)                    take_a = a_valid;
    else if (a_done)               take_b = b_valid;
    else if (a_valid && b_valid)   begin
      if (a.addr <= b.addr) take_a = 1'b1;
      else                  take_b = 1'b1;
    end
    push   = (take_a || take_b) && push_ready;
    push_d = take_a ? a : b;
    // last leaves only with the element that ends the second stream
    push_d.last = take_a ? (a.last && b_done) : (b.last && a_done);
  end

  assign a_ready = take_a && push_ready;
  assign b_ready = take_b && push_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_done <= 1'b0;
      b_done <= 1'b0;
    end else if (push) begin
      if (push_d.last) begin
        a_done <= 1'b0;
        b_done <= 1'b0;
      end else begin
        if (take_a && a.last) a_done <= 1'b1;
        if (take_b && b.last) b_done <= 1'b1;
      end
    end
  end

  sync_fifo #(.WIDTH($bits(res_t)), .DEPTH(DEPTH)) u_buf (
    .clk, .rst_n,
    .in_valid (push), .in_ready (push_ready), .in_data (push_d),
    .out_valid, .out_ready, .out_data (out), .count (fill)
  );
endmodule
