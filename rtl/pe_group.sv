// pe_group: the eight PEs of a core and the stream that leaves the core.
//
// A packet's eight lanes enter the eight PEs together (in_valid/in_ready,
// in_ready meaning every PE can take one more token). The PEs multiply in
// parallel and queue (kind, row, product) in their FIFOs. The output side
// reads the FIFOs round robin, lane 0 to lane 7, one token per cycle, so the
// tokens leave in the order of the elements in the packets and the spacing
// the host's conflict-aware reordering put between equal rows survives.
// K_NOP tokens are dropped without using an output cycle; K_BUBBLE and K_EOB
// are forwarded. Output: out_valid/out_ready with an acc_tok_t.
// Eight PEs with FIFOs are the document's; the round-robin read order is this
// design's.
module pe_group
  import cuper_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  kind_e       in_kind [NUM_PE],
  input  logic [15:0] in_row  [NUM_PE],
  input  logic [31:0] in_val  [NUM_PE],
  input  logic [31:0] in_x    [NUM_PE],
  output logic        out_valid,
  input  logic        out_ready,
  output acc_tok_t    out_tok
);
  logic     pe_ready  [NUM_PE];
  logic     f_valid   [NUM_PE];
  logic     f_ready   [NUM_PE];
  acc_tok_t f_tok     [NUM_PE];
  logic [$clog2(NUM_PE)-1:0] ptr;

  always_comb begin
    in_ready = 1'b1;
    for (int k = 0; k < NUM_PE; k++) in_ready &= pe_ready[k];
  end

  for (genvar k = 0; k < NUM_PE; k++) begin : g_pe
    pe #(.FIFO_DEPTH(FIFO_DEPTH)) u_pe (
      .clk, .rst_n,
      .in_valid (in_valid && in_ready),
      .in_ready (pe_ready[k]),
      .in_kind (in_kind[k]), .in_row (in_row[k]), .in_val (in_val[k]), .in_x (in_x[k]),
      .out_valid (f_valid[k]), .out_ready (f_ready[k]), .out_tok (f_tok[k])
    );
  end

  wire head_nop = f_valid[ptr] && (f_tok[ptr].kind == K_NOP);
  assign out_valid = f_valid[ptr] && !head_nop;
  assign out_tok   = f_tok[ptr];

  always_comb begin
    for (int k = 0; k < NUM_PE; k++) f_ready[k] = 1'b0;
    f_ready[ptr] = head_nop || out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (f_valid[ptr] && f_ready[ptr]) ptr <= ptr + 1'b1;
  end
endmodule
