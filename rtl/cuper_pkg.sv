// cuper_pkg: constants and types shared by the SpMV accelerator.
//
// A non-zero travels as a 64-bit element: a 32-bit FP32 value above a 32-bit
// index that holds a 16-bit row and a 16-bit column (the value/index split
// and the 64-bit size follow the storage format; the 16/16 split of the index
// is this design's choice). Eight elements form a 512-bit packet, element 0 in
// bits [63:0]. The row field is the row's local index inside its core
// (global row = local * NUM_CORES + core, rows being dealt to channels
// cyclically); the column field is the column inside the current 128-column
// batch. A column of IDLE_COL marks an idle slot of the reordering window.
//
// Every channel's data for one batch starts with a header beat whose bits
// [31:0] give the number of packets that follow (this design's encoding).
package cuper_pkg;

  localparam int NUM_CH       = 16;   // HBM channels that carry the matrix
  localparam int NUM_CORES    = 16;   // dedicated computational cores
  localparam int NUM_PE       = 8;    // PEs per core = elements per packet
  localparam int VEC_PER_BEAT = 16;   // FP32 values per 512-bit beat
  localparam int BATCH_COLS   = 128;  // columns of one batch
  localparam int BEAT_W       = 512;
  localparam int ADD_LAT      = 4;    // FP32 accumulation latency
  localparam int VEC_BEATS    = BATCH_COLS / VEC_PER_BEAT; // 8 beats per batch

  localparam logic [15:0] IDLE_COL = 16'hFFFF;

  typedef logic [BEAT_W-1:0] beat_t;

  typedef struct packed {
    logic [31:0] val;
    logic [15:0] row;
    logic [15:0] col;
  } elem_t;

  typedef elem_t [NUM_PE-1:0] packet_t;

  // Read request of one HBM channel: beat address and burst length (beats).
  typedef struct packed {
    logic [31:0] addr;
    logic [8:0]  len;
  } rd_req_t;

  // Write request of one HBM channel: one beat.
  typedef struct packed {
    logic [31:0] addr;
    beat_t       data;
  } wr_req_t;

  // Token from a core to its accumulator lane.
  typedef enum logic [1:0] {
    K_ELEM   = 2'd0,  // accumulate val into row
    K_BUBBLE = 2'd1,  // idle reordering slot: the adder is left unused
    K_EOB    = 2'd2,  // end of batch
    K_NOP    = 2'd3   // nothing (dropped by the PE group)
  } kind_e;

  typedef struct packed {
    kind_e       kind;
    logic [15:0] row;
    logic [31:0] val;
  } acc_tok_t;

  // Result element: global row address and value, last marks the end of a stream.
  typedef struct packed {
    logic        last;
    logic [31:0] addr;
    logic [31:0] val;
  } res_t;

endpackage
