// Shared types and constants of the traffic-shaping / link-scheduling NIC.
//
// The NIC paces every admitted flow according to a list of schedule
// segments (burst interval T, burst size S, duration D, plus the "more" and
// "infinite" flags) and multiplexes the paced bursts onto one outgoing link
// in order of their finish time. Time is measured in chunks: a fixed-size
// unit of 128 bytes, so the time counter is the number of chunks scheduled
// for transmission so far.
//
// Field order of a schedule segment (more, infinite, T, D, S) and the chunk
// size of 128 bytes follow the document. All field widths, the number of
// flows, the memory sizes and the command and request encodings are choices
// of this design; the document gives none of them.
package nic_pkg;

  // ---------------------------------------------------------------- sizes
  localparam int unsigned NUM_FLOWS   = 1024;  // admitted flows (flow ids)
  localparam int unsigned FLOW_W      = $clog2(NUM_FLOWS);
  localparam int unsigned TIME_W      = 32;    // chunk time counter
  localparam int unsigned T_W         = 16;    // burst interval, in chunks
  localparam int unsigned D_W         = 16;    // duration, in bursts
  localparam int unsigned S_W         = 8;     // burst size, in chunks
  localparam int unsigned ADDR_W      = 32;    // host physical byte address
  localparam int unsigned LEN_W       = 16;    // host region size, in chunks
  localparam int unsigned WORD_W      = 64;    // datapath word
  localparam int unsigned CHUNK_BYTES = 128;   // fixed packet (chunk) size
  localparam int unsigned CHUNK_WORDS = CHUNK_BYTES * 8 / WORD_W;

  // ------------------------------------------------------ schedule segment
  typedef struct packed {
    logic           more;      // another segment follows in the chain
    logic           infinite;  // ignore D: the flow never ends by itself
    logic [T_W-1:0] t;         // burst interval (chunks)
    logic [D_W-1:0] d;         // number of bursts in this segment
    logic [S_W-1:0] s;         // burst size (chunks)
  } seg_t;

  localparam int unsigned SEG_W = $bits(seg_t);

  // ------------------------------------------------------------- commands
  typedef enum logic [2:0] {
    CMD_SEG   = 3'd0,  // append a schedule segment to a flow
    CMD_START = 3'd1,  // start a flow: host region base and size
    CMD_STOP  = 3'd2,  // stop a flow before its duration ends
    CMD_BE    = 3'd3   // one best-effort chunk at a host address
  } cmd_op_e;

  typedef struct packed {
    cmd_op_e           op;
    logic [FLOW_W-1:0] flow;
    seg_t              seg;    // CMD_SEG
    logic [ADDR_W-1:0] addr;   // CMD_START, CMD_BE
    logic [LEN_W-1:0]  len;    // CMD_START: region size in chunks
  } cmd_t;

  // ------------------------------------------------------------- requests
  typedef enum logic [1:0] {
    REQ_EOF     = 2'd0,  // the flow sent its last burst
    REQ_STOPPED = 2'd1,  // the flow was stopped by command
    REQ_ERROR   = 2'd2   // command refused (no free line, bad state)
  } req_code_e;

  typedef struct packed {
    req_code_e         code;
    logic [FLOW_W-1:0] flow;
  } req_t;

  // ----------------------------------------------------------------- tags
  // Shaper tag: flow id, start time and finish time of the HOL burst.
  typedef struct packed {
    logic [FLOW_W-1:0] flow;
    logic [TIME_W-1:0] finish;
  } shp_data_t;

  // Scheduler tag: flow id and finish time; the burst size and the
  // last-burst flag travel with it so that the scheduler needs no lookup.
  typedef struct packed {
    logic              last;
    logic [S_W-1:0]    chunks;
    logic [FLOW_W-1:0] flow;
  } sch_data_t;

  // Data tag written into the transmit FIFO for the buffer manager.
  typedef struct packed {
    logic              be;      // best-effort chunk, flow is ignored
    logic              last;    // release the flow's buffers afterwards
    logic [S_W-1:0]    chunks;  // chunks to send (0: release only)
    logic [FLOW_W-1:0] flow;
  } data_tag_t;

  // Word on the physical interface FIFO / link.
  typedef struct packed {
    logic              be;
    logic [FLOW_W-1:0] flow;
    logic              eoc;     // last word of a chunk
    logic [WORD_W-1:0] data;
  } link_word_t;

  // Wrap-safe "a is earlier than b" on the circular chunk clock.
  function automatic logic time_before(logic [TIME_W-1:0] a,
                                       logic [TIME_W-1:0] b);
    logic [TIME_W-1:0] diff;
    diff = a - b;
    return diff[TIME_W-1];
  endfunction

endpackage
