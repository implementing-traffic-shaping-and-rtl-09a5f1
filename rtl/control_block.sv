// Control block of the shaping NIC.
//
// Groups what the document places in the control block: the schedule
// segment memory with its pointer memory and free-line FIFO
// (segment_store), the traffic shaper with the control state machine
// (traffic_shaper), the link scheduler with the chunk clock
// (link_scheduler), and the two dedicated priority queues: the shaper queue
// sorted by start time and the scheduler queue sorted by finish time.
//
// Interfaces: the read side of the command FIFO, the write side of the
// request FIFO and of the transmit FIFO of data tags, a setup and a
// best-effort handshake towards the buffer manager, and two event inputs
// from it (best-effort chunk stored, idle link slot).
//
// The shaper queue holds one tag per active flow, so its depth is the
// number of flows. The scheduler queue depth defaults to 256, the size the
// document's evaluation finds sufficient when period division is used.
//
// The shaper queue's full flag and the segment store's free-line count are
// not used: the shaper queue cannot overflow (one tag per flow), and a full
// segment memory is reported by the store's append acknowledge.
module control_block #(
  parameter int unsigned NUM_FLOWS       = nic_pkg::NUM_FLOWS,
  parameter int unsigned SEG_LINES       = 2048,
  parameter int unsigned SHAPER_PQ_DEPTH = NUM_FLOWS,
  parameter int unsigned SCHED_PQ_DEPTH  = 256
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         cmd_empty,
  input  nic_pkg::cmd_t                cmd_data,
  output logic                         cmd_pop,
  input  logic                         req_full,
  output logic                         req_push,
  output nic_pkg::req_t                req_data,
  input  logic                         tx_full,
  output logic                         tx_push,
  output nic_pkg::data_tag_t           tx_data,
  output logic                         setup_valid,
  input  logic                         setup_ready,
  output logic [$clog2(NUM_FLOWS)-1:0] setup_flow,
  output logic [nic_pkg::ADDR_W-1:0]   setup_addr,
  output logic [nic_pkg::LEN_W-1:0]    setup_len,
  output logic                         be_valid,
  input  logic                         be_ready,
  output logic [nic_pkg::ADDR_W-1:0]   be_addr,
  input  logic                         be_arrived,
  input  logic                         idle_slot,
  output logic [nic_pkg::TIME_W-1:0]   now,
  // observation
  output logic [31:0]                  moves,
  output logic [31:0]                  segment_switches,
  output logic [31:0]                  sched_tags,
  output logic [31:0]                  be_released,
  output logic [31:0]                  idle_slots,
  output logic [31:0]                  late_tags,
  output logic                         sched_pq_full,
  output logic [$clog2(SCHED_PQ_DEPTH+1)-1:0] sched_pq_count,
  output logic [$clog2(SHAPER_PQ_DEPTH+1)-1:0] shaper_pq_count
);
  import nic_pkg::*;
  localparam int unsigned FW = $clog2(NUM_FLOWS);

  // shaper priority queue
  logic              shp_head_valid, shp_pop, shp_ins, shp_full;
  logic [TIME_W-1:0] shp_head_key, shp_ins_key;
  shp_data_t         shp_head_data, shp_ins_data;

  priority_queue #(.DEPTH(SHAPER_PQ_DEPTH), .KEY_W(TIME_W),
                   .DATA_W($bits(shp_data_t))) u_shaper_pq (
    .clk, .rst_n,
    .ins(shp_ins), .ins_key(shp_ins_key), .ins_data(shp_ins_data),
    .pop(shp_pop),
    .head_valid(shp_head_valid), .head_key(shp_head_key),
    .head_data(shp_head_data),
    .full(shp_full), .count(shaper_pq_count)
  );

  // scheduler priority queue
  logic              sch_head_valid, sch_pop, sch_ins;
  logic [TIME_W-1:0] sch_head_key, sch_ins_key;
  sch_data_t         sch_head_data, sch_ins_data;

  priority_queue #(.DEPTH(SCHED_PQ_DEPTH), .KEY_W(TIME_W),
                   .DATA_W($bits(sch_data_t))) u_sched_pq (
    .clk, .rst_n,
    .ins(sch_ins), .ins_key(sch_ins_key), .ins_data(sch_ins_data),
    .pop(sch_pop),
    .head_valid(sch_head_valid), .head_key(sch_head_key),
    .head_data(sch_head_data),
    .full(sched_pq_full), .count(sched_pq_count)
  );

  // schedule segment memory
  logic          seg_app_en, seg_app_ok, seg_rd_en, seg_rd_has, seg_rd_has_next;
  logic          seg_pop_en;
  logic [FW-1:0] seg_app_flow, seg_rd_flow, seg_pop_flow;
  seg_t          seg_app_seg, seg_rd_seg;
  logic [$clog2(SEG_LINES+1)-1:0] free_lines;

  segment_store #(.NUM_FLOWS(NUM_FLOWS), .SEG_LINES(SEG_LINES)) u_segments (
    .clk, .rst_n,
    .app_en(seg_app_en), .app_flow(seg_app_flow), .app_seg(seg_app_seg),
    .app_ok(seg_app_ok),
    .rd_en(seg_rd_en), .rd_flow(seg_rd_flow), .rd_seg(seg_rd_seg),
    .rd_has(seg_rd_has), .rd_has_next(seg_rd_has_next),
    .pop_en(seg_pop_en), .pop_flow(seg_pop_flow),
    .free_lines(free_lines)
  );

  logic settled;

  traffic_shaper #(.NUM_FLOWS(NUM_FLOWS)) u_shaper (
    .clk, .rst_n, .now,
    .cmd_empty, .cmd_data, .cmd_pop,
    .req_full, .req_push, .req_data,
    .shp_head_valid, .shp_head_key, .shp_head_data, .shp_pop,
    .shp_ins, .shp_ins_key, .shp_ins_data,
    .sch_full(sched_pq_full), .sch_ins, .sch_ins_key, .sch_ins_data,
    .seg_app_en, .seg_app_flow, .seg_app_seg, .seg_app_ok,
    .seg_rd_en, .seg_rd_flow, .seg_rd_seg, .seg_rd_has, .seg_rd_has_next,
    .seg_pop_en, .seg_pop_flow,
    .setup_valid, .setup_ready, .setup_flow, .setup_addr, .setup_len,
    .be_valid, .be_ready, .be_addr,
    .settled, .moves, .segment_switches
  );

  link_scheduler u_scheduler (
    .clk, .rst_n, .settled,
    .sch_head_valid, .sch_head_key, .sch_head_data, .sch_pop,
    .tx_full, .tx_push, .tx_data,
    .be_arrived, .idle_slot, .now,
    .sched_tags, .be_released, .idle_slots, .late_tags
  );
endmodule
