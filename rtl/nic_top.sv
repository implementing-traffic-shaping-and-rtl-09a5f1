// Network interface with dedicated traffic shaping and link scheduling.
//
// A server hands each admitted flow's traffic parameters to the NIC once,
// as a chain of schedule segments (burst interval T, burst size S, number
// of bursts D). From then on the NIC paces the flow by itself: it fetches
// the flow's packets from a fixed region of host memory, releases one burst
// every T chunk times (traffic shaping) and, among the bursts that are due,
// sends the one with the earliest finish time first (link scheduling).
// Best-effort chunks fill the link when no paced burst is due.
//
// Structure (the hardware implementation of the document):
//   host --cmd--> [command FIFO] --> control block --> [request FIFO] --> host
//   control block --data tags--> [transmit FIFO] --> buffer manager
//   buffer manager --words--> [physical interface FIFO] --> link
//   buffer manager <--> DMA block <-- [DMA FIFO] <-- host memory
// The control block holds the segment memory, the traffic shaper, the link
// scheduler and their two priority queues.
//
// Ports: a command write port and a request read port for the host (the
// memory-mapped control interface), a word-wide read channel into host
// memory for the DMA block, and the link: one 64-bit word per cycle with
// the flow id and an end-of-chunk marker, valid/ready.
//
// The FIFO depths, word width and memory sizes are this design's choices;
// the document fixes the 128-byte chunk and the block structure.
//
// Lint notes: the occupancy counts and full flags of the five FIFOs and of the two queues,
// the free-chunk count and the DMA `done` pulse are left unused here on
// purpose (they are there for observation). rst_n is reported as both an
// asynchronous reset and a synchronous signal only because the assertions
// use it in their `disable iff`; every register resets asynchronously.
module nic_top #(
  parameter int unsigned NUM_FLOWS       = nic_pkg::NUM_FLOWS,
  parameter int unsigned SEG_LINES       = 2048,
  parameter int unsigned SCHED_PQ_DEPTH  = 256,
  parameter int unsigned PKT_CHUNKS      = 1024,
  parameter int unsigned BATCH           = 4,
  parameter int unsigned CMD_DEPTH       = 16,
  parameter int unsigned REQ_DEPTH       = 16,
  parameter int unsigned TX_DEPTH        = 16,
  parameter int unsigned PHY_DEPTH       = 32,
  parameter int unsigned DMA_DEPTH       = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // control interface: command FIFO write side
  input  logic                        cmd_push,
  input  nic_pkg::cmd_t               cmd_data,
  output logic                        cmd_full,
  // control interface: request FIFO read side
  input  logic                        req_pop,
  output nic_pkg::req_t               req_data,
  output logic                        req_empty,
  // host memory read channel of the DMA block
  output logic                        hr_valid,
  input  logic                        hr_ready,
  output logic [nic_pkg::ADDR_W-1:0]  hr_addr,
  input  logic                        hr_rvalid,
  input  logic [nic_pkg::WORD_W-1:0]  hr_rdata,
  // link
  output logic                        link_valid,
  input  logic                        link_ready,
  output nic_pkg::link_word_t         link_word,
  // status
  output logic [nic_pkg::TIME_W-1:0]  now,
  output logic [31:0]                 stat_moves,
  output logic [31:0]                 stat_segment_switches,
  output logic [31:0]                 stat_sched_tags,
  output logic [31:0]                 stat_be_released,
  output logic [31:0]                 stat_idle_slots,
  output logic [31:0]                 stat_late_tags,
  output logic [31:0]                 stat_chunks_sent,
  output logic [31:0]                 stat_refills,
  output logic [31:0]                 stat_stalls,
  output logic [31:0]                 stat_releases,
  output logic                        stat_sched_pq_full
);
  import nic_pkg::*;
  localparam int unsigned FW = $clog2(NUM_FLOWS);

  // ---------------------------------------------------------- command FIFO
  logic cmd_empty, cmd_pop;
  cmd_t cmd_head;
  logic [$clog2(CMD_DEPTH+1)-1:0] cmd_count;

  sync_fifo #(.T(cmd_t), .DEPTH(CMD_DEPTH)) u_cmd_fifo (
    .clk, .rst_n, .push(cmd_push), .wr_data(cmd_data), .pop(cmd_pop),
    .rd_data(cmd_head), .full(cmd_full), .empty(cmd_empty), .count(cmd_count)
  );

  // ---------------------------------------------------------- request FIFO
  logic req_push, req_full;
  req_t req_in;
  logic [$clog2(REQ_DEPTH+1)-1:0] req_count;

  sync_fifo #(.T(req_t), .DEPTH(REQ_DEPTH)) u_req_fifo (
    .clk, .rst_n, .push(req_push), .wr_data(req_in), .pop(req_pop),
    .rd_data(req_data), .full(req_full), .empty(req_empty), .count(req_count)
  );

  // --------------------------------------------------------- transmit FIFO
  logic      tx_push, tx_pop, tx_full, tx_empty;
  data_tag_t tx_in, tx_head;
  logic [$clog2(TX_DEPTH+1)-1:0] tx_count;

  sync_fifo #(.T(data_tag_t), .DEPTH(TX_DEPTH)) u_tx_fifo (
    .clk, .rst_n, .push(tx_push), .wr_data(tx_in), .pop(tx_pop),
    .rd_data(tx_head), .full(tx_full), .empty(tx_empty), .count(tx_count)
  );

  // ----------------------------------------------- physical interface FIFO
  logic       phy_push, phy_full, phy_empty;
  link_word_t phy_in;
  logic [$clog2(PHY_DEPTH+1)-1:0] phy_count;

  sync_fifo #(.T(link_word_t), .DEPTH(PHY_DEPTH)) u_phy_fifo (
    .clk, .rst_n, .push(phy_push), .wr_data(phy_in),
    .pop(link_valid && link_ready), .rd_data(link_word),
    .full(phy_full), .empty(phy_empty), .count(phy_count)
  );
  assign link_valid = !phy_empty;

  // --------------------------------------------------------- control block
  logic              setup_valid, setup_ready, be_valid, be_ready;
  logic              be_arrived, idle_slot;
  logic [FW-1:0]     setup_flow;
  logic [ADDR_W-1:0] setup_addr, be_addr;
  logic [LEN_W-1:0]  setup_len;
  logic [$clog2(SCHED_PQ_DEPTH+1)-1:0] sched_pq_count;
  logic [$clog2(NUM_FLOWS+1)-1:0]      shaper_pq_count;

  control_block #(
    .NUM_FLOWS(NUM_FLOWS), .SEG_LINES(SEG_LINES),
    .SHAPER_PQ_DEPTH(NUM_FLOWS), .SCHED_PQ_DEPTH(SCHED_PQ_DEPTH)
  ) u_control (
    .clk, .rst_n,
    .cmd_empty, .cmd_data(cmd_head), .cmd_pop,
    .req_full, .req_push, .req_data(req_in),
    .tx_full, .tx_push, .tx_data(tx_in),
    .setup_valid, .setup_ready, .setup_flow, .setup_addr, .setup_len,
    .be_valid, .be_ready, .be_addr, .be_arrived, .idle_slot, .now,
    .moves(stat_moves), .segment_switches(stat_segment_switches),
    .sched_tags(stat_sched_tags), .be_released(stat_be_released),
    .idle_slots(stat_idle_slots), .late_tags(stat_late_tags),
    .sched_pq_full(stat_sched_pq_full), .sched_pq_count, .shaper_pq_count
  );

  // -------------------------------------------------------- buffer manager
  logic              dma_cmd_valid, dma_cmd_ready, dma_w_valid, dma_done;
  logic [ADDR_W-1:0] dma_cmd_addr;
  logic [7:0]        dma_cmd_chunks;
  logic [WORD_W-1:0] dma_w_data;
  logic [$clog2(PKT_CHUNKS+1)-1:0] free_chunks;

  buffer_manager #(
    .NUM_FLOWS(NUM_FLOWS), .PKT_CHUNKS(PKT_CHUNKS), .BATCH(BATCH)
  ) u_buffers (
    .clk, .rst_n,
    .setup_valid, .setup_ready, .setup_flow, .setup_addr, .setup_len,
    .be_valid, .be_ready, .be_addr, .be_arrived,
    .tx_empty, .tx_data(tx_head), .tx_pop,
    .phy_full, .phy_empty, .link_ready, .phy_push, .phy_data(phy_in),
    .idle_slot,
    .dma_cmd_valid, .dma_cmd_ready, .dma_cmd_addr, .dma_cmd_chunks,
    .dma_w_valid, .dma_w_data,
    .chunks_sent(stat_chunks_sent), .refills(stat_refills),
    .stalls(stat_stalls), .releases(stat_releases), .free_chunks
  );

  // ------------------------------------------------------------- DMA block
  // Read data from the interconnect passes a FIFO on its way into the DMA
  // block. The engine takes a word every cycle, so it holds at most one;
  // it decouples the host clocking of the data from the engine.
  logic              dfifo_empty, dfifo_full;
  logic [WORD_W-1:0] dfifo_head;
  logic [$clog2(DMA_DEPTH+1)-1:0] dfifo_count;

  sync_fifo #(.T(logic [WORD_W-1:0]), .DEPTH(DMA_DEPTH)) u_dma_fifo (
    .clk, .rst_n, .push(hr_rvalid), .wr_data(hr_rdata), .pop(!dfifo_empty),
    .rd_data(dfifo_head), .full(dfifo_full), .empty(dfifo_empty),
    .count(dfifo_count)
  );

  dma_engine u_dma (
    .clk, .rst_n,
    .cmd_valid(dma_cmd_valid), .cmd_ready(dma_cmd_ready),
    .cmd_addr(dma_cmd_addr), .cmd_chunks(dma_cmd_chunks),
    .hr_valid, .hr_ready, .hr_addr,
    .hr_rvalid(!dfifo_empty), .hr_rdata(dfifo_head),
    .w_valid(dma_w_valid), .w_data(dma_w_data), .done(dma_done)
  );
endmodule
