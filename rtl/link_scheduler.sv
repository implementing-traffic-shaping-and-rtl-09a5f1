// Link scheduler and chunk clock of the control block.
//
// Keeps the system time `now`, which counts the chunks scheduled for
// transmission so far (the document's definition), and decides what goes on
// the link next. Once the shaper has moved every eligible tag (`settled`)
// and the transmit FIFO has room, it takes one decision per cycle:
//   1. if the scheduler priority queue holds a tag, remove the one with the
//      smallest finish time, write its data tag (flow id, burst size, last
//      flag) into the transmit FIFO and advance `now` by the burst size;
//   2. otherwise, if a best-effort chunk is buffered, release it (data tag
//      with the best-effort bit) and advance `now` by one chunk;
//   3. otherwise, if the link has just spent one chunk time idle
//      (`idle_slot`), advance `now` by one chunk.
// The best-effort fallback follows the document ("if there are no eligible
// packets ... release a best-effort packet"); it is done here rather than by
// inserting a tag into the queue, which has the same effect. Step 3 is this
// design's own: without it the clock, and so every flow, would stop while
// the link is idle.
//
// `be_arrived` pulses once per best-effort chunk stored by the buffer
// manager; the scheduler counts those not yet released.
module link_scheduler #(
  parameter int unsigned BE_CNT_W = 16
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       settled,
  // scheduler priority queue, remove side
  input  logic                       sch_head_valid,
  input  logic [nic_pkg::TIME_W-1:0] sch_head_key,
  input  nic_pkg::sch_data_t         sch_head_data,
  output logic                       sch_pop,
  // transmit FIFO, write side
  input  logic                       tx_full,
  output logic                       tx_push,
  output nic_pkg::data_tag_t         tx_data,
  // best-effort and idle-link events
  input  logic                       be_arrived,
  input  logic                       idle_slot,
  output logic [nic_pkg::TIME_W-1:0] now,
  // event counters for observation
  output logic [31:0]                sched_tags,
  output logic [31:0]                be_released,
  output logic [31:0]                idle_slots,
  output logic [31:0]                late_tags
);
  import nic_pkg::*;

  logic [BE_CNT_W-1:0] be_avail;
  logic                go, take_tag, take_be, take_idle;

  assign go        = settled && !tx_full;
  assign take_tag  = go && sch_head_valid;
  assign take_be   = go && !sch_head_valid && (be_avail != '0);
  assign take_idle = settled && !sch_head_valid && (be_avail == '0) && idle_slot;

  assign sch_pop = take_tag;
  assign tx_push = take_tag || take_be;
  always_comb begin
    if (take_tag)
      tx_data = '{be: 1'b0, last: sch_head_data.last,
                  chunks: sch_head_data.chunks, flow: sch_head_data.flow};
    else
      tx_data = '{be: 1'b1, last: 1'b0, chunks: S_W'(1), flow: '0};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now         <= '0;
      be_avail    <= '0;
      sched_tags  <= '0;
      be_released <= '0;
      idle_slots  <= '0;
      late_tags   <= '0;
    end else begin
      if (take_tag) begin
        now        <= now + TIME_W'(sch_head_data.chunks);
        sched_tags <= sched_tags + 1;
        // a burst that starts after its finish time has missed its deadline
        if (time_before(sch_head_key, now)) late_tags <= late_tags + 1;
      end else if (take_be || take_idle) begin
        now <= now + 1'b1;
      end
      if (take_be)   be_released <= be_released + 1;
      if (take_idle) idle_slots  <= idle_slots + 1;
      be_avail <= be_avail + BE_CNT_W'(be_arrived) - BE_CNT_W'(take_be);
    end
  end
endmodule
