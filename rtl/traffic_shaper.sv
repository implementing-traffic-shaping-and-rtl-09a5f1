// Traffic shaper and control state machine of the control block.
//
// Every active flow owns exactly one shaper tag in the shaper priority
// queue: its flow id plus the start and finish time of the flow's
// head-of-line burst. The queue is sorted by start time. When the chunk
// clock `now` reaches the start time of the head tag, the shaper removes
// it, reads the flow's current schedule segment and
//   * inserts a scheduler tag (flow id, finish time, burst size S, last
//     flag) into the scheduler priority queue, and
//   * builds the flow's next shaper tag: start = this finish time,
//     finish = start + T, while bursts remain in the segment (or the segment
//     is infinite); at the end of a segment whose "more" flag is set it frees
//     that segment's line and continues with the next segment; at the end of
//     the last segment it frees the flow's lines and writes an end-of-flow
//     request into the request FIFO.
// It moves every eligible tag before the scheduler may pick the next burst
// (`settled` is low while a move is possible), so that bursts with the same
// start time compete by finish time, as the document requires.
//
// Between moves it executes host commands from the command FIFO:
//   CMD_SEG   append a schedule segment to a flow,
//   CMD_START hand the host region to the buffer manager and create the
//             first shaper tag with start = now,
//   CMD_STOP  end the flow at its next eligible tag,
//   CMD_BE    pass a best-effort chunk address to the buffer manager.
// Refused commands produce REQ_ERROR.
//
// From the document: tag contents, sorting keys, first start time = current
// time, finish = start + T, the segment chain with the more/infinite flags,
// line recycling, end-of-flow request, and moving all eligible tags first.
// The document states both "start time is the finish time of the previous
// packet plus T" and "its deadline is the earliest time the next packet in
// the flow can begin"; this design follows the second (next start = previous
// finish), which spaces bursts T chunks apart. The command encoding, the
// stop behaviour and the error requests are this design's own.
//
// Timing: a move takes 2 cycles (pop + segment read, then insert), 4 more
// when a new segment is started. A command takes 2 to 4 cycles.
module traffic_shaper #(
  parameter int unsigned NUM_FLOWS = nic_pkg::NUM_FLOWS
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [nic_pkg::TIME_W-1:0]   now,
  // command FIFO (read side)
  input  logic                         cmd_empty,
  input  nic_pkg::cmd_t                cmd_data,
  output logic                         cmd_pop,
  // request FIFO (write side)
  input  logic                         req_full,
  output logic                         req_push,
  output nic_pkg::req_t                req_data,
  // shaper priority queue (key = start time)
  input  logic                         shp_head_valid,
  input  logic [nic_pkg::TIME_W-1:0]   shp_head_key,
  input  nic_pkg::shp_data_t           shp_head_data,
  output logic                         shp_pop,
  output logic                         shp_ins,
  output logic [nic_pkg::TIME_W-1:0]   shp_ins_key,
  output nic_pkg::shp_data_t           shp_ins_data,
  // scheduler priority queue (key = finish time), insert side
  input  logic                         sch_full,
  output logic                         sch_ins,
  output logic [nic_pkg::TIME_W-1:0]   sch_ins_key,
  output nic_pkg::sch_data_t           sch_ins_data,
  // segment store
  output logic                         seg_app_en,
  output logic [$clog2(NUM_FLOWS)-1:0] seg_app_flow,
  output nic_pkg::seg_t                seg_app_seg,
  input  logic                         seg_app_ok,
  output logic                         seg_rd_en,
  output logic [$clog2(NUM_FLOWS)-1:0] seg_rd_flow,
  input  nic_pkg::seg_t                seg_rd_seg,
  input  logic                         seg_rd_has,
  input  logic                         seg_rd_has_next,
  output logic                         seg_pop_en,
  output logic [$clog2(NUM_FLOWS)-1:0] seg_pop_flow,
  // buffer manager: flow setup and best-effort chunks
  output logic                         setup_valid,
  input  logic                         setup_ready,
  output logic [$clog2(NUM_FLOWS)-1:0] setup_flow,
  output logic [nic_pkg::ADDR_W-1:0]   setup_addr,
  output logic [nic_pkg::LEN_W-1:0]    setup_len,
  output logic                         be_valid,
  input  logic                         be_ready,
  output logic [nic_pkg::ADDR_W-1:0]   be_addr,
  // to the link scheduler
  output logic                         settled,
  // event counters for observation
  output logic [31:0]                  moves,
  output logic [31:0]                  segment_switches
);
  import nic_pkg::*;
  localparam int unsigned FW = $clog2(NUM_FLOWS);

  typedef enum logic [3:0] {
    S_IDLE, S_MOVE, S_NEXT_RD, S_NEXT, S_FREE, S_FREE_RD, S_FREE_CHK,
    S_REQ, S_ERR, S_CMD, S_START, S_SETUP, S_BE
  } state_e;

  state_e            state;
  logic [FW-1:0]     f;          // flow being worked on
  logic [TIME_W-1:0] finish;     // finish time of the popped tag
  cmd_t              cmd;
  req_code_e         req_code;
  seg_t              start_seg;

  // per-flow state
  logic [D_W-1:0]        rem [NUM_FLOWS];  // bursts left after the current tag (RAM)
  logic [NUM_FLOWS-1:0]  active, stopping;
  logic                  rem_we;
  logic [D_W-1:0]        rem_wd;

  logic eligible;
  assign eligible = shp_head_valid && !time_before(now, shp_head_key);
  assign settled  = (state == S_IDLE) && !(eligible && !sch_full);

  // the segment of the popped tag (valid in S_MOVE) and what follows it
  logic seg_cont, seg_next, seg_last;
  assign seg_cont = seg_rd_seg.infinite || (rem[f] != '0);
  assign seg_next = !seg_cont && seg_rd_seg.more && seg_rd_has_next;
  assign seg_last = !seg_cont && !seg_next;

  always_comb begin
    cmd_pop      = 1'b0;
    req_push     = 1'b0;
    req_data     = '{code: req_code, flow: f};
    shp_pop      = 1'b0;
    shp_ins      = 1'b0;
    shp_ins_key  = finish;
    shp_ins_data = '{flow: f, finish: finish + TIME_W'(seg_rd_seg.t)};
    sch_ins      = 1'b0;
    sch_ins_key  = finish;
    sch_ins_data = '{last: 1'b0, chunks: seg_rd_seg.s, flow: f};
    seg_app_en   = 1'b0;
    seg_app_flow = cmd.flow;
    seg_app_seg  = cmd.seg;
    seg_rd_en    = 1'b0;
    seg_rd_flow  = f;
    seg_pop_en   = 1'b0;
    seg_pop_flow = f;
    setup_valid  = 1'b0;
    setup_flow   = cmd.flow;
    setup_addr   = cmd.addr;
    setup_len    = cmd.len;
    be_valid     = 1'b0;
    be_addr      = cmd.addr;
    unique case (state)
      S_IDLE: begin
        if (eligible && !sch_full) begin
          shp_pop     = 1'b1;
          seg_rd_en   = 1'b1;
          seg_rd_flow = shp_head_data.flow;
        end else if (!cmd_empty) begin
          cmd_pop = 1'b1;
        end
      end
      S_MOVE: begin
        sch_ins = 1'b1;
        if (stopping[f]) begin
          // release-only tag: the buffer manager frees the flow's chunks
          sch_ins_data = '{last: 1'b1, chunks: '0, flow: f};
        end else begin
          sch_ins_data.last = seg_last;
          if (seg_cont) shp_ins = 1'b1;
          if (!seg_cont) seg_pop_en = 1'b1;  // segment used up
        end
      end
      S_NEXT_RD: seg_rd_en = 1'b1;
      S_NEXT: begin
        shp_ins = 1'b1;
      end
      S_FREE:    seg_pop_en = 1'b1;
      S_FREE_RD: seg_rd_en  = 1'b1;
      S_REQ:     req_push   = !req_full;
      S_ERR:     req_push   = !req_full;
      S_CMD: begin
        unique case (cmd.op)
          CMD_SEG:   seg_app_en = 1'b1;
          CMD_START: begin
            seg_rd_en   = 1'b1;
            seg_rd_flow = cmd.flow;
          end
          default: ;
        endcase
      end
      S_SETUP: begin
        setup_valid  = 1'b1;
        if (setup_ready) begin
          shp_ins      = 1'b1;
          shp_ins_key  = now;
          shp_ins_data = '{flow: cmd.flow, finish: now + TIME_W'(start_seg.t)};
        end
      end
      S_BE: be_valid = 1'b1;
      default: ;
    endcase
  end

  // burst counter of the current segment: one write port, no reset (it is
  // always written when a flow starts)
  always_comb begin
    rem_we = 1'b0;
    rem_wd = rem[f] - 1'b1;
    unique case (state)
      S_MOVE:  rem_we = !stopping[f] && seg_cont && !seg_rd_seg.infinite;
      S_NEXT: begin
        rem_we = 1'b1;
        rem_wd = (seg_rd_seg.d != '0) ? seg_rd_seg.d - 1'b1 : '0;
      end
      S_SETUP: begin
        rem_we = setup_ready;
        rem_wd = (start_seg.d != '0) ? start_seg.d - 1'b1 : '0;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) if (rem_we) rem[f] <= rem_wd;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state            <= S_IDLE;
      f                <= '0;
      finish           <= '0;
      cmd              <= '0;
      req_code         <= REQ_EOF;
      start_seg        <= '0;
      moves            <= '0;
      segment_switches <= '0;
      active           <= '0;
      stopping         <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (eligible && !sch_full) begin
            f      <= shp_head_data.flow;
            finish <= shp_head_data.finish;
            state  <= S_MOVE;
          end else if (!cmd_empty) begin
            cmd   <= cmd_data;
            f     <= cmd_data.flow;
            state <= S_CMD;
          end
        end
        S_MOVE: begin
          moves <= moves + 1;
          if (stopping[f]) begin
            req_code <= REQ_STOPPED;
            state    <= S_FREE;
          end else if (seg_cont) begin
            state <= S_IDLE;
          end else if (seg_next) begin
            state <= S_NEXT_RD;
          end else begin
            // last burst: free the remaining lines, then report
            req_code <= (seg_rd_seg.more) ? REQ_ERROR : REQ_EOF;
            state    <= S_FREE_RD;
          end
        end
        S_NEXT_RD: state <= S_NEXT;
        S_NEXT: begin
          segment_switches <= segment_switches + 1;
          state  <= S_IDLE;
        end
        S_FREE:     state <= S_FREE_RD;
        S_FREE_RD:  state <= S_FREE_CHK;
        S_FREE_CHK: state <= seg_rd_has ? S_FREE : S_REQ;
        S_REQ: begin
          if (!req_full) begin
            active[f]   <= 1'b0;
            stopping[f] <= 1'b0;
            state       <= S_IDLE;
          end
        end
        // an error report leaves the flow's state alone
        S_ERR: if (!req_full) state <= S_IDLE;
        S_CMD: begin
          unique case (cmd.op)
            CMD_SEG: begin
              if (seg_app_ok) state <= S_IDLE;
              else begin
                req_code <= REQ_ERROR;
                state    <= S_ERR;
              end
            end
            CMD_START: state <= S_START;
            CMD_STOP: begin
              if (active[f]) begin
                stopping[f] <= 1'b1;
                state       <= S_IDLE;
              end else begin
                req_code <= REQ_ERROR;
                state    <= S_ERR;
              end
            end
            default: state <= S_BE;
          endcase
        end
        S_START: begin
          if (seg_rd_has && !active[f]) begin
            start_seg <= seg_rd_seg;
            state     <= S_SETUP;
          end else begin
            req_code <= REQ_ERROR;
            state    <= S_ERR;
          end
        end
        S_SETUP: begin
          if (setup_ready) begin
            active[f]   <= 1'b1;
            stopping[f] <= 1'b0;
            state       <= S_IDLE;
          end
        end
        S_BE: if (be_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
