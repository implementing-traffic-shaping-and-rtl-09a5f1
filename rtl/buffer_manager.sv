// Buffer manager: packet memory, per-flow packet lists and the transmit
// path to the physical interface FIFO.
//
// The packet memory is divided into chunks of 128 bytes (the fixed packet
// size). Every flow, plus one extra list for best-effort traffic, owns a
// linked list of chunks held in the memory; free chunks sit in a free list.
// Two activities run side by side:
//
//   Download. The manager keeps a few chunks of every active flow on the
//   NIC. When a flow is set up, and whenever sending leaves it with fewer
//   than BATCH chunks, the flow id is queued for a refill. The download side
//   takes refills (and best-effort requests, which have priority) one at a
//   time, asks the DMA engine for up to BATCH chunks from the flow's host
//   region (a ring of `len` chunks starting at `base`, read in order), and
//   appends each chunk to the flow's list as its last word arrives.
//
//   Transmit. It takes data tags from the transmit FIFO. For a tag of S
//   chunks it unlinks S chunks from the head of the flow's list one after
//   the other and copies each, word by word, into the physical interface
//   FIFO; a chunk goes back to the free list after its last word. If the
//   flow has no chunk yet, it waits for the download. A tag with the last
//   flag set releases the flow afterwards: it waits for a download in
//   flight for the flow, then returns every chunk still held for it.
//
// Only one list operation (append, unlink, flow setup) happens per cycle;
// an append, which cannot wait because DMA words are never stalled, wins.
//
// Memory pressure. Refill and best-effort downloads are only issued while
// at least BATCH chunks stay free. That reserve belongs to the tag the
// transmit side is stalled on: its flow is fetched ahead of every queued
// refill and may use the reserve, but only for the chunks the tag still
// needs, so those chunks are all sent and freed again. This way no cycle of
// waits can form even when the memory is much smaller than the flows'
// batches together. A refill still queued for a flow that has been released
// is dropped when it reaches the head of the refill queue.
//
// `idle_slot` pulses after every CHUNK_WORDS cycles in which the link was
// ready but nothing was queued for it; the link scheduler uses it to keep
// time running while the link is idle. `be_arrived` pulses for every
// best-effort chunk stored.
//
// From the document: per-flow linked lists of packets in the NIC buffers, a
// separate list for best-effort packets, downloading several packets at a
// time per flow to amortise DMA overhead, the flow id of a data tag
// selecting the list, and the per-flow host region fixed at flow setup.
// The memory size, the refill threshold and batch size, the ring
// behaviour of the host region, and the release of a finished flow's chunks
// are this design's choices.
//
// Timing: the packet memory is read asynchronously, so a chunk leaves in
// CHUNK_WORDS cycles plus one cycle to unlink it.
module buffer_manager #(
  parameter int unsigned NUM_FLOWS  = nic_pkg::NUM_FLOWS,
  parameter int unsigned PKT_CHUNKS = 1024,
  parameter int unsigned BATCH      = 4,
  parameter int unsigned BE_DEPTH   = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // flow setup and best-effort requests from the control block
  input  logic                         setup_valid,
  output logic                         setup_ready,
  input  logic [$clog2(NUM_FLOWS)-1:0] setup_flow,
  input  logic [nic_pkg::ADDR_W-1:0]   setup_addr,
  input  logic [nic_pkg::LEN_W-1:0]    setup_len,
  input  logic                         be_valid,
  output logic                         be_ready,
  input  logic [nic_pkg::ADDR_W-1:0]   be_addr,
  output logic                         be_arrived,
  // transmit FIFO, read side
  input  logic                         tx_empty,
  input  nic_pkg::data_tag_t           tx_data,
  output logic                         tx_pop,
  // physical interface FIFO, write side
  input  logic                         phy_full,
  input  logic                         phy_empty,
  input  logic                         link_ready,
  output logic                         phy_push,
  output nic_pkg::link_word_t          phy_data,
  output logic                         idle_slot,
  // DMA engine
  output logic                         dma_cmd_valid,
  input  logic                         dma_cmd_ready,
  output logic [nic_pkg::ADDR_W-1:0]   dma_cmd_addr,
  output logic [7:0]                   dma_cmd_chunks,
  input  logic                         dma_w_valid,
  input  logic [nic_pkg::WORD_W-1:0]   dma_w_data,
  // observation
  output logic [31:0]                  chunks_sent,
  output logic [31:0]                  refills,
  output logic [31:0]                  stalls,
  output logic [31:0]                  releases,
  output logic [$clog2(PKT_CHUNKS+1)-1:0] free_chunks
);
  import nic_pkg::*;
  localparam int unsigned FW    = $clog2(NUM_FLOWS);
  localparam int unsigned LISTS = NUM_FLOWS + 1;
  localparam int unsigned LW    = $clog2(LISTS);
  localparam int unsigned CIW   = $clog2(PKT_CHUNKS);
  localparam int unsigned CCW   = $clog2(PKT_CHUNKS + 1);
  localparam int unsigned WW    = $clog2(CHUNK_WORDS);
  localparam logic [LW-1:0] BE_LIST = LW'(NUM_FLOWS);

  // ------------------------------------------------------------- storage
  logic [WORD_W-1:0] pkt_mem  [PKT_CHUNKS * CHUNK_WORDS];
  logic [CIW-1:0]    next_mem [PKT_CHUNKS];

  logic [CIW-1:0]    head_mem [LISTS];
  logic [CIW-1:0]    tail_mem [LISTS];
  logic [CCW-1:0]    cnt_mem  [LISTS];   // chunks held per list (RAM)
  logic [LISTS-1:0]  cnt_ok;             // cnt_mem entry written since reset
  logic [LISTS-1:0]  pending;            // refill queued or in flight
  logic [LISTS-1:0]  active;
  logic [CCW-1:0]    cnt_t, cnt_f;       // chunk count of t_list / f_list
  logic [ADDR_W-1:0] base_mem [NUM_FLOWS];
  logic [LEN_W-1:0]  len_mem  [NUM_FLOWS];
  logic [LEN_W-1:0]  off_mem  [NUM_FLOWS];

  // free chunks: recycled ones in a FIFO, never-used ones from a counter
  logic [CCW-1:0] fresh;
  logic           fc_push, fc_pop, fc_empty, fc_full;
  logic [CIW-1:0] fc_head, fc_wr;
  logic [CCW-1:0] fc_count;

  sync_fifo #(.T(logic [CIW-1:0]), .DEPTH(PKT_CHUNKS)) u_free_chunks (
    .clk, .rst_n, .push(fc_push), .wr_data(fc_wr), .pop(fc_pop),
    .rd_data(fc_head), .full(fc_full), .empty(fc_empty), .count(fc_count)
  );
  assign free_chunks = fc_count + (CCW'(PKT_CHUNKS) - fresh);

  // refill requests (flow ids) and best-effort chunk addresses
  logic          rf_push, rf_pop, rf_empty, rf_full;
  logic [FW-1:0] rf_wr, rf_head;
  logic [$clog2(NUM_FLOWS+1)-1:0] rf_count;

  sync_fifo #(.T(logic [FW-1:0]), .DEPTH(NUM_FLOWS)) u_refills (
    .clk, .rst_n, .push(rf_push), .wr_data(rf_wr), .pop(rf_pop),
    .rd_data(rf_head), .full(rf_full), .empty(rf_empty), .count(rf_count)
  );

  logic              bq_pop, bq_empty, bq_full;
  logic [ADDR_W-1:0] bq_head;
  logic [$clog2(BE_DEPTH+1)-1:0] bq_count;

  sync_fifo #(.T(logic [ADDR_W-1:0]), .DEPTH(BE_DEPTH)) u_be_addrs (
    .clk, .rst_n, .push(be_valid && !bq_full), .wr_data(be_addr),
    .pop(bq_pop), .rd_data(bq_head), .full(bq_full), .empty(bq_empty),
    .count(bq_count)
  );
  assign be_ready = !bq_full;

  // transmit state (used by the download side to spot a stalled tag)
  typedef enum logic [2:0] {T_IDLE, T_HEAD, T_WORD, T_REL, T_DRAIN} tstate_e;
  tstate_e        t_state;
  data_tag_t      t_tag;
  logic [LW-1:0]  t_list;
  logic [S_W-1:0] t_left;
  logic [CIW-1:0] t_chunk;
  logic [WW-1:0]  t_w;
  logic           t_stalled;

  // ------------------------------------------------------------ download
  logic           f_busy;      // a DMA command is in flight
  logic [LW-1:0]  f_list;
  logic [7:0]     f_left;      // chunks still to arrive
  logic           f_urgent;    // the fetch serves a stalled tag
  logic [WW-1:0]  rx_w;
  logic [CIW-1:0] rx_chunk;
  logic [CIW-1:0] rx_idx;
  logic           op_append;   // list operation A: append a full chunk

  assign rx_idx    = (rx_w == '0) ? (fc_empty ? fresh[CIW-1:0] : fc_head) : rx_chunk;
  assign fc_pop    = dma_w_valid && (rx_w == '0) && !fc_empty;
  assign op_append = dma_w_valid && (rx_w == WW'(CHUNK_WORDS - 1));

  // issue side. Priority: the flow the transmit side is stalled on (it may
  // use the last BATCH free chunks), then best-effort chunks, then queued
  // refills; the last two leave BATCH chunks free so that a stalled flow
  // can always be served and no wait cycle can form.
  logic [FW-1:0]    sel_flow;
  logic [LEN_W-1:0] sel_len, sel_off, sel_room;
  logic [7:0]       sel_n, rf_n;
  logic             urgent, issue_be, issue_flow, issue_urgent, drop_flow;

  assign urgent   = (t_state == T_HEAD) && (t_list != BE_LIST) &&
                    (cnt_t == '0) && active[t_list] && (free_chunks != '0);
  assign sel_flow = urgent ? t_list[FW-1:0] : rf_head;
  assign sel_len  = len_mem[sel_flow];
  assign sel_off  = off_mem[sel_flow];
  assign sel_room = sel_len - sel_off;
  assign rf_n     = (sel_room < LEN_W'(BATCH)) ? sel_room[7:0] : 8'(BATCH);
  // a stalled tag fetches no more than it still needs, so the reserve it may
  // use always comes back once the tag has been sent
  always_comb begin
    sel_n = rf_n;
    if (urgent) begin
      if (8'(t_left) < sel_n)       sel_n = 8'(t_left);
      if (free_chunks < CCW'(sel_n)) sel_n = 8'(free_chunks);
    end
  end

  always_comb begin
    issue_be       = 1'b0;
    issue_flow     = 1'b0;
    issue_urgent   = 1'b0;
    drop_flow      = 1'b0;
    dma_cmd_valid  = 1'b0;
    dma_cmd_addr   = base_mem[sel_flow] + ADDR_W'(sel_off) * ADDR_W'(CHUNK_BYTES);
    dma_cmd_chunks = sel_n;
    if (!f_busy) begin
      if (urgent) begin
        dma_cmd_valid = 1'b1;
        issue_urgent  = dma_cmd_ready;
      end else if (!bq_empty && free_chunks > CCW'(BATCH)) begin
        dma_cmd_valid  = 1'b1;
        dma_cmd_addr   = bq_head;
        dma_cmd_chunks = 8'd1;
        issue_be       = dma_cmd_ready;
      end else if (!rf_empty) begin
        // a flow being released takes no more downloads
        if (!active[LW'(rf_head)] || sel_n == '0 ||
            (t_state == T_REL && t_list == LW'(rf_head))) begin
          drop_flow = 1'b1;
        end else if (free_chunks >= CCW'(sel_n) + CCW'(BATCH)) begin
          dma_cmd_valid = 1'b1;
          issue_flow    = dma_cmd_ready;
        end
      end
    end
  end
  assign bq_pop = issue_be;
  assign rf_pop = issue_flow || drop_flow;

  // ------------------------------------------------------------ transmit

  logic tx_want, op_unlink;
  assign tx_want   = (t_state == T_HEAD || t_state == T_DRAIN) && (cnt_t != '0);
  assign op_unlink = tx_want && !op_append;

  logic op_setup;
  assign setup_ready = !op_append && !tx_want && (t_state != T_REL) &&
                       !pending[LW'(setup_flow)];
  assign op_setup    = setup_valid && setup_ready;

  assign tx_pop = (t_state == T_IDLE) && !tx_empty;

  logic last_word;
  assign last_word = (t_w == WW'(CHUNK_WORDS - 1));
  assign phy_push  = (t_state == T_WORD) && !phy_full;
  assign phy_data  = '{be: t_tag.be, flow: t_tag.flow, eoc: last_word,
                       data: pkt_mem[{t_chunk, t_w}]};

  // chunks return to the free list after their last word, or when drained
  assign fc_push = (phy_push && last_word) || (t_state == T_DRAIN && op_unlink);
  assign fc_wr   = (t_state == T_DRAIN) ? head_mem[t_list] : t_chunk;

  // refill requests: after an unlink that leaves a flow short, at setup,
  // and again after a download that still left the flow short
  logic [CCW-1:0] cnt_after_unlink, cnt_after_append;
  logic           rf_on_unlink, rf_on_append, closing;
  assign cnt_after_unlink = cnt_t - 1'b1;
  assign cnt_after_append = cnt_f + 1'b1;
  assign closing          = (t_state == T_REL) && (t_list == f_list);
  assign rf_on_unlink = op_unlink && (t_state == T_HEAD) && (t_list != BE_LIST) &&
                        active[t_list] && !pending[t_list] && !t_tag.last &&
                        (cnt_after_unlink < CCW'(BATCH));
  assign rf_on_append = op_append && (f_left == 8'd1) && (f_list != BE_LIST) && !f_urgent &&
                        active[f_list] && !closing &&
                        (cnt_after_append < CCW'(BATCH));
  assign rf_push = op_setup || rf_on_unlink || rf_on_append;
  assign rf_wr   = op_setup ? setup_flow : rf_on_unlink ? t_list[FW-1:0] : f_list[FW-1:0];

  assign be_arrived = op_append && (f_list == BE_LIST);

  // idle link slots
  logic [WW-1:0] idle_cnt;
  logic          link_idle;
  assign link_idle = link_ready && phy_empty && tx_empty && (t_state == T_IDLE);
  assign idle_slot = link_idle && (idle_cnt == WW'(CHUNK_WORDS - 1));

  // --------------------------------------------------------------- state
  // RAMs: one write port each except off_mem (issue and setup never name
  // the same flow in one cycle: setup needs a flow with nothing pending)
  assign cnt_t = cnt_ok[t_list] ? cnt_mem[t_list] : '0;
  assign cnt_f = cnt_ok[f_list] ? cnt_mem[f_list] : '0;

  always_ff @(posedge clk) begin
    if (dma_w_valid) pkt_mem[{rx_idx, rx_w}] <= dma_w_data;
    if (op_append) begin
      tail_mem[f_list] <= rx_idx;
      if (cnt_f != '0) next_mem[tail_mem[f_list]] <= rx_idx;
    end
    // list operations are exclusive: append has priority over unlink
    if (op_append && cnt_f == '0) head_mem[f_list] <= rx_idx;
    else if (op_unlink)           head_mem[t_list] <= next_mem[head_mem[t_list]];
    if (op_append)      cnt_mem[f_list] <= cnt_after_append;
    else if (op_unlink) cnt_mem[t_list] <= cnt_after_unlink;
    if (op_setup) begin
      base_mem[setup_flow] <= setup_addr;
      len_mem[setup_flow]  <= setup_len;
      off_mem[setup_flow]  <= '0;
    end
    if (issue_flow || issue_urgent)
      off_mem[sel_flow] <= (sel_off + LEN_W'(sel_n) == sel_len) ? '0 : sel_off + LEN_W'(sel_n);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh       <= '0;
      f_busy      <= 1'b0;
      f_list      <= '0;
      f_left      <= '0;
      f_urgent    <= 1'b0;
      rx_w        <= '0;
      rx_chunk    <= '0;
      t_state     <= T_IDLE;
      t_tag       <= '0;
      t_list      <= '0;
      t_left      <= '0;
      t_chunk     <= '0;
      t_w         <= '0;
      t_stalled   <= 1'b0;
      idle_cnt    <= '0;
      chunks_sent <= '0;
      refills     <= '0;
      stalls      <= '0;
      releases    <= '0;
      cnt_ok      <= '0;
      pending     <= '0;
      active      <= LISTS'(1) << NUM_FLOWS;  // the best-effort list is always open
    end else begin
      // ---- download: words, chunk allocation, appends
      if (dma_w_valid) begin
        rx_w <= rx_w + 1'b1;
        if (rx_w == '0) begin
          rx_chunk <= rx_idx;
          if (fc_empty) fresh <= fresh + 1'b1;
        end
      end
      if (op_append) begin
        cnt_ok[f_list] <= 1'b1;
        f_left      <= f_left - 1'b1;
        if (f_left == 8'd1) begin
          f_busy <= 1'b0;
          if (!rf_on_append && !f_urgent) pending[f_list] <= 1'b0;
        end
      end
      // ---- download: issue
      if (issue_be) begin
        f_busy   <= 1'b1;
        f_list   <= BE_LIST;
        f_left   <= 8'd1;
        f_urgent <= 1'b0;
      end else if (issue_flow || issue_urgent) begin
        f_busy   <= 1'b1;
        f_list   <= LW'(sel_flow);
        f_left   <= sel_n;
        f_urgent <= issue_urgent;
        refills  <= refills + 1;
      end else if (drop_flow) begin
        pending[LW'(rf_head)] <= 1'b0;
      end
      // ---- setup
      if (op_setup) begin
        active[LW'(setup_flow)]  <= 1'b1;
        pending[LW'(setup_flow)] <= 1'b1;
      end
      // ---- transmit
      if (op_unlink) begin
        if (rf_on_unlink) pending[t_list] <= 1'b1;
      end
      unique case (t_state)
        T_IDLE: begin
          if (!tx_empty) begin
            t_tag     <= tx_data;
            t_list    <= tx_data.be ? BE_LIST : LW'(tx_data.flow);
            t_left    <= tx_data.be ? S_W'(1) : tx_data.chunks;
            t_stalled <= 1'b0;
            if (!tx_data.be && tx_data.chunks == '0)
              t_state <= tx_data.last ? T_REL : T_IDLE;
            else
              t_state <= T_HEAD;
          end
        end
        T_HEAD: begin
          if (op_unlink) begin
            t_chunk   <= head_mem[t_list];
            t_w       <= '0;
            t_state   <= T_WORD;
            t_stalled <= 1'b0;
          end else if (cnt_t == '0 && !t_stalled) begin
            stalls    <= stalls + 1;   // data not on the NIC yet
            t_stalled <= 1'b1;
          end
        end
        T_WORD: begin
          if (phy_push) begin
            t_w <= t_w + 1'b1;
            if (last_word) begin
              chunks_sent <= chunks_sent + 1;
              t_left      <= t_left - 1'b1;
              if (t_left == S_W'(1)) t_state <= t_tag.last ? T_REL : T_IDLE;
              else                   t_state <= T_HEAD;
            end
          end
        end
        T_REL: begin
          // a refill still queued for the flow is dropped when it comes up;
          // only a download already in flight must land first
          if (!(f_busy && f_list == t_list)) begin
            active[t_list] <= 1'b0;
            t_state        <= T_DRAIN;
          end
        end
        T_DRAIN: begin
          if (cnt_t == '0) begin
            releases <= releases + 1;
            t_state  <= T_IDLE;
          end
        end
        default: t_state <= T_IDLE;
      endcase
      // ---- idle link slots
      if (!link_idle || idle_slot) idle_cnt <= '0;
      else                         idle_cnt <= idle_cnt + 1'b1;
    end
  end

  a_append_has_chunk: assert property (@(posedge clk) disable iff (!rst_n)
      (dma_w_valid && rx_w == '0) |-> (free_chunks != '0))
    else $error("buffer_manager: DMA data with no free chunk");
  a_data_expected: assert property (@(posedge clk) disable iff (!rst_n)
      dma_w_valid |-> f_busy)
    else $error("buffer_manager: DMA data with no command in flight");
endmodule
