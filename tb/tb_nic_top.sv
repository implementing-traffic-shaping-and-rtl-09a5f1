// End-to-end test of nic_top at reduced sizes (16 flows, 64 packet-memory
// chunks, a 4-entry scheduler queue) so that every mechanism is reached
// quickly.
//
// The testbench is the server: it downloads schedule segments and starts
// 12 finite flows and one infinite flow through the command FIFO, posts
// best-effort chunks, serves the DMA reads from a host memory model with
// latency and stalls, reads the request FIFO, and receives the link with
// random back-pressure.
//
// Checks:
//   * every word on the link equals the host memory word it was copied
//     from: each flow's chunks come out in the order of its host ring, the
//     best-effort chunks in posting order;
//   * each finite flow sends exactly the sum of D*S chunks over its
//     segments and is reported with an end-of-flow request; the stopped
//     flow is reported as stopped;
//   * every scheduling decision (watched on the transmit FIFO) is the
//     flow's next burst, not earlier than its start time, and has the
//     earliest finish time among all eligible bursts; best-effort chunks go
//     out only when no burst is eligible;
//   * at the end every packet-memory chunk and segment line is free.
// Each mechanism must have happened at least once: segment switch,
// scheduler queue full, best-effort release, idle link slot, late burst,
// stop, buffer stall (tag before data), refill, flow release, host ring
// wrap-around, transmit FIFO full and link back-pressure.
module tb_nic_top;
  import nic_pkg::*;
  localparam int NF = 16, CHUNKS = 64;
  logic clk = 0, rst_n = 0;
  logic cmd_push, cmd_full, req_pop, req_empty;
  cmd_t cmd_data;
  req_t req_data;
  logic hr_valid, hr_ready, hr_rvalid, link_valid, link_ready;
  logic [ADDR_W-1:0] hr_addr;
  logic [WORD_W-1:0] hr_rdata;
  link_word_t link_word;
  logic [TIME_W-1:0] now;
  logic [31:0] stat_moves, stat_segment_switches, stat_sched_tags, stat_be_released,
               stat_idle_slots, stat_late_tags, stat_chunks_sent, stat_refills,
               stat_stalls, stat_releases;
  logic stat_sched_pq_full;
  int checks = 0, failures = 0;

  nic_top #(.NUM_FLOWS(NF), .SEG_LINES(64), .SCHED_PQ_DEPTH(4),
            .PKT_CHUNKS(CHUNKS), .BATCH(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------- host memory
  function automatic logic [WORD_W-1:0] mem_word(logic [ADDR_W-1:0] a);
    return {a ^ 32'h1357_9BDF, a * 32'd2246822519};
  endfunction
  logic [ADDR_W-1:0] pipe_a [4];
  logic              pipe_v [4];
  always_ff @(posedge clk) begin
    pipe_v[0] <= rst_n && hr_valid && hr_ready;
    pipe_a[0] <= hr_addr;
    for (int i = 1; i < 4; i++) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_a[i] <= pipe_a[i-1];
    end
    hr_ready <= $urandom_range(0, 99) < 85;
  end
  assign hr_rvalid = pipe_v[3];
  assign hr_rdata  = mem_word(pipe_a[3]);

  // ------------------------------------------------ control interface
  cmd_t cmdq[$];
  req_t reqs[$];
  always @(negedge clk) begin
    cmd_push = 0;
    if (rst_n && cmdq.size() != 0 && !cmd_full) begin
      cmd_data = cmdq.pop_front();
      cmd_push = 1;
    end
    req_pop = 0;
    if (rst_n && !req_empty && $urandom_range(0, 3) == 0) begin
      reqs.push_back(req_data);
      req_pop = 1;
    end
  end

  // --------------------------------------------------------------- link
  int backpressure = 0;
  always @(posedge clk) begin
    link_ready <= ($urandom_range(0, 99) < 85);
    if (link_valid && !link_ready) backpressure++;
  end

  // ------------------------------------------------------ expectations
  typedef struct { logic [TIME_W-1:0] start, finish; int s; bit last; } burst_t;
  seg_t   segs[NF][$];
  burst_t exp_b[NF][$];
  bit     infinite_flow[NF];
  logic [ADDR_W-1:0] base[NF];
  int     len[NF], next_k[NF], got[NF], want[NF];
  logic [ADDR_W-1:0] be_addrs[$];
  int     wraps = 0, be_out = 0;

  function automatic void build(int f, logic [TIME_W-1:0] t0);
    logic [TIME_W-1:0] cur;
    cur = t0;
    foreach (segs[f][i]) begin
      for (int j = 0; j < (segs[f][i].infinite ? 100000 : int'(segs[f][i].d)); j++) begin
        burst_t b;
        b.start = cur; b.finish = cur + segs[f][i].t; b.s = segs[f][i].s;
        b.last = 0;
        cur = b.finish;
        exp_b[f].push_back(b);
        if (exp_b[f].size() > 5000) break;
      end
      if (segs[f][i].infinite) break;
    end
    if (!infinite_flow[f]) exp_b[f][exp_b[f].size()-1].last = 1;
  endfunction

  // flow setup as seen inside: the timetable starts at that chunk time
  always @(posedge clk)
    if (rst_n && dut.setup_valid && dut.setup_ready) build(int'(dut.setup_flow), now);

  // scheduling decisions on the transmit FIFO
  int n_tags = 0, n_be = 0, pq_full_seen = 0, tx_full_seen = 0;
  always @(posedge clk) begin
    if (rst_n && stat_sched_pq_full) pq_full_seen++;
    if (rst_n && dut.tx_full) tx_full_seen++;
    if (rst_n && dut.tx_push) begin
      data_tag_t t;
      t = dut.tx_in;
      if (t.be) begin
        for (int g = 0; g < NF; g++)
          if (exp_b[g].size() != 0)
            check(time_before(now, exp_b[g][0].start), "best-effort while a burst was eligible");
        n_be++;
      end else if (t.chunks == 0) begin
        check(infinite_flow[t.flow] && t.last, "release tag only for the stopped flow");
        exp_b[t.flow].delete();
      end else if (exp_b[t.flow].size() == 0) begin
        check(0, "burst of a flow with nothing left");
      end else begin
        burst_t b;
        b = exp_b[t.flow][0];
        check(int'(t.chunks) == b.s && t.last == b.last, "burst size and last flag");
        check(!time_before(now, b.start), "burst before its start time");
        if (!stat_sched_pq_full)
          for (int g = 0; g < NF; g++)
            if (g != int'(t.flow) && exp_b[g].size() != 0 && !time_before(now, exp_b[g][0].start))
              check(!time_before(exp_b[g][0].finish, b.finish), "earliest finish time first");
        void'(exp_b[t.flow].pop_front());
        n_tags++;
      end
    end
  end

  // every word on the link
  int w_idx = 0;
  logic [ADDR_W-1:0] cur_addr;
  always @(posedge clk) begin
    if (rst_n && link_valid && link_ready) begin
      if (w_idx == 0) begin
        if (link_word.be) begin
          check(be_addrs.size() != 0, "unexpected best-effort chunk");
          cur_addr = be_addrs.size() != 0 ? be_addrs.pop_front() : '0;
          be_out++;
        end else begin
          int f;
          f = int'(link_word.flow);
          cur_addr = base[f] + ADDR_W'((next_k[f] % len[f]) * CHUNK_BYTES);
          if (next_k[f] == len[f]) wraps++;
          next_k[f]++;
          got[f]++;
        end
      end
      check(link_word.data == mem_word(cur_addr + ADDR_W'(w_idx * (WORD_W / 8))),
            $sformatf("link word %0d of flow %0d", w_idx, link_word.flow));
      check(link_word.eoc == (w_idx == CHUNK_WORDS - 1), "end-of-chunk marker");
      w_idx = (w_idx + 1) % CHUNK_WORDS;
    end
  end

  function automatic cmd_t mk(cmd_op_e op, int f, seg_t s = '0, logic [31:0] a = 0, int l = 0);
    cmd_t c;
    c = '0;
    c.op = op; c.flow = FLOW_W'(f); c.seg = s; c.addr = a; c.len = LEN_W'(l);
    return c;
  endfunction

  initial begin
    int eof = 0, stopped = 0, cyc = 0;
    for (int i = 0; i < 4; i++) pipe_v[i] = 0;
    cmd_push = 0; req_pop = 0; cmd_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (100) @(posedge clk);           // idle link first
    for (int f = 0; f < 13; f++) begin
      int nseg;
      nseg = (f == 12) ? 1 : $urandom_range(1, 3);
      infinite_flow[f] = (f == 12);
      want[f] = 0;
      for (int i = 0; i < nseg; i++) begin
        seg_t s;
        s.more = (i != nseg - 1);
        s.infinite = infinite_flow[f];
        s.t = T_W'($urandom_range(6, 24));
        s.d = D_W'($urandom_range(2, 8));
        s.s = S_W'($urandom_range(2, 6));
        segs[f].push_back(s);
        want[f] += int'(s.d) * int'(s.s);
        cmdq.push_back(mk(CMD_SEG, f, s));
      end
      base[f] = 32'h0100_0000 * (f + 1);
      len[f]  = $urandom_range(4, 12);
    end
    for (int f = 0; f < 13; f++) cmdq.push_back(mk(CMD_START, f, '0, base[f], len[f]));
    for (int i = 0; i < 20; i++) begin
      logic [ADDR_W-1:0] a;
      a = 32'h7000_0000 + 32'(i) * 32'h1000;
      be_addrs.push_back(a);
      cmdq.push_back(mk(CMD_BE, 0, '0, a));
    end
    repeat (6000) @(posedge clk);
    cmdq.push_back(mk(CMD_STOP, 12));
    // wait for every flow to be reported
    while (cyc < 400000) begin
      @(posedge clk);
      cyc++;
      eof = 0; stopped = 0;
      foreach (reqs[i]) begin
        if (reqs[i].code == REQ_EOF) eof++;
        if (reqs[i].code == REQ_STOPPED) stopped++;
      end
      if (eof == 12 && stopped == 1 && stat_releases == 13 && !link_valid &&
          dut.tx_empty && be_addrs.size() == 0) break;
    end
    repeat (200) @(posedge clk);
    check(eof == 12, $sformatf("end-of-flow requests %0d", eof));
    check(stopped == 1, "stopped request");
    for (int f = 0; f < 12; f++)
      check(got[f] == want[f], $sformatf("flow %0d sent %0d of %0d chunks", f, got[f], want[f]));
    check(be_out == 20, $sformatf("best-effort chunks out %0d", be_out));
    check(dut.free_chunks == CHUNKS, "packet memory all free");
    check(dut.u_control.free_lines == 64, "segment lines all free");
    check(stat_chunks_sent == be_out + got.sum(), "chunk counter");
    // mechanisms
    check(stat_segment_switches > 0, "segment switch happened");
    check(pq_full_seen > 0, "scheduler queue filled");
    check(stat_be_released > 0, "best-effort release happened");
    check(stat_idle_slots > 0, "idle link slot happened");
    check(stat_late_tags > 0, "late burst happened");
    check(stat_stalls > 0, "buffer stall happened");
    check(stat_refills > 13, "refills happened");
    check(stat_releases == 13, "every flow released");
    check(wraps > 0, "host ring wrapped");
    check(tx_full_seen > 0, "transmit FIFO filled");
    check(backpressure > 0, "link back-pressure happened");
    $display("tags=%0d be=%0d switches=%0d pqfull=%0d idle=%0d late=%0d stalls=%0d refills=%0d releases=%0d wraps=%0d txfull=%0d bp=%0d now=%0d",
             n_tags, stat_be_released, stat_segment_switches, pq_full_seen, stat_idle_slots,
             stat_late_tags, stat_stalls, stat_refills, stat_releases, wraps, tx_full_seen,
             backpressure, now);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
