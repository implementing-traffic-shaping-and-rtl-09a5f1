// Self-checking test of control_block (segment store, shaper, scheduler and
// both priority queues together). The testbench plays the host, the buffer
// manager and a transmit FIFO that is randomly full.
//
// From the downloaded segments alone it computes every flow's burst
// timetable (first start = chunk clock at setup, next start = previous
// finish, finish = start + T). For every data tag written it checks:
//   * the tag is the flow's next burst (size and last flag);
//   * no other flow had an eligible burst (start <= now) with an earlier
//     finish time still waiting, i.e. the scheduler picked the earliest
//     deadline among everything the shaper could have released;
//   * a best-effort tag goes out only when no burst is eligible;
//   * the chunk clock equals the chunks scheduled plus idle slots.
// At the end every finite flow must be complete and reported, the stopped
// flow reported and released, and the deadline-miss counter must match the
// testbench's own count. Every mechanism (segment switch, scheduler queue
// full, best-effort release, idle slot, late burst, stop) must have
// occurred.
module tb_control_block;
  import nic_pkg::*;
  localparam int NF = 16, LINES = 64, SPQ = 4;
  localparam int FW = $clog2(NF);
  logic clk = 0, rst_n = 0;
  logic cmd_empty, cmd_pop, req_full, req_push, tx_full, tx_push;
  cmd_t cmd_data;
  req_t req_data;
  data_tag_t tx_data;
  logic setup_valid, setup_ready, be_valid, be_ready, be_arrived, idle_slot;
  logic [FW-1:0] setup_flow;
  logic [ADDR_W-1:0] setup_addr, be_addr;
  logic [LEN_W-1:0] setup_len;
  logic [TIME_W-1:0] now;
  logic [31:0] moves, segment_switches, sched_tags, be_released, idle_slots, late_tags;
  logic sched_pq_full;
  logic [$clog2(SPQ+1)-1:0] sched_pq_count;
  logic [$clog2(NF+1)-1:0] shaper_pq_count;
  int checks = 0, failures = 0;

  control_block #(.NUM_FLOWS(NF), .SEG_LINES(LINES), .SCHED_PQ_DEPTH(SPQ)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20000000;
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

  // ------------------------------------------------------- host side
  cmd_t cmdq[$];
  logic popped = 0;
  assign cmd_empty = cmdq.size() == 0;
  assign cmd_data  = cmdq.size() != 0 ? cmdq[0] : '0;
  always @(posedge clk) popped <= cmd_pop;
  always @(negedge clk) if (popped) void'(cmdq.pop_front());

  req_t reqs[$];
  always @(posedge clk) if (req_push && !req_full) reqs.push_back(req_data);

  // ------------------------------------------------- buffer manager side
  int be_in_flight[$];   // cycles until a best-effort chunk "arrives"
  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    req_full    <= $urandom_range(0, 99) < 10;
    setup_ready <= $urandom_range(0, 99) < 70;
    be_ready    <= $urandom_range(0, 99) < 70;
    tx_full     <= $urandom_range(0, 99) < 25;
    idle_slot   <= $urandom_range(0, 99) < 20;
  end
  always @(posedge clk) begin
    be_arrived <= 1'b0;
    if (be_in_flight.size() != 0 && be_in_flight[0] <= cyc) begin
      be_arrived <= 1'b1;
      void'(be_in_flight.pop_front());
    end
    if (rst_n && be_valid && be_ready) be_in_flight.push_back(cyc + 20);
  end

  // ------------------------------------------------- expected timetable
  typedef struct { logic [TIME_W-1:0] start, finish; int s; bit last; } burst_t;
  seg_t   segs[NF][$];
  burst_t exp_b[NF][$];
  bit     infinite_flow[NF];

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
        if (exp_b[f].size() > 3000) break;
      end
      if (segs[f][i].infinite) break;
    end
    if (!infinite_flow[f]) exp_b[f][exp_b[f].size()-1].last = 1;
  endfunction

  always @(posedge clk) if (rst_n && setup_valid && setup_ready) build(int'(setup_flow), now);

  int n_tags = 0, n_be = 0, n_late = 0, n_release = 0, full_seen = 0;
  longint sched_chunks = 0;
  bit stopped_flow_done = 0;
  always @(posedge clk) begin
    if (rst_n && sched_pq_full) full_seen++;
    if (rst_n) check(now == TIME_W'(sched_chunks + n_be + idle_slots), "chunk clock");
    if (rst_n && tx_push) begin
      if (tx_data.be) begin
        for (int g = 0; g < NF; g++)
          if (exp_b[g].size() != 0)
            check(time_before(now, exp_b[g][0].start),
                  $sformatf("best-effort sent while flow %0d was eligible", g));
        check(tx_data.chunks == 1, "best-effort size");
        n_be++;
      end else begin
        int f;
        burst_t b;
        f = int'(tx_data.flow);
        if (tx_data.chunks == 0) begin
          check(infinite_flow[f] && tx_data.last, "release tag");
          exp_b[f].delete();
          n_release++;
        end else if (exp_b[f].size() == 0) begin
          check(0, $sformatf("unexpected burst of flow %0d", f));
        end else begin
          b = exp_b[f][0];
          check(int'(tx_data.chunks) == b.s && tx_data.last == b.last,
                $sformatf("flow %0d burst size/last", f));
          check(!time_before(now, b.start), "burst before its start time");
          if (!sched_pq_full)
            for (int g = 0; g < NF; g++)
              if (g != f && exp_b[g].size() != 0 && !time_before(now, exp_b[g][0].start))
                check(!time_before(exp_b[g][0].finish, b.finish),
                      $sformatf("flow %0d (finish %0d) sent before flow %0d (finish %0d)",
                                f, b.finish, g, exp_b[g][0].finish));
          if (time_before(b.finish, now)) n_late++;
          sched_chunks += b.s;
          void'(exp_b[f].pop_front());
          n_tags++;
        end
      end
    end
  end

  function automatic cmd_t mk(cmd_op_e op, int f, seg_t s = '0, logic [31:0] a = 0);
    cmd_t c;
    c = '0;
    c.op = op; c.flow = FLOW_W'(f); c.seg = s; c.addr = a; c.len = 16'd64;
    return c;
  endfunction

  initial begin
    int eof = 0, stopped = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // 12 finite flows (chains of 1..3 segments) and one infinite flow
    for (int f = 0; f < 13; f++) begin
      int nseg;
      nseg = (f == 12) ? 1 : $urandom_range(1, 3);
      infinite_flow[f] = (f == 12);
      for (int i = 0; i < nseg; i++) begin
        seg_t s;
        s.more = (i != nseg - 1);
        s.infinite = infinite_flow[f];
        s.t = T_W'($urandom_range(4, 30));
        s.d = D_W'($urandom_range(2, 8));
        s.s = S_W'($urandom_range(1, 6));
        segs[f].push_back(s);
        cmdq.push_back(mk(CMD_SEG, f, s));
      end
    end
    for (int f = 0; f < 13; f++) cmdq.push_back(mk(CMD_START, f, '0, 32'h1000 * f));
    for (int i = 0; i < 30; i++) cmdq.push_back(mk(CMD_BE, 0, '0, 32'h8000_0000 + 32'(i) * 128));
    repeat (1500) @(posedge clk);
    cmdq.push_back(mk(CMD_STOP, 12));
    repeat (3000) @(posedge clk);
    foreach (reqs[i]) begin
      if (reqs[i].code == REQ_EOF) eof++;
      if (reqs[i].code == REQ_STOPPED) stopped++;
    end
    check(eof == 12, $sformatf("end-of-flow requests: %0d", eof));
    check(stopped == 1, "stopped request");
    check(n_release == 1, "stopped flow released");
    for (int f = 0; f < 12; f++) check(exp_b[f].size() == 0, $sformatf("flow %0d complete", f));
    check(sched_tags == n_tags + n_release, "scheduled tag counter");
    check(be_released == n_be && n_be == 30, $sformatf("best-effort released: %0d", n_be));
    check(late_tags == n_late, $sformatf("late counter %0d vs %0d", late_tags, n_late));
    // every mechanism happened at least once
    check(segment_switches > 0, "segment switch");
    check(full_seen > 0, "scheduler queue full");
    check(idle_slots > 0, "idle link slot");
    check(n_late > 0, "late burst");
    $display("tags=%0d be=%0d idle=%0d late=%0d pq_full_cycles=%0d switches=%0d",
             n_tags, n_be, idle_slots, n_late, full_seen, segment_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
