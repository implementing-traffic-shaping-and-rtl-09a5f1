// Self-checking test of traffic_shaper, surrounded by a real segment store
// and the two priority queues. The testbench plays the host (commands in,
// requests out, random back-pressure), the buffer manager (random setup and
// best-effort readiness), the link scheduler (drains the scheduler queue at
// random) and the chunk clock (advances 0 to 3 chunks a cycle).
//
// For every flow it computes from the segments alone the timetable of
// bursts: the first starts when the flow is set up, each later one starts
// at the previous finish time, and finish = start + T of the burst's
// segment. Every scheduler tag must be the flow's next burst (finish time,
// size, last flag), inserted no earlier than its start time, and the shaper
// must not report `settled` while an eligible tag waits and the scheduler
// queue has room. It also checks the requests: end of flow for finished
// flows, stopped for a stopped infinite flow, errors for bad commands, and
// that every segment line is returned.
module tb_traffic_shaper;
  import nic_pkg::*;
  localparam int NF = 8, LINES = 32;
  localparam int FW = $clog2(NF);
  logic clk = 0, rst_n = 0;
  logic [TIME_W-1:0] now;
  logic cmd_empty, cmd_pop, req_full, req_push;
  cmd_t cmd_data;
  req_t req_data;
  logic shp_head_valid, shp_pop, shp_ins, shp_full;
  logic [TIME_W-1:0] shp_head_key, shp_ins_key;
  shp_data_t shp_head_data, shp_ins_data;
  logic sch_full, sch_ins, sch_head_valid, sch_pop;
  logic [TIME_W-1:0] sch_ins_key, sch_head_key;
  sch_data_t sch_ins_data, sch_head_data;
  logic seg_app_en, seg_app_ok, seg_rd_en, seg_rd_has, seg_rd_has_next, seg_pop_en;
  logic [FW-1:0] seg_app_flow, seg_rd_flow, seg_pop_flow, setup_flow;
  seg_t seg_app_seg, seg_rd_seg;
  logic setup_valid, setup_ready, be_valid, be_ready, settled;
  logic [ADDR_W-1:0] setup_addr, be_addr;
  logic [LEN_W-1:0] setup_len;
  logic [31:0] moves, segment_switches;
  logic [$clog2(LINES+1)-1:0] free_lines;
  logic [$clog2(NF+1)-1:0] shp_count;
  logic [$clog2(4+1)-1:0] sch_count;
  int checks = 0, failures = 0;

  traffic_shaper #(.NUM_FLOWS(NF)) dut (.*);

  segment_store #(.NUM_FLOWS(NF), .SEG_LINES(LINES)) u_seg (
    .clk, .rst_n, .app_en(seg_app_en), .app_flow(seg_app_flow),
    .app_seg(seg_app_seg), .app_ok(seg_app_ok), .rd_en(seg_rd_en),
    .rd_flow(seg_rd_flow), .rd_seg(seg_rd_seg), .rd_has(seg_rd_has),
    .rd_has_next(seg_rd_has_next), .pop_en(seg_pop_en),
    .pop_flow(seg_pop_flow), .free_lines);
  priority_queue #(.DEPTH(NF), .DATA_W($bits(shp_data_t))) u_shp (
    .clk, .rst_n, .ins(shp_ins), .ins_key(shp_ins_key), .ins_data(shp_ins_data),
    .pop(shp_pop), .head_valid(shp_head_valid), .head_key(shp_head_key),
    .head_data(shp_head_data), .full(shp_full), .count(shp_count));
  priority_queue #(.DEPTH(4), .DATA_W($bits(sch_data_t))) u_sch (
    .clk, .rst_n, .ins(sch_ins), .ins_key(sch_ins_key), .ins_data(sch_ins_data),
    .pop(sch_pop), .head_valid(sch_head_valid), .head_key(sch_head_key),
    .head_data(sch_head_data), .full(sch_full), .count(sch_count));

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ------------------------------------------------------- host side
  cmd_t cmdq[$];
  assign cmd_empty = cmdq.size() == 0;
  assign cmd_data  = cmdq.size() != 0 ? cmdq[0] : '0;
  // the FIFO model changes half a cycle after the edge that pops it
  logic popped = 0;
  always @(posedge clk) popped <= cmd_pop;
  always @(negedge clk) if (popped) void'(cmdq.pop_front());

  req_t reqs[$];
  always @(posedge clk) if (req_push && !req_full) reqs.push_back(req_data);

  // ------------------------------------------------- expected timetable
  typedef struct { logic [TIME_W-1:0] start, finish; int s; bit last; } burst_t;
  seg_t   segs[NF][$];
  burst_t exp_b[NF][$];
  bit     infinite_flow[NF];
  int     seen[NF];

  function automatic void build(int f, logic [TIME_W-1:0] t0);
    logic [TIME_W-1:0] cur;
    cur = t0;
    exp_b[f].delete();
    foreach (segs[f][i]) begin
      for (int j = 0; j < (segs[f][i].infinite ? 5000 : int'(segs[f][i].d)); j++) begin
        burst_t b;
        b.start = cur; b.finish = cur + segs[f][i].t; b.s = segs[f][i].s;
        b.last = 0;
        cur = b.finish;
        exp_b[f].push_back(b);
      end
      if (segs[f][i].infinite) break;
    end
    if (!infinite_flow[f]) exp_b[f][exp_b[f].size()-1].last = 1;
  endfunction

  always @(posedge clk) if (rst_n && setup_valid && setup_ready) build(int'(setup_flow), now);

  bit stop_sent = 0;
  int released = 0;
  always @(posedge clk) begin
    if (rst_n && sch_ins) begin
      int f;
      burst_t b;
      f = int'(sch_ins_data.flow);
      if (sch_ins_data.chunks == 0) begin
        check(stop_sent && infinite_flow[f] && sch_ins_data.last, "release tag only for stopped flow");
        check(exp_b[f].size() != 0 && sch_ins_key == exp_b[f][0].finish, "release tag finish time");
        released++;
      end else if (exp_b[f].size() == 0) begin
        check(0, $sformatf("unexpected tag for flow %0d", f));
      end else begin
        b = exp_b[f].pop_front();
        check(sch_ins_key == b.finish && int'(sch_ins_data.chunks) == b.s &&
              sch_ins_data.last == b.last,
              $sformatf("flow %0d burst %0d: got fin=%0d s=%0d last=%0d exp fin=%0d s=%0d last=%0d",
                        f, seen[f], sch_ins_key, sch_ins_data.chunks, sch_ins_data.last,
                        b.finish, b.s, b.last));
        check(!time_before(now, b.start), "tag moved before its start time");
        seen[f]++;
      end
    end
    // nothing eligible may wait while the shaper claims to be settled
    if (rst_n && settled)
      check(!(shp_head_valid && !time_before(now, shp_head_key) && !sch_full),
            "settled with an eligible tag");
  end

  // ------------------------------------------------ environment activity
  always @(posedge clk) begin
    if (!rst_n) now <= '0;
    else now <= now + TIME_W'($urandom_range(0, 3));
    req_full    <= $urandom_range(0, 99) < 20;
    setup_ready <= $urandom_range(0, 99) < 60;
    be_ready    <= $urandom_range(0, 99) < 60;
  end
  logic pop_ok = 0;
  always @(posedge clk) pop_ok <= $urandom_range(0, 99) < 40;
  assign sch_pop = sch_head_valid && pop_ok;

  int be_count = 0;
  always @(posedge clk) if (rst_n && be_valid && be_ready) begin
    check(be_addr == 32'hBEEF_0000 + 32'(be_count) * 128, "best-effort address");
    be_count++;
  end

  function automatic cmd_t mk(cmd_op_e op, int f, seg_t s = '0, logic [31:0] a = 0);
    cmd_t c;
    c = '0;
    c.op = op; c.flow = FLOW_W'(f); c.seg = s; c.addr = a; c.len = 16'd64;
    return c;
  endfunction

  initial begin
    int eof = 0, stopped = 0, errs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // bad commands first: start without segments, stop an idle flow
    cmdq.push_back(mk(CMD_START, 7));
    cmdq.push_back(mk(CMD_STOP, 6));
    // six finite flows with chains of 1 to 3 segments, one infinite flow
    for (int f = 0; f < 7; f++) begin
      int nseg;
      nseg = (f == 6) ? 1 : $urandom_range(1, 3);
      infinite_flow[f] = (f == 6);
      for (int i = 0; i < nseg; i++) begin
        seg_t s;
        s.more = (i != nseg - 1);
        s.infinite = infinite_flow[f];
        s.t = T_W'($urandom_range(1, 20));
        s.d = D_W'($urandom_range(1, 5));
        s.s = S_W'($urandom_range(1, 8));
        segs[f].push_back(s);
        cmdq.push_back(mk(CMD_SEG, f, s));
      end
    end
    for (int f = 0; f < 7; f++) cmdq.push_back(mk(CMD_START, f, '0, 32'h1000 * f));
    for (int i = 0; i < 3; i++) cmdq.push_back(mk(CMD_BE, 0, '0, 32'hBEEF_0000 + 32'(i) * 128));
    // let the infinite flow run a while, then stop it
    repeat (300) @(posedge clk);
    check(seen[6] > 3, "infinite flow keeps going");
    cmdq.push_back(mk(CMD_STOP, 6));
    stop_sent = 1;
    repeat (1500) @(posedge clk);
    foreach (reqs[i]) begin
      if (reqs[i].code == REQ_EOF) eof++;
      if (reqs[i].code == REQ_STOPPED) begin stopped++; check(reqs[i].flow == 6, "stopped flow id"); end
      if (reqs[i].code == REQ_ERROR) errs++;
    end
    check(eof == 6, $sformatf("end-of-flow requests: %0d", eof));
    check(stopped == 1, "stopped request");
    check(errs == 2, $sformatf("error requests: %0d", errs));
    check(released == 1, "release tag for the stopped flow");
    for (int f = 0; f < 6; f++) check(exp_b[f].size() == 0, $sformatf("flow %0d bursts all sent", f));
    check(free_lines == LINES, "all segment lines returned");
    check(be_count == 3, "best-effort commands forwarded");
    check(segment_switches > 0, "segment chains were followed");
    check(shp_count == 0, "shaper queue empty at the end");
    $display("moves=%0d switches=%0d", moves, segment_switches);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
