// Workload test: long bursts against short-period flows, with and without
// period division.
//
// Four "video" flows and twenty small flows share the link at about 60 %
// load (in chunk units, the design's time base):
//   run A: video flows send 200 chunks every 2000 chunk times (5 bursts);
//   run B: the same video data with the period divided by 25, 8 chunks
//          every 80 chunk times (125 bursts);
//   small flows, both runs: 1 chunk every 100 chunk times, 100 bursts.
// The NIC is reset between the runs. For every burst of a small flow the
// testbench records the spacing of consecutive scheduling decisions on the
// chunk clock and sums |spacing - T| / T, the average deviation of the
// flow's period. It also reads the late-burst counter.
//
// Checks: every flow sends all its chunks and is reported finished in both
// runs; run A has late bursts (a small burst waits behind a 200-chunk
// burst); run B has fewer late bursts and a smaller average deviation than
// run A. The reduced flow count (32) only shortens the build; the queue
// depths and memories are the defaults.
module tb_period_division;
  import nic_pkg::*;
  localparam int NF = 32, NVID = 4, NSMALL = 20;
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

  nic_top #(.NUM_FLOWS(NF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #40000000;
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

  // host memory: 3-cycle latency, always ready
  logic [ADDR_W-1:0] pipe_a [3];
  logic              pipe_v [3];
  always_ff @(posedge clk) begin
    pipe_v[0] <= rst_n && hr_valid && hr_ready;
    pipe_a[0] <= hr_addr;
    for (int i = 1; i < 3; i++) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_a[i] <= pipe_a[i-1];
    end
  end
  assign hr_ready  = 1'b1;
  assign hr_rvalid = pipe_v[2];
  assign hr_rdata  = {32'h0, pipe_a[2]};
  assign link_ready = 1'b1;

  cmd_t cmdq[$];
  int   eof = 0;
  always @(negedge clk) begin
    cmd_push = 0;
    req_pop  = 0;
    if (rst_n && cmdq.size() != 0 && !cmd_full) begin
      cmd_data = cmdq.pop_front();
      cmd_push = 1;
    end
    if (rst_n && !req_empty) begin
      if (req_data.code == REQ_EOF) eof++;
      req_pop = 1;
    end
  end

  // chunks per flow on the link
  int got[NF];
  always @(posedge clk)
    if (rst_n && link_valid && link_ready && link_word.eoc && !link_word.be)
      got[link_word.flow]++;

  // spacing of the small flows' scheduling decisions
  logic [TIME_W-1:0] last_t[NF];
  bit                seen[NF];
  real               dev_sum;
  int                dev_n;
  always @(posedge clk) begin
    if (rst_n && dut.tx_push && !dut.tx_in.be && dut.tx_in.chunks != 0 &&
        int'(dut.tx_in.flow) >= NVID) begin
      int f;
      f = int'(dut.tx_in.flow);
      if (seen[f]) begin
        real gap;
        gap = real'(now - last_t[f]);
        dev_sum += (gap > 100.0 ? gap - 100.0 : 100.0 - gap) / 100.0;
        dev_n++;
      end
      seen[f]   = 1;
      last_t[f] = now;
    end
  end

  function automatic cmd_t mk(cmd_op_e op, int f, seg_t s = '0, logic [31:0] a = 0, int l = 0);
    cmd_t c;
    c = '0;
    c.op = op; c.flow = FLOW_W'(f); c.seg = s; c.addr = a; c.len = LEN_W'(l);
    return c;
  endfunction

  function automatic seg_t sg(int t, int d, int s);
    seg_t x;
    x = '0;
    x.t = T_W'(t); x.d = D_W'(d); x.s = S_W'(s);
    return x;
  endfunction

  task automatic run(bit divided, output real dev, output int late);
    rst_n = 0;
    eof = 0; dev_sum = 0.0; dev_n = 0;
    for (int f = 0; f < NF; f++) begin got[f] = 0; seen[f] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NVID + NSMALL; f++) begin
      if (f < NVID) cmdq.push_back(mk(CMD_SEG, f, divided ? sg(80, 125, 8) : sg(2000, 5, 200)));
      else          cmdq.push_back(mk(CMD_SEG, f, sg(100, 100, 1)));
    end
    for (int f = 0; f < NVID + NSMALL; f++)
      cmdq.push_back(mk(CMD_START, f, '0, 32'h0100_0000 * (f + 1), 64));
    // end of flow is reported when the last burst is scheduled; wait until
    // every flow has also been sent and released
    while (eof < NVID + NSMALL || stat_releases != NVID + NSMALL || !dut.tx_empty || link_valid)
      @(posedge clk);
    repeat (200) @(posedge clk);
    for (int f = 0; f < NVID + NSMALL; f++)
      check(got[f] == (f < NVID ? 1000 : 100),
            $sformatf("run %s flow %0d sent %0d chunks", divided ? "B" : "A", f, got[f]));
    check(dut.free_chunks == 1024, "packet memory free after the run");
    dev  = dev_n != 0 ? dev_sum / real'(dev_n) : 0.0;
    late = int'(stat_late_tags);
    $display("run %s: average deviation of small flows %0.2f %%, late bursts %0d, chunk clock %0d",
             divided ? "B (divided)" : "A (long bursts)", dev * 100.0, late, now);
  endtask

  initial begin
    real dev_a, dev_b;
    int  late_a, late_b;
    cmd_push = 0; req_pop = 0; cmd_data = '0;
    for (int i = 0; i < 3; i++) pipe_v[i] = 0;
    run(1'b0, dev_a, late_a);
    run(1'b1, dev_b, late_b);
    check(late_a > 0, "long bursts make small flows late");
    check(late_b < late_a, "period division reduces late bursts");
    check(dev_b < dev_a, "period division reduces the average deviation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
