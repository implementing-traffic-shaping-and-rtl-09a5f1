// Self-checking test of link_scheduler. The testbench plays the scheduler
// priority queue (a list it keeps sorted itself), the shaper's `settled`
// signal, a randomly full transmit FIFO, best-effort arrivals and idle link
// slots. For every cycle it predicts what the scheduler must do (send the
// head tag, release a best-effort chunk, count an idle slot, or wait) and
// checks the data tag, the pop, and the advance of the chunk clock.
module tb_link_scheduler;
  import nic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic settled, sch_head_valid, sch_pop, tx_full, tx_push, be_arrived, idle_slot;
  logic [TIME_W-1:0] sch_head_key, now;
  sch_data_t sch_head_data;
  data_tag_t tx_data;
  logic [31:0] sched_tags, be_released, idle_slots, late_tags;
  int checks = 0, failures = 0;

  link_scheduler dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
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

  typedef struct { logic [TIME_W-1:0] key; sch_data_t d; } tag_t;
  tag_t pq[$];
  logic [TIME_W-1:0] exp_now = 0;
  int be_avail = 0, n_tag = 0, n_be = 0, n_idle = 0, n_late = 0;

  assign sch_head_valid = pq.size() != 0;
  assign sch_head_key   = pq.size() != 0 ? pq[0].key : '0;
  assign sch_head_data  = pq.size() != 0 ? pq[0].d : '0;

  initial begin
    settled = 0; tx_full = 0; be_arrived = 0; idle_slot = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      bit exp_tag, exp_be, exp_idle;
      @(negedge clk);
      // random new tags, kept sorted by key
      if ($urandom_range(0, 99) < (cyc < 3000 ? 40 : 10)) begin
        tag_t t;
        int pos;
        t.key = exp_now + TIME_W'($urandom_range(0, 30)) - 5;
        t.d   = '{last: 1'($urandom), chunks: S_W'($urandom_range(1, 6)),
                  flow: FLOW_W'($urandom)};
        pos = pq.size();
        for (int i = 0; i < pq.size(); i++)
          if ($signed(t.key - pq[i].key) < 0) begin pos = i; break; end
        pq.insert(pos, t);
      end
      settled    = $urandom_range(0, 99) < 80;
      tx_full    = $urandom_range(0, 99) < 20;
      be_arrived = $urandom_range(0, 99) < 5;
      idle_slot  = $urandom_range(0, 99) < 30;
      #1;
      exp_tag  = settled && !tx_full && pq.size() != 0;
      exp_be   = settled && !tx_full && pq.size() == 0 && be_avail != 0;
      exp_idle = settled && pq.size() == 0 && be_avail == 0 && idle_slot;
      check(sch_pop == exp_tag, "pop decision");
      check(tx_push == (exp_tag || exp_be), "push decision");
      check(now == exp_now, "clock value");
      if (exp_tag) begin
        check(tx_data == '{be: 1'b0, last: pq[0].d.last, chunks: pq[0].d.chunks,
                           flow: pq[0].d.flow}, "data tag");
        if ($signed(pq[0].key - exp_now) < 0) n_late++;
      end
      if (exp_be) check(tx_data.be && tx_data.chunks == 1, "best-effort tag");
      @(posedge clk);
      #1;
      if (exp_tag) begin
        exp_now += pq[0].d.chunks;
        void'(pq.pop_front());
        n_tag++;
      end else if (exp_be || exp_idle) exp_now += 1;
      if (exp_be) begin be_avail--; n_be++; end
      if (exp_idle) n_idle++;
      if (be_arrived) be_avail++;
    end
    check(sched_tags == n_tag && be_released == n_be && idle_slots == n_idle
          && late_tags == n_late, "event counters");
    check(n_tag > 0 && n_be > 0 && n_idle > 0 && n_late > 0, "every case seen");
    $display("tags=%0d be=%0d idle=%0d late=%0d", n_tag, n_be, n_idle, n_late);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
