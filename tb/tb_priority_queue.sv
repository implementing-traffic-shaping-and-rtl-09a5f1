// Self-checking test of priority_queue: random inserts, pops and
// simultaneous insert+pop, with keys that cross the wrap-around of the
// 32-bit clock and many equal keys. The model keeps an unsorted list and
// searches it for the smallest key (first inserted among equal keys).
// Also checks that one operation completes per cycle.
module tb_priority_queue;
  localparam int DEPTH = 16;
  localparam int KW = 32, DW = 12;
  logic clk = 0, rst_n = 0;
  logic ins, pop, head_valid, full;
  logic [KW-1:0] ins_key, head_key;
  logic [DW-1:0] ins_data, head_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;

  priority_queue #(.DEPTH(DEPTH), .KEY_W(KW), .DATA_W(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
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

  typedef struct { logic [KW-1:0] key; logic [DW-1:0] data; int seq; } ent_t;
  ent_t model[$];
  logic [KW-1:0] base;
  int seq = 0;

  // index of the model entry that must be at the head
  function automatic int min_idx();
    int best = 0;
    // distance from a point well behind every live key, taken modulo 2^KW
    logic [KW-1:0] a, b;
    for (int i = 1; i < model.size(); i++) begin
      a = model[i].key - (base - KW'(4096));
      b = model[best].key - (base - KW'(4096));
      if (a < b || (a == b && model[i].seq < model[best].seq)) best = i;
    end
    return best;
  endfunction

  int pops_done = 0, both_done = 0, full_seen = 0;
  initial begin
    ins = 0; pop = 0; ins_key = '0; ins_data = '0;
    base = 32'hFFFF_FE00;           // keys cross 2^32 half-way through the run
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      int m;
      @(negedge clk);
      check(head_valid == (model.size() != 0), "head_valid");
      check(full == (model.size() == DEPTH), "full");
      check(count == model.size(), "count");
      if (full) full_seen++;
      if (model.size() != 0) begin
        m = min_idx();
        check(head_key == model[m].key && head_data == model[m].data,
              $sformatf("head: got %h/%h exp %h/%h", head_key, head_data,
                        model[m].key, model[m].data));
      end
      pop = (model.size() != 0) && ($urandom_range(0, 99) < (cyc % 1000 < 500 ? 30 : 70));
      ins = ($urandom_range(0, 99) < (cyc % 1000 < 500 ? 70 : 30)) &&
            (model.size() < DEPTH || pop);
      ins_key  = base + KW'($urandom_range(0, 40));   // small range: many ties
      ins_data = DW'(seq);
      @(posedge clk);
      #1;
      if (pop) begin
        model.delete(min_idx());
        pops_done++;
      end
      if (ins) begin
        model.push_back('{key: ins_key, data: ins_data, seq: seq});
        seq++;
      end
      if (ins && pop) both_done++;
      if (cyc % 4 == 0) base = base + 1;
    end
    check(full_seen > 0, "queue never filled");
    check(both_done > 0, "no simultaneous insert and pop");
    $display("pops=%0d insert+pop=%0d full_cycles=%0d", pops_done, both_done, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
