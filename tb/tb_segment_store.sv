// Self-checking test of segment_store: random appends, head reads and pops
// on a few flows against per-flow queue models; checks the one-cycle read
// latency, the has/has_next flags, line recycling (more appends in total
// than there are lines) and refusal when every line is taken.
module tb_segment_store;
  import nic_pkg::*;
  localparam int NF = 8, LINES = 16;
  logic clk = 0, rst_n = 0;
  logic app_en, app_ok, rd_en, rd_has, rd_has_next, pop_en;
  logic [2:0] app_flow, rd_flow, pop_flow;
  seg_t app_seg, rd_seg;
  logic [$clog2(LINES+1)-1:0] free_lines;
  int checks = 0, failures = 0;

  segment_store #(.NUM_FLOWS(NF), .SEG_LINES(LINES)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
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

  seg_t q[NF][$];
  int   total;
  int   appended = 0, refused = 0;

  initial begin
    app_en = 0; rd_en = 0; pop_en = 0;
    app_flow = 0; rd_flow = 0; pop_flow = 0; app_seg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      int op, fl;
      @(negedge clk);
      total = 0;
      for (int i = 0; i < NF; i++) total += q[i].size();
      check(free_lines == LINES - total, "free line count");
      op = $urandom_range(0, 2);
      fl = $urandom_range(0, NF - 1);
      app_en = 0; rd_en = 0; pop_en = 0;
      case (op)
        0: begin
          app_en = 1; app_flow = 3'(fl);
          app_seg = seg_t'({$urandom, $urandom});
          #1;
          check(app_ok == (total < LINES), "app_ok");
          @(posedge clk); #1;
          if (total < LINES) begin q[fl].push_back(app_seg); appended++; end
          else refused++;
        end
        1: begin
          rd_en = 1; rd_flow = 3'(fl);
          @(posedge clk); #1;
          rd_en = 0;
          check(rd_has == (q[fl].size() != 0), "rd_has");
          check(rd_has_next == (q[fl].size() > 1), "rd_has_next");
          if (q[fl].size() != 0) check(rd_seg == q[fl][0], "rd_seg");
        end
        default: begin
          pop_en = 1; pop_flow = 3'(fl);
          @(posedge clk); #1;
          if (q[fl].size() != 0) void'(q[fl].pop_front());
        end
      endcase
    end
    check(appended > LINES, "lines were not recycled");
    check(refused > 0, "never ran out of lines");
    $display("appended=%0d refused=%0d", appended, refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
