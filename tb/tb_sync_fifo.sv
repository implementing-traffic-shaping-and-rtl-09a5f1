// Self-checking test of sync_fifo: random pushes and pops against a queue
// model, including push-when-full with a simultaneous pop, flag checks and
// the count output.
module tb_sync_fifo;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  logic [11:0] wr_data, rd_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0;

  sync_fifo #(.T(logic [11:0]), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
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

  logic [11:0] model[$];
  initial begin
    push = 0; pop = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(count == model.size(), "count");
      if (model.size() != 0) check(rd_data == model[0], "head data");
      // bias towards filling in the first half, draining in the second
      pop  = (model.size() != 0) && ($urandom_range(0, 99) < (cyc < 1500 ? 35 : 65));
      push = ($urandom_range(0, 99) < (cyc < 1500 ? 65 : 35)) &&
             (model.size() < DEPTH || pop);
      wr_data = 12'($urandom);
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(wr_data);
    end
    @(negedge clk); push = 0; pop = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
