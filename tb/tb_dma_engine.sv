// Self-checking test of dma_engine: random commands against a host memory
// model with a random-latency, randomly stalling read channel. Checks that
// every word arrives in order with the value stored at its address, the
// word count per command, the done pulse, and the one-word-per-cycle
// throughput when the host never stalls.
module tb_dma_engine;
  import nic_pkg::*;
  logic clk = 0, rst_n = 0;
  logic cmd_valid, cmd_ready, hr_valid, hr_ready, hr_rvalid, w_valid, done;
  logic [ADDR_W-1:0] cmd_addr, hr_addr;
  logic [7:0] cmd_chunks;
  logic [WORD_W-1:0] hr_rdata, w_data;
  int checks = 0, failures = 0;
  bit stall_host = 1;

  dma_engine dut (.*);

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

  // host memory: the word at byte address a holds a hash of a
  function automatic logic [WORD_W-1:0] mem_word(logic [ADDR_W-1:0] a);
    return {a ^ 32'h5A5A_1234, ~a};
  endfunction

  // host read channel: fixed 3-cycle pipeline, random address stalls
  logic [ADDR_W-1:0] pipe_a [3];
  logic              pipe_v [3];
  always_ff @(posedge clk) begin
    pipe_v[0] <= hr_valid && hr_ready;
    pipe_a[0] <= hr_addr;
    for (int i = 1; i < 3; i++) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_a[i] <= pipe_a[i-1];
    end
  end
  assign hr_rvalid = rst_n && pipe_v[2];
  assign hr_rdata  = mem_word(pipe_a[2]);
  always_ff @(posedge clk) hr_ready <= stall_host ? ($urandom_range(0, 3) != 0) : 1'b1;

  logic [ADDR_W-1:0] exp_addr;
  int words_left, dones;
  initial begin
    cmd_valid = 0; cmd_addr = 0; cmd_chunks = 0;
    for (int i = 0; i < 3; i++) pipe_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 40; n++) begin
      int start_cyc, cyc;
      if (n == 30) stall_host = 0;
      @(negedge clk);
      cmd_valid  = 1;
      cmd_addr   = ADDR_W'($urandom_range(0, 1 << 20)) << 3;
      cmd_chunks = 8'($urandom_range(1, 4));
      check(cmd_ready, "ready when idle");
      exp_addr   = cmd_addr;
      words_left = cmd_chunks * CHUNK_WORDS;
      @(posedge clk); #1;
      cmd_valid = 0;
      start_cyc = 0; cyc = 0; dones = 0;
      while (words_left > 0) begin
        @(negedge clk);
        cyc++;
        check(cyc < 2000, "command finishes");
        if (cyc >= 2000) break;
        if (w_valid) begin
          check(w_data == mem_word(exp_addr), "word value/order");
          exp_addr += WORD_W / 8;
          words_left--;
          if (done) dones++;
          check(done == (words_left == 0), "done on last word only");
        end
        check(!cmd_ready || words_left == 0, "busy while transferring");
      end
      check(dones == 1, "exactly one done");
      if (!stall_host) begin
        // 1 cycle to accept + 3 cycles latency + one word per cycle
        check(cyc <= cmd_chunks * CHUNK_WORDS + 4,
              $sformatf("throughput: %0d cycles for %0d words", cyc, cmd_chunks * CHUNK_WORDS));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
