// Self-checking test of buffer_manager, connected to a real dma_engine and a
// host memory model with read latency and random stalls. The packet memory
// is small (32 chunks) so that free space runs short.
//
// The testbench sets up flows with small ring regions (so the read position
// wraps), sends data tags of 1..4 chunks through a transmit-FIFO model,
// posts best-effort chunks, and reads the physical-interface side with
// random back-pressure. Every chunk that comes out must be the flow's next
// chunk of its host ring (each word checked against the host memory
// pattern), with the right flow id, best-effort bit and end-of-chunk
// marker; best-effort chunks must come out in posting order. A last tag
// must release the flow: after all traffic every chunk is back in the free
// list, and a flow id set up again reads from its new region. Stalls
// (tag before data), refills, releases and idle link slots must all occur.
module tb_buffer_manager;
  import nic_pkg::*;
  localparam int NF = 8, CHUNKS = 32, BATCH = 4;
  localparam int FW = $clog2(NF);
  logic clk = 0, rst_n = 0;
  logic setup_valid, setup_ready, be_valid, be_ready, be_arrived;
  logic [FW-1:0] setup_flow;
  logic [ADDR_W-1:0] setup_addr, be_addr;
  logic [LEN_W-1:0] setup_len;
  logic tx_empty, tx_pop, phy_full, phy_empty, link_ready, phy_push, idle_slot;
  data_tag_t tx_data;
  link_word_t phy_data;
  logic dma_cmd_valid, dma_cmd_ready, dma_w_valid, dma_done;
  logic [ADDR_W-1:0] dma_cmd_addr;
  logic [7:0] dma_cmd_chunks;
  logic [WORD_W-1:0] dma_w_data;
  logic [31:0] chunks_sent, refills, stalls, releases;
  logic [$clog2(CHUNKS+1)-1:0] free_chunks;
  logic hr_valid, hr_ready, hr_rvalid;
  logic [ADDR_W-1:0] hr_addr;
  logic [WORD_W-1:0] hr_rdata;
  int checks = 0, failures = 0;

  buffer_manager #(.NUM_FLOWS(NF), .PKT_CHUNKS(CHUNKS), .BATCH(BATCH)) dut (.*);

  dma_engine u_dma (
    .clk, .rst_n, .cmd_valid(dma_cmd_valid), .cmd_ready(dma_cmd_ready),
    .cmd_addr(dma_cmd_addr), .cmd_chunks(dma_cmd_chunks),
    .hr_valid, .hr_ready, .hr_addr, .hr_rvalid, .hr_rdata,
    .w_valid(dma_w_valid), .w_data(dma_w_data), .done(dma_done));

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

  // ------------------------------------------------------- host memory
  function automatic logic [WORD_W-1:0] mem_word(logic [ADDR_W-1:0] a);
    return {a ^ 32'hC0DE_0000, a * 32'd2654435761};
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
    hr_ready <= $urandom_range(0, 99) < 80;
  end
  assign hr_rvalid = pipe_v[3];
  assign hr_rdata  = mem_word(pipe_a[3]);

  // ------------------------------------------------ transmit FIFO model
  data_tag_t txq[$];
  logic popped = 0;
  assign tx_empty = txq.size() == 0;
  assign tx_data  = txq.size() != 0 ? txq[0] : '0;
  always @(posedge clk) popped <= tx_pop;
  always @(negedge clk) if (popped) void'(txq.pop_front());

  // ------------------------------------------------------ link side
  logic hold = 0;
  always @(posedge clk) phy_full <= $urandom_range(0, 99) < 20;
  assign phy_empty  = !hold;
  assign link_ready = 1'b1;

  // expected chunk streams
  logic [ADDR_W-1:0] base[NF];
  int                len[NF], next_k[NF];
  logic [ADDR_W-1:0] be_addrs[$];
  int w_idx = 0, out_chunks = 0, idle_pulses = 0;
  logic [ADDR_W-1:0] cur_addr;

  always @(posedge clk) if (rst_n && setup_valid && setup_ready) begin
    base[setup_flow]   = setup_addr;
    len[setup_flow]    = int'(setup_len);
    next_k[setup_flow] = 0;
  end

  always @(posedge clk) begin
    if (rst_n && idle_slot) idle_pulses++;
    if (rst_n && phy_push && !phy_full) begin
      if (w_idx == 0) begin
        if (phy_data.be) begin
          check(be_addrs.size() != 0, "unexpected best-effort chunk");
          cur_addr = be_addrs.size() != 0 ? be_addrs.pop_front() : '0;
        end else begin
          int f;
          f = int'(phy_data.flow);
          cur_addr = base[f] + ADDR_W'((next_k[f] % len[f]) * CHUNK_BYTES);
          next_k[f]++;
        end
      end
      check(phy_data.data == mem_word(cur_addr + ADDR_W'(w_idx * (WORD_W / 8))),
            $sformatf("word %0d of chunk (flow %0d be %0d)", w_idx, phy_data.flow, phy_data.be));
      check(phy_data.eoc == (w_idx == CHUNK_WORDS - 1), "end-of-chunk marker");
      w_idx = (w_idx + 1) % CHUNK_WORDS;
      if (w_idx == 0) out_chunks++;
    end
  end

  task automatic setup(int f, logic [ADDR_W-1:0] a, int l);
    @(negedge clk);
    setup_valid = 1; setup_flow = FW'(f); setup_addr = a; setup_len = LEN_W'(l);
    do @(posedge clk); while (!setup_ready);
    #1 setup_valid = 0;
  endtask

  task automatic post_be(logic [ADDR_W-1:0] a);
    @(negedge clk);
    be_valid = 1; be_addr = a;
    do @(posedge clk); while (!be_ready);
    be_addrs.push_back(a);
    #1 be_valid = 0;
  endtask

  function automatic data_tag_t tag(int f, int n, bit last);
    data_tag_t t;
    t = '0;
    t.flow = FLOW_W'(f); t.chunks = S_W'(n); t.last = last;
    return t;
  endfunction

  int sent_total = 0, be_arrivals = 0;
  always @(posedge clk) if (rst_n && be_arrived) be_arrivals++;

  initial begin
    setup_valid = 0; be_valid = 0; setup_flow = 0; setup_addr = 0; setup_len = 0;
    be_addr = 0;
    for (int i = 0; i < 4; i++) pipe_v[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40) @(posedge clk);   // idle link: idle slots must appear
    for (int f = 0; f < 6; f++) setup(f, 32'h0010_0000 * (f + 1), 3 + f);
    // tags right away: the first ones stall until their data arrives
    for (int r = 0; r < 60; r++) begin
      int f, n;
      f = $urandom_range(0, 5);
      n = $urandom_range(1, 4);
      txq.push_back(tag(f, n, 0));
      sent_total += n;
      if (r % 10 == 3) begin
        post_be(32'h0F00_0000 + 32'(r) * 128);
        txq.push_back('{be: 1'b1, last: 1'b0, chunks: S_W'(1), flow: '0});
        sent_total++;
      end
      repeat ($urandom_range(0, 30)) @(posedge clk);
    end
    // finish every flow: a last burst, and a release-only tag for flow 5
    for (int f = 0; f < 5; f++) begin txq.push_back(tag(f, 2, 1)); sent_total += 2; end
    txq.push_back(tag(5, 0, 1));
    wait (txq.size() == 0);
    repeat (400) @(posedge clk);
    check(out_chunks == sent_total, $sformatf("chunks out %0d expected %0d", out_chunks, sent_total));
    check(chunks_sent == sent_total, "chunks_sent counter");
    check(releases == 6, $sformatf("releases %0d", releases));
    check(free_chunks == CHUNKS, $sformatf("free chunks after release: %0d", free_chunks));
    // reuse flow id 2 with a new region
    setup(2, 32'h0AB0_0000, 8);
    txq.push_back(tag(2, 3, 1));
    sent_total += 3;
    wait (txq.size() == 0);
    repeat (400) @(posedge clk);
    check(out_chunks == sent_total, "reused flow id reads its new region");
    check(free_chunks == CHUNKS, "all chunks free at the end");
    check(stalls > 0, "a tag waited for its data");
    check(refills > 6, "refills after setup");
    check(idle_pulses > 0, "idle link slots");
    check(be_arrivals == be_addrs.size() + 6 || be_arrivals == 6, "best-effort arrivals");
    $display("chunks=%0d refills=%0d stalls=%0d releases=%0d idle=%0d be=%0d",
             out_chunks, refills, stalls, releases, idle_pulses, be_arrivals);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
