// DMA block: copies chunks from host memory into the NIC.
//
// The buffer manager asks for `cmd_chunks` consecutive chunks starting at
// host byte address `cmd_addr`. The engine issues one read per datapath
// word on the host read channel (address handshake hr_valid/hr_ready,
// data returned in order on hr_rvalid/hr_rdata, any latency) and hands
// every returned word straight to the buffer manager on w_valid/w_data; the
// buffer manager always accepts it. `done` pulses with the last word. Only
// one command is in flight at a time: cmd_ready is high while the engine is
// idle.
//
// The document only says that packets are copied into the NIC buffers by a
// DMA mechanism on the NIC, from a per-flow region of physical host memory;
// the channel protocol, the word size and the one-command-at-a-time
// behaviour are this design's choices.
module dma_engine #(
  parameter int unsigned MAX_CHUNKS_W = 8
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        cmd_valid,
  output logic                        cmd_ready,
  input  logic [nic_pkg::ADDR_W-1:0]  cmd_addr,
  input  logic [MAX_CHUNKS_W-1:0]     cmd_chunks,
  // host memory read channel
  output logic                        hr_valid,
  input  logic                        hr_ready,
  output logic [nic_pkg::ADDR_W-1:0]  hr_addr,
  input  logic                        hr_rvalid,
  input  logic [nic_pkg::WORD_W-1:0]  hr_rdata,
  // words to the buffer manager
  output logic                        w_valid,
  output logic [nic_pkg::WORD_W-1:0]  w_data,
  output logic                        done
);
  import nic_pkg::*;
  localparam int unsigned CNT_W = MAX_CHUNKS_W + $clog2(CHUNK_WORDS) + 1;
  localparam int unsigned WORD_BYTES = WORD_W / 8;

  logic             busy;
  logic [CNT_W-1:0] to_issue, to_receive;

  assign cmd_ready = !busy;
  assign hr_valid  = busy && (to_issue != '0);
  assign w_valid   = busy && hr_rvalid;
  assign w_data    = hr_rdata;
  assign done      = w_valid && (to_receive == CNT_W'(1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      to_issue   <= '0;
      to_receive <= '0;
      hr_addr    <= '0;
    end else if (!busy) begin
      if (cmd_valid && cmd_chunks != '0) begin
        busy       <= 1'b1;
        hr_addr    <= cmd_addr;
        to_issue   <= CNT_W'(cmd_chunks) * CNT_W'(CHUNK_WORDS);
        to_receive <= CNT_W'(cmd_chunks) * CNT_W'(CHUNK_WORDS);
      end
    end else begin
      if (hr_valid && hr_ready) begin
        hr_addr  <= hr_addr + ADDR_W'(WORD_BYTES);
        to_issue <= to_issue - 1'b1;
      end
      if (w_valid) begin
        to_receive <= to_receive - 1'b1;
        if (to_receive == CNT_W'(1)) busy <= 1'b0;
      end
    end
  end

  a_no_stray_data: assert property (@(posedge clk) disable iff (!rst_n)
                                    hr_rvalid |-> busy)
    else $error("dma_engine: read data with no command in flight");
endmodule
