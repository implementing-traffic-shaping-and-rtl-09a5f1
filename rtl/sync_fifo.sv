// Synchronous first-in first-out buffer.
//
// Used for every FIFO of the NIC: the command FIFO (host to control block),
// the request FIFO (control block to host), the transmit FIFO of data tags
// (link scheduler to buffer manager), the physical interface FIFO (buffer
// manager to link) and the free-line lists of the segment and packet
// memories. The document names these FIFOs but gives no depth or handshake;
// the depth is a parameter here and the handshake is a plain push/pop with
// full and empty flags.
//
// Timing: a push is stored at the clock edge; the head entry is visible on
// rd_data combinationally while empty is low, and a pop removes it at the
// edge. Push and pop in the same cycle are allowed, also when full (the
// popped entry makes room). Pushing when full without popping, or popping
// when empty, is a protocol error caught by the assertions.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     wr_data,
  input  logic pop,
  output T     rd_data,
  output logic full,
  output logic empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;

  function automatic logic [PW-1:0] incr(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  assign full    = (count == ($clog2(DEPTH+1))'(DEPTH));
  assign empty   = (count == '0);
  assign rd_data = mem[rd_ptr];

  logic do_push, do_pop;
  assign do_pop  = pop && !empty;
  assign do_push = push && (!full || do_pop);

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= incr(wr_ptr);
      if (do_pop)  rd_ptr <= incr(rd_ptr);
      count <= count + ($clog2(DEPTH+1))'(do_push) - ($clog2(DEPTH+1))'(do_pop);
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  push |-> (!full || pop))
    else $error("sync_fifo: push while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> !empty)
    else $error("sync_fifo: pop while empty");
endmodule
