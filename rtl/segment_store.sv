// Schedule segment storage of the control block.
//
// Holds the traffic parameters of every flow as a linked list of schedule
// segments, as the document describes: a pointer memory indexed by flow id
// gives the first and last line of the flow's list, each line of the
// segment SRAM holds one segment plus the link to the next line, and a FIFO
// keeps the lines that are free. A line goes back to that FIFO when its
// segment has been used up or its flow ends. Lines that were never used are
// handed out from a counter, so the free list needs no initialisation pass
// after reset (a choice of this design).
//
// Operations, one per cycle (the caller arbitrates):
//   append : add app_seg at the tail of app_flow's list. app_ok reports
//            success in the same cycle; it is low when no line is free.
//   read   : rd_flow's head segment appears on rd_seg one cycle later
//            (synchronous SRAM read), with rd_has (the list was not empty)
//            and rd_has_next (a second segment follows).
//   pop    : free the head line of pop_flow and advance its list.
module segment_store #(
  parameter int unsigned NUM_FLOWS = nic_pkg::NUM_FLOWS,
  parameter int unsigned SEG_LINES = 2048
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         app_en,
  input  logic [$clog2(NUM_FLOWS)-1:0] app_flow,
  input  nic_pkg::seg_t                app_seg,
  output logic                         app_ok,
  input  logic                         rd_en,
  input  logic [$clog2(NUM_FLOWS)-1:0] rd_flow,
  output nic_pkg::seg_t                rd_seg,
  output logic                         rd_has,
  output logic                         rd_has_next,
  input  logic                         pop_en,
  input  logic [$clog2(NUM_FLOWS)-1:0] pop_flow,
  output logic [$clog2(SEG_LINES+1)-1:0] free_lines
);
  import nic_pkg::*;
  localparam int unsigned LW = $clog2(SEG_LINES);
  localparam int unsigned FW = $clog2(NUM_FLOWS);
  localparam int unsigned CW = $clog2(SEG_LINES+1);

  // segment SRAM and its link field
  seg_t          seg_mem  [SEG_LINES];
  logic [LW-1:0] next_mem [SEG_LINES];
  // pointer memory
  logic [LW-1:0] head_mem [NUM_FLOWS];
  logic [LW-1:0] tail_mem [NUM_FLOWS];
  logic          nonempty [NUM_FLOWS];

  // free-line list: recycled lines in a FIFO, untouched lines from a counter
  logic [CW-1:0] fresh;
  logic          fl_pop, fl_push, fl_empty, fl_full;
  logic [LW-1:0] fl_head;
  logic [CW-1:0] fl_count;

  sync_fifo #(.T(logic [LW-1:0]), .DEPTH(SEG_LINES)) u_free_lines (
    .clk, .rst_n,
    .push(fl_push), .wr_data(head_mem[pop_flow]),
    .pop(fl_pop), .rd_data(fl_head),
    .full(fl_full), .empty(fl_empty), .count(fl_count)
  );

  logic [LW-1:0] new_line;
  logic          can_alloc;
  assign can_alloc  = !fl_empty || (fresh != CW'(SEG_LINES));
  assign new_line   = !fl_empty ? fl_head : fresh[LW-1:0];
  assign app_ok     = app_en && can_alloc;
  assign fl_pop     = app_ok && !fl_empty;
  assign fl_push    = pop_en && nonempty[pop_flow];
  assign free_lines = fl_count + (CW'(SEG_LINES) - fresh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fresh <= '0;
      for (int f = 0; f < NUM_FLOWS; f++) nonempty[f] <= 1'b0;
      rd_has      <= 1'b0;
      rd_has_next <= 1'b0;
    end else begin
      if (app_ok) begin
        if (fl_empty) fresh <= fresh + 1'b1;
        nonempty[app_flow] <= 1'b1;
      end
      if (pop_en && nonempty[pop_flow] &&
          head_mem[pop_flow] == tail_mem[pop_flow])
        nonempty[pop_flow] <= 1'b0;
      if (rd_en) begin
        rd_has      <= nonempty[rd_flow];
        rd_has_next <= nonempty[rd_flow] && (head_mem[rd_flow] != tail_mem[rd_flow]);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (app_ok) begin
      seg_mem[new_line]  <= app_seg;
      tail_mem[app_flow] <= new_line;
      if (nonempty[app_flow]) next_mem[tail_mem[app_flow]] <= new_line;
      else                    head_mem[app_flow] <= new_line;
    end
    if (pop_en && nonempty[pop_flow])
      head_mem[pop_flow] <= next_mem[head_mem[pop_flow]];
    if (rd_en)
      rd_seg <= seg_mem[head_mem[rd_flow]];
  end

  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
                             $onehot0({app_en, rd_en, pop_en}))
    else $error("segment_store: more than one operation in a cycle");
endmodule
