// Hardware priority queue of tags, sorted by a time key.
//
// The shaper keeps its tags sorted by start time and the scheduler keeps its
// tags sorted by finish time; both use this queue. The document asks for a
// dedicated queue with constant-time insertion and removal but does not
// describe its insides. This one is the simplest structure that gives that:
// a shift-register array kept in sorted order. Every entry compares the new
// key with its own key in parallel; the entries that must come after the
// new tag move one place towards the tail and the new tag drops into the
// gap. Removal shifts every entry one place towards the head.
//
// Keys are compared on a circular clock (nic_pkg::time_before), so the order
// stays right across wrap-around as long as live keys span less than half
// the key range. A new tag goes behind existing tags with the same key, so
// equal keys leave in arrival order.
//
// Interface and timing: head_valid/head_key/head_data show the smallest
// entry combinationally. pop removes it and ins inserts ins_key/ins_data,
// both at the next clock edge; both may happen in the same cycle, so one tag
// can be inserted and another removed every cycle. full means all DEPTH
// entries are in use; inserting into a full queue needs a pop in the same
// cycle.
module priority_queue #(
  parameter int unsigned DEPTH  = 256,
  parameter int unsigned KEY_W  = nic_pkg::TIME_W,
  parameter int unsigned DATA_W = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ins,
  input  logic [KEY_W-1:0]  ins_key,
  input  logic [DATA_W-1:0] ins_data,
  input  logic              pop,
  output logic              head_valid,
  output logic [KEY_W-1:0]  head_key,
  output logic [DATA_W-1:0] head_data,
  output logic              full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  typedef struct packed {
    logic [KEY_W-1:0]  key;
    logic [DATA_W-1:0] data;
  } entry_t;

  entry_t e     [DEPTH];
  logic   v     [DEPTH];
  entry_t base_e[DEPTH];
  logic   base_v[DEPTH];
  logic   goes_first[DEPTH];   // new tag sorts ahead of base entry i

  function automatic logic key_before(logic [KEY_W-1:0] a, logic [KEY_W-1:0] b);
    logic [KEY_W-1:0] diff;
    diff = a - b;
    return diff[KEY_W-1];
  endfunction

  logic do_pop;
  assign do_pop     = pop && v[0];
  assign head_valid = v[0];
  assign head_key   = e[0].key;
  assign head_data  = e[0].data;
  assign full       = v[DEPTH-1];

  // One slot per generate step: the slot after the optional removal, the
  // insertion decision, and the slot register itself. A slot only looks at
  // its neighbours, so the logic per slot is constant.
  for (genvar i = 0; i < DEPTH; i++) begin : g_slot
    localparam int unsigned UP = (i < DEPTH-1) ? i+1 : i;   // towards the tail
    localparam int unsigned DN = (i > 0) ? i-1 : 0;         // towards the head
    logic prev_first;

    assign base_e[i]     = (do_pop && i < DEPTH-1) ? e[UP] : e[i];
    assign base_v[i]     = do_pop ? ((i < DEPTH-1) ? v[UP] : 1'b0) : v[i];
    assign goes_first[i] = !base_v[i] || key_before(ins_key, base_e[i].key);
    assign prev_first    = (i > 0) && goes_first[DN];

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)                                v[i] <= 1'b0;
      else if (ins && goes_first[i] && !prev_first) v[i] <= 1'b1;
      else if (ins && prev_first)                v[i] <= base_v[DN];
      else                                       v[i] <= base_v[i];
    end

    always_ff @(posedge clk) begin
      if (ins && goes_first[i] && !prev_first) e[i] <= '{key: ins_key, data: ins_data};
      else if (ins && prev_first)              e[i] <= base_e[DN];
      else                                     e[i] <= base_e[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) count <= '0;
    else        count <= count + ($clog2(DEPTH+1))'(ins) - ($clog2(DEPTH+1))'(do_pop);
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  ins |-> (!full || do_pop))
    else $error("priority_queue: insert into a full queue");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   pop |-> v[0])
    else $error("priority_queue: pop from an empty queue");
endmodule
