// msg_fifo: the incoming message queue. Words arrive from the network and
// are stored with a head tag that marks the first word (the dispatchIP) of
// each message, so that the input controller can find message boundaries.
//
// A synchronous FIFO in a circular array. push stores a word when not full;
// pop removes the front word when not empty; both may happen in one cycle.
// The front word and its tag are visible combinationally. When full, the
// network is held off (full feeds the network ready). The depth is this
// design's choice; any power of two works.
module msg_fifo
  import msg_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    push,
  input  word_t                   push_word,
  input  logic                    push_head,
  input  logic                    pop,
  output word_t                   front_word,
  output logic                    front_head,
  output logic                    empty,
  output logic                    full,
  output logic [$clog2(DEPTH):0]  count
);

  localparam int unsigned AW = $clog2(DEPTH);

  word_t          mem_q  [DEPTH];
  logic [DEPTH-1:0] tag_q;
  logic [AW-1:0]  rd_q, wr_q;
  logic           do_push, do_pop;

  assign empty   = (count == '0);
  assign full    = (count == (AW+1)'(DEPTH));
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;

  assign front_word = mem_q[rd_q];
  assign front_head = tag_q[rd_q];

  always_ff @(posedge clk) begin
    if (do_push)
      mem_q[wr_q] <= push_word;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q  <= '0;
      wr_q  <= '0;
      count <= '0;
      tag_q <= '0;
    end else begin
      if (do_push) begin
        wr_q        <= wr_q + 1'b1;
        tag_q[wr_q] <= push_head;
      end
      if (do_pop)
        rd_q <= rd_q + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  // The writer must respect full: a word pushed into a full queue is lost
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);

endmodule
