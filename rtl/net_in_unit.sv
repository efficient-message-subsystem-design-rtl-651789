// net_in_unit: the network input interface of one message priority. Words
// from the network are streamed into the message queue as soon as they
// arrive, so the network is drained quickly; the input controller hands them
// to the message thread through the R_head and R_body registers.
//
// Network side: valid/ready word stream with a head flag on the first word
// of each message; ready is low only while the queue is full. Thread side:
// see net_in_ctrl. A dispatchIP taken from the network in cycle t is present
// in R_head in cycle t+2: one cycle to enter the queue, one for the input
// controller to leave EMPTY. A later word of a message being read is present
// in R_body in cycle t+1. The structure (queue, controller and the
// two register multiplexers) follows the original architecture; the queue depth is this
// design's choice.
module net_in_unit
  import msg_pkg::*;
#(
  parameter int unsigned DEPTH = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  // network
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_word,
  input  logic  in_head,
  // message thread
  input  logic  rd_head,
  input  logic  rd_body,
  output logic  head_present,
  output word_t head_data,
  output logic  body_present,
  output word_t body_data,
  output logic  body_err,
  // status
  output logic  mesg_arrived,
  output logic  flushing,
  output logic  full
);

  word_t front_word;
  logic  front_head, empty, pop;
  logic [$clog2(DEPTH):0] count;
  logic [1:0] state;

  assign in_ready = !full;

  msg_fifo #(.DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .push(in_valid && !full), .push_word(in_word), .push_head(in_head),
    .pop, .front_word, .front_head, .empty, .full, .count
  );

  net_in_ctrl u_ctrl (
    .clk, .rst_n,
    .front_word, .front_head, .empty, .pop,
    .rd_head, .rd_body, .head_present, .head_data,
    .body_present, .body_data, .body_err,
    .mesg_arrived, .state, .flushing
  );

endmodule
