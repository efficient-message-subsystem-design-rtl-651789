// net_in_ctrl: the network input controller. It presents the message queue
// to the message thread as two registers, R_head and R_body, and manages
// their presence bits so that the thread stalls when no word is there.
//
// The thread raises rd_head or rd_body and keeps it up while the register
// is not present (head_present / body_present low: the read stalls). A read
// completes in the cycle the request and the presence bit are both high.
// Reading R_head returns the dispatchIP of the next message and pops it;
// reading R_body returns and pops the next word of the current message, or
// returns the error value (body_err high, nothing popped) when the current
// message has no more words.
//
// States (the controller state machine of the original architecture):
//   EMPTY     R_head not present, R_body gives the error value. When the
//             queue front is a head-tagged word (a message has arrived), go
//             to NEWMESG. Untagged words found here are stray and dropped.
//   NEWMESG   R_head gives the queue front. Reading it pops the dispatchIP
//             and goes to READMESG. Reading R_body gives the error value.
//   READMESG  R_head not present. Reading R_body pops words (PopWord).
//             The first word read is the argument count; from it the
//             controller knows how many words (sender ID, destination and
//             arguments) are left. If a word of the message has not yet
//             arrived, R_body is not present (the handler stalls until it
//             arrives). Once every word has been read, R_body gives the error
//             value. When the message is used up and the queue is empty, go
//             to EMPTY. Reading R_head moves to FLSHMESG.
//   FLSHMESG  drop the unread words of the current message, one per cycle,
//             then go to EMPTY. A pending R_head read then completes when
//             the next message reaches NEWMESG.
// A message ends when its count is used up or when the next head-tagged
// word reaches the front, whichever comes first, so a wrong count cannot
// make the controller read into the next message.
//
// The states, their transitions and the R_head/R_body values follow the
// original architecture. Using the count word to tell an unfinished message (stall) from
// a finished one (error value), the priority of rd_head over rd_body in one
// cycle and the error value itself are this design's choice.
module net_in_ctrl
  import msg_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // message queue
  input  word_t      front_word,
  input  logic       front_head,
  input  logic       empty,
  output logic       pop,
  // message thread
  input  logic       rd_head,
  input  logic       rd_body,
  output logic       head_present,
  output word_t      head_data,
  output logic       body_present,
  output word_t      body_data,
  output logic       body_err,
  // status
  output logic       mesg_arrived,
  output logic [1:0] state,
  output logic       flushing
);

  typedef enum logic [1:0] {S_EMPTY, S_NEWMESG, S_READMESG, S_FLSHMESG} state_e;

  state_e      state_q, state_d;
  logic        cnt_known_q;
  logic [7:0]  remain_q;

  logic at_end;     // every word of the current message has been popped
  logic body_rd;    // an R_body read is being served this cycle
  logic pop_word;   // pop a word of the current message (read or flush)

  assign mesg_arrived = !empty && front_head;
  assign at_end       = (cnt_known_q && remain_q == '0) || mesg_arrived;
  assign body_rd      = rd_body && !rd_head;
  assign state        = state_q;
  assign flushing     = (state_q == S_FLSHMESG);

  always_comb begin
    state_d      = state_q;
    pop          = 1'b0;
    pop_word     = 1'b0;
    head_present = 1'b0;
    head_data    = front_word;
    body_present = 1'b1;
    body_data    = ERR_VAL;
    body_err     = 1'b1;
    unique case (state_q)
      S_EMPTY: begin
        if (mesg_arrived)
          state_d = S_NEWMESG;
        else if (!empty)
          pop = 1'b1;                       // stray word
      end
      S_NEWMESG: begin
        head_present = 1'b1;
        if (rd_head) begin
          pop     = 1'b1;
          state_d = S_READMESG;
        end
      end
      S_READMESG: begin
        if (!at_end) begin
          body_present = !empty;
          body_data    = front_word;
          body_err     = 1'b0;
        end
        if (rd_head) begin
          state_d = S_FLSHMESG;
        end else if (body_rd && !at_end && !empty) begin
          pop      = 1'b1;
          pop_word = 1'b1;
        end else if (at_end && empty) begin
          state_d = S_EMPTY;
        end
      end
      S_FLSHMESG: begin
        if (at_end)
          state_d = S_EMPTY;
        else if (!empty) begin
          pop      = 1'b1;
          pop_word = 1'b1;
        end
      end
      default: state_d = S_EMPTY;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_EMPTY;
      cnt_known_q <= 1'b0;
      remain_q    <= '0;
    end else begin
      state_q <= state_d;
      if (state_q == S_NEWMESG && rd_head) begin
        cnt_known_q <= 1'b0;
        remain_q    <= '0;
      end else if (pop_word) begin
        if (!cnt_known_q) begin
          cnt_known_q <= 1'b1;
          remain_q    <= front_word[7:0] + 8'd2;   // sender ID, destination, arguments
        end else begin
          remain_q <= remain_q - 1'b1;
        end
      end
    end
  end

  a_no_pop_empty: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);

endmodule
