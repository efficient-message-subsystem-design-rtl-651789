// tb_net_in_ctrl: the input controller against a queue model and a model
// message thread. Random messages (4 header words plus 0..12 arguments)
// arrive with random gaps. The thread reads R_head, then a random number of
// R_body words: fewer than the message holds (the rest must be flushed when
// R_head is read again), exactly all, or more (the extra reads must return
// the error value). Between messages it sometimes reads R_body before R_head
// (error value). Every value is compared with the message list; stalls on
// R_head, stalls on R_body, flushes and error returns are counted and each
// must happen.
module tb_net_in_ctrl;
  import msg_pkg::*;
  localparam int NMSG = 400;
  logic clk = 0, rst_n = 0;
  word_t front_word;
  logic front_head, empty, pop;
  logic rd_head = 0, rd_body = 0;
  logic head_present, body_present, body_err, mesg_arrived, flushing;
  word_t head_data, body_data;
  logic [1:0] state;
  int checks = 0, failures = 0;
  int n_head_stall = 0, n_body_stall = 0, n_flush = 0, n_err = 0, n_early = 0;

  typedef struct packed { logic head; word_t w; } ent_t;
  ent_t q[$];
  word_t msgs [NMSG][16];
  int    mlen [NMSG];

  net_in_ctrl dut (.*);

  assign empty      = (q.size() == 0);
  assign front_word = empty ? '0 : q[0].w;
  assign front_head = empty ? 1'b0 : q[0].head;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    int pm = 0, pw = 0;        // producer: message, word
    int cm = 0, j = 0, k = 0;  // consumer: message, body words read, words to read
    bit in_body = 0, done_prev = 1, pop_s, probe;
    int rate;
    for (int m = 0; m < NMSG; m++) begin
      int cnt = $urandom_range(0, 12);
      mlen[m] = 4 + cnt;
      for (int w = 0; w < 16; w++) msgs[m][w] = {$urandom, $urandom};
      msgs[m][1] = word_t'(cnt);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (cm < NMSG) begin
      @(negedge clk);
      rate = ((cm / 40) % 2) ? 1 : 6;
      if (pm < NMSG && q.size() < 16 && $urandom_range(0, 6) < rate) begin
        q.push_back({pw == 0, msgs[pm][pw]});
        pw++;
        if (pw == mlen[pm]) begin pw = 0; pm++; end
      end
      probe = 0;
      rd_head = 0; rd_body = 0;
      if (!in_body) begin
        if (done_prev && $urandom_range(0, 5) == 0) begin probe = 1; rd_body = 1; end
        else rd_head = 1;
      end else rd_body = 1;
      #3;
      if (flushing) n_flush++;
      pop_s = pop;
      if (probe) begin
        check(body_present && body_err && body_data == ERR_VAL, "R_body before R_head");
        n_early++;
      end else if (rd_head) begin
        if (head_present) begin
          check(head_data == msgs[cm][0], "dispatchIP");
          k = $urandom_range(0, mlen[cm] + 1);
          j = 0;
          in_body = (k > 0);
          done_prev = (k >= mlen[cm] - 1);
          if (k == 0) cm++;
        end else n_head_stall++;
      end else if (rd_body) begin
        if (body_present) begin
          if (j < mlen[cm] - 1)
            check(!body_err && body_data == msgs[cm][j + 1], "body word");
          else begin
            check(body_err && body_data == ERR_VAL, "error value after end");
            n_err++;
          end
          j++;
          if (j == k) begin in_body = 0; cm++; end
        end else begin
          check(j < mlen[cm] - 1, "stall only inside a message");
          n_body_stall++;
        end
      end
      @(posedge clk);
      #1;
      if (pop_s) void'(q.pop_front());
    end
    check(n_head_stall > 0 && n_body_stall > 0 && n_flush > 0 && n_err > 0 && n_early > 0, "coverage");
    $display("head stalls %0d body stalls %0d flush cycles %0d errors %0d early reads %0d",
             n_head_stall, n_body_stall, n_flush, n_err, n_early);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
