// tb_msg_fifo: random pushes and pops of the message queue against a queue
// model; checks front word, head tag, empty, full and count, and that the
// queue both fills and drains during the run.
module tb_msg_fifo;
  import msg_pkg::*;
  localparam int DEPTH = 8;
  logic clk = 0, rst_n = 0;
  logic push = 0, push_head = 0, pop = 0;
  word_t push_word = '0, front_word;
  logic front_head, empty, full;
  logic [3:0] count;
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;
  typedef struct packed { logic head; word_t w; } ent_t;
  ent_t q[$];

  msg_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (size %0d)", what, q.size()); end
  endtask

  initial begin
    int bias;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      bias = ((t / 300) % 2) ? 3 : 1;
      check(empty == (q.size() == 0), "empty");
      check(full == (q.size() == DEPTH), "full");
      check(int'(count) == q.size(), "count");
      if (q.size() > 0) check(front_word == q[0].w && front_head == q[0].head, "front");
      if (full) n_full++;
      if (empty) n_empty++;
      push = (q.size() < DEPTH) && ($urandom_range(0, 3) < bias);
      pop  = ($urandom_range(0, 3) < 4 - bias);
      push_word = {$urandom, $urandom};
      push_head = 1'($urandom);
      #1;
      if (pop && q.size() > 0) void'(q.pop_front());
      if (push) q.push_back({push_head, push_word});
    end
    check(n_full > 0 && n_empty > 0, "coverage");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
