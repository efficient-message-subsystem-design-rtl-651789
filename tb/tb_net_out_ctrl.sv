// tb_net_out_ctrl: the network output controller with a model MC register
// file (registered read port), a model GTLB (an address hits when its bit
// 40 is clear; the node is the low 15 address bits) and a network sink that
// is randomly not ready. Each SEND's words are compared with the expected
// message: dispatchIP with execute-message turned into execute, argument
// count, sender node, destination, then MC#0..len-1; head and tail flags,
// node and priority side-band too. A GTLB miss must abort with no words and
// no OMBC effect, its ccreg cleared at issue and then written FALSE. With the sink always ready, a message must take
// len+4 cycles on the port and its first word must leave 3 cycles after
// the request (request, grant, GTLB lookup).
module tb_net_out_ctrl;
  import msg_pkg::*;
  localparam int NSEND = 300;
  logic clk = 0, rst_n = 0;
  node_t my_node;
  logic req = 0, grant;
  send_req_t send;
  logic gtlb_lookup_en, gtlb_hit;
  logic [ADDR_W-1:0] gtlb_vaddr;
  node_t gtlb_node;
  logic rd1_en, rd1_bank;
  logic [3:0] rd1_idx;
  word_t rd1_data = '0;
  logic ncc_clr_en, ncc_set_en, ncc_set_val;
  logic [1:0] ncc_clr_idx, ncc_set_idx;
  logic ombc_dec;
  logic out_valid, out_ready = 1, out_head, out_tail, out_prio, aborted, idle;
  word_t out_word;
  node_t out_node;
  int checks = 0, failures = 0;
  int n_abort = 0, n_backpressure = 0, n_dec = 0, n_clr = 0, n_set = 0, n_false = 0;
  bit always_ready = 1;

  word_t regs [2][12];
  typedef struct packed { logic head, tail, prio; node_t node; word_t w; } rx_t;
  rx_t rx[$];
  int valid_cycles = 0, first_word_cycle = -1, cyc = 0;

  net_out_ctrl dut (.*);

  assign gtlb_hit  = gtlb_lookup_en && !gtlb_vaddr[40];
  assign gtlb_node = node_t'(gtlb_vaddr[14:0]);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rd1_en) rd1_data <= regs[rd1_bank][rd1_idx];
    if (out_valid) valid_cycles <= valid_cycles + 1;
    if (out_valid && !out_ready) n_backpressure <= n_backpressure + 1;
    if (out_valid && out_ready) begin
      rx.push_back({out_head, out_tail, out_prio, out_node, out_word});
      if (first_word_cycle < 0) first_word_cycle <= cyc;
    end
    if (ombc_dec) n_dec <= n_dec + 1;
    if (ncc_clr_en) n_clr <= n_clr + 1;
    if (ncc_set_en && ncc_set_val) n_set <= n_set + 1;
    if (ncc_set_en && !ncc_set_val) n_false <= n_false + 1;
    if (ncc_clr_en && ncc_clr_idx != send.ccreg) begin failures++; $display("FAIL ccreg index"); end
  end

  always @(negedge clk) out_ready <= always_ready ? 1'b1 : ($urandom_range(0, 2) != 0);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    ptr_t p;
    bit miss, thr;
    int d0, c0, s0, f0, req_cycle;
    word_t exp;
    my_node = '{x: 5'd3, y: 5'd7, z: 5'd1};
    send = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NSEND; n++) begin
      always_ready = (n < 40);
      foreach (regs[b, r]) regs[b][r] = {$urandom, $urandom};
      @(negedge clk);
      send = '0;
      send.bank = 1'($urandom);
      send.len = LEN_W'($urandom_range(0, 12));
      send.prio = 1'($urandom);
      send.sys = 1'($urandom);
      send.nothrottle = 1'($urandom);
      send.ccreg = 2'($urandom);
      p = '0;
      p.perm = ($urandom_range(0, 3) == 0) ? PERM_EXEC : PERM_EXEC_MSG;
      p.addr = ADDR_W'({$urandom, $urandom});
      send.dip = word_t'(p);
      send.dest = {$urandom, $urandom};
      send.dest[40] = ($urandom_range(0, 7) == 0);
      miss = send.dest[40];
      thr = !(send.sys && send.nothrottle);
      rx.delete();
      d0 = n_dec; c0 = n_clr; s0 = n_set; f0 = n_false;
      valid_cycles = 0; first_word_cycle = -1;
      req_cycle = cyc;
      req = 1;
      do @(posedge clk); while (!(grant && req));
      @(negedge clk);
      req = 0;
      send = '0;              // operands must have been captured
      @(posedge clk);
      if (miss) begin
        check(aborted, "abort on GTLB miss");
        n_abort++;
      end
      do @(posedge clk); while (!idle);
      #1;
      if (miss) begin
        check(rx.size() == 0 && n_dec == d0 && n_clr == c0 + 1 && n_set == s0 && n_false == f0 + 1,
              "abort: no words, no OMBC decrement, ccreg cleared then FALSE");
        continue;
      end
      p.perm = PERM_EXEC;
      check(rx.size() == 4 + int'(send_len(n)), "message length");
      for (int i = 0; i < rx.size(); i++) begin
        case (i)
          0: exp = word_t'(p);
          1: exp = word_t'(send_len(n));
          2: exp = word_t'(my_node);
          3: exp = dest_of(n);
          default: exp = regs[bank_of(n)][i - 4];
        endcase
        check(rx[i].w == exp, $sformatf("word %0d of send %0d", i, n));
        check(rx[i].head == (i == 0) && rx[i].tail == (i == rx.size() - 1), "head/tail");
        check(rx[i].node == node_t'(dest_of(n)[14:0]) && rx[i].prio == prio_of(n), "side-band");
      end
      check(n_clr == c0 + 1 && n_set == s0 + 1, "ccreg cleared and set once");
      check(n_dec == d0 + int'(thr), "OMBC decrement only for throttled messages");
      if (always_ready) begin
        check(valid_cycles == 4 + int'(send_len(n)), "one word per cycle");
        check(first_word_cycle - req_cycle == 3, "request to first word latency");
      end
    end
    check(n_abort > 0 && n_backpressure > 0, "coverage");
    $display("aborts %0d backpressure cycles %0d", n_abort, n_backpressure);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Copies of each SEND's operands, kept when it is granted
  send_req_t log_q [NSEND];
  int log_n = 0;
  always @(posedge clk) if (grant && req) begin log_q[log_n] <= send; log_n <= log_n + 1; end
  function automatic logic [LEN_W-1:0] send_len(int n); return log_q[n].len; endfunction
  function automatic word_t dest_of(int n); return log_q[n].dest; endfunction
  function automatic logic bank_of(int n); return log_q[n].bank; endfunction
  function automatic logic prio_of(int n); return log_q[n].prio; endfunction
endmodule
