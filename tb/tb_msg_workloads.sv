// tb_msg_workloads: the message operations used to compare message systems,
// run on the message subsystem at its default parameters, with their cycle
// counts checked.
//
// The network output is looped straight back into the input unit of the
// message's priority and never stalls. A sender thread model writes MC
// registers one per cycle and presents SENDs; a receiver thread model on
// priority 0 reads every message through R_head and R_body. The cases:
//   1. generate and send 8 words: 8 register writes and a SEND;
//   2. dispatch: R_head must be present 2 cycles after the network offers
//      the dispatchIP (one cycle to enter the input queue, one for the input
//      controller to leave EMPTY); a handler then jumps through R_head, and
//      the branch delay slots belong to the processor;
//   3. two consecutive 8-word messages composed in bank 0 and bank 1;
//   4. one message to two destinations, composed once and sent twice;
//   5. block transfer of 40 words as 10-word messages from alternating
//      banks, each bank rewritten only after its ccreg is present again.
// Timing expected from the design (port idle): a SEND is granted the cycle
// after it is presented, its first word leaves 2 cycles after the grant, a
// message of len registers is len+4 consecutive words, and a SEND waiting
// behind another message starts its first word 4 cycles after the previous
// tail word.
module tb_msg_workloads;
  import msg_pkg::*;

  logic clk = 0, rst_n = 0;
  node_t my_node = '{z: 5'd3, y: 5'd2, x: 5'd1};
  logic mc_wr_en = 0, mc_wr_bank = 0, mc_inv_en = 0, mc_inv_bank = 0, mc_rd_bank = 0;
  logic [3:0] mc_wr_idx = 0, mc_inv_idx = 0, mc_rd_idx = 0;
  word_t mc_wr_data = '0, mc_rd_data;
  logic mc_rd_present;
  logic cc_wr_en = 0, cc_wr_val = 0;
  logic [1:0] cc_wr_idx = 0;
  logic [3:0] cc_val, cc_present;
  logic send_valid = 0;
  send_req_t send = '0;
  logic send_ok, send_stall, send_fault, stall_regs, stall_throttle, stall_busy;
  logic gtlb_fill_en = 0;
  logic [1:0] gtlb_fill_idx = 0;
  gtlb_entry_t gtlb_fill_entry = '0;
  logic gtlb_miss;
  logic ombc_set_en = 0, ombc_inc = 0, ombc_dec = 0;
  logic [15:0] ombc_set_val = '0, ombc_count;
  logic ombc_zero_event;
  logic out_valid, out_ready, out_head, out_tail, out_prio;
  word_t out_word;
  node_t out_node;
  logic [1:0] in_valid, in_ready, in_head;
  word_t [1:0] in_word;
  logic [1:0] rd_head = '0, rd_body = '0;
  logic [1:0] head_present, body_present, body_err, mesg_arrived, in_flushing, in_full;
  word_t [1:0] head_data, body_data;
  logic out_idle;

  msg_subsystem dut (.*);

  always #5 clk = ~clk;

  // loopback network
  always_comb begin
    for (int p = 0; p < 2; p++) begin
      in_valid[p] = out_valid && (out_prio == 1'(p));
      in_word[p]  = out_word;
      in_head[p]  = out_head;
    end
    out_ready = in_ready[out_prio];
  end

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ addressing
  // GTLB entry 0 maps pages 0..63 onto a 4 x 4 x 1 prism starting at node
  // (1,1,0), one page per node, x varying fastest.
  localparam gtlb_entry_t E0 = '{valid: 1'b1, vpn: '0, start: '{z: 5'd0, y: 5'd1, x: 5'd1},
                                 vlen: VPN_W'(64), log_lppn: 3'd0, log_x: 3'd2, log_y: 3'd2,
                                 log_z: 3'd0};

  function automatic node_t node_of(int page);
    node_t n;
    n.x = 5'(1 + (page & 3));
    n.y = 5'(1 + ((page >> 2) & 3));
    n.z = 5'd0;
    return n;
  endfunction

  function automatic word_t mkptr(perm_e perm, int page, int off);
    ptr_t p;
    p = '0;
    p.perm = perm;
    p.addr = ADDR_W'((longint'(page) << PAGE_BITS) + off);
    return word_t'(p);
  endfunction

  // ------------------------------------------------------------ expected
  typedef struct {
    word_t dip, dest;
    int    len, page;
    word_t args [12];
  } msg_t;

  msg_t expq[$];
  int   ok_cyc[$];       // cycle each SEND was granted
  int   head_cyc[$];     // cycle each head word left on the network
  int   tail_cyc[$];     // cycle each tail word left on the network
  int   arrive_cyc[$];   // cycle each head word was taken by the input queue
  int   present_cyc[$];  // cycle R_head first became present for it
  int   n_rcvd = 0;

  // ------------------------------------------------------------ sender
  task automatic mc_write(bit bank, int idx, word_t d);
    mc_wr_en   = 1;
    mc_wr_bank = bank;
    mc_wr_idx  = 4'(idx);
    mc_wr_data = d;
    @(posedge clk); #1;
    mc_wr_en   = 0;
  endtask

  // Present a SEND until it is granted; returns the cycle it issued
  task automatic do_send(bit bank, int len, int page, int ccreg, ref msg_t m, output int okc);
    send            = '0;
    send.bank       = bank;
    send.len        = 4'(len);
    send.ccreg      = 2'(ccreg);
    send.dip_isptr  = 1'b1;
    send.dip        = mkptr(PERM_EXEC_MSG, 200, 16 * len);
    send.dest_isptr = 1'b1;
    send.dest       = mkptr(PERM_RW, page, 8);
    m.dip  = send.dip;
    m.dest = send.dest;
    m.len  = len;
    m.page = page;
    send_valid = 1;
    forever begin
      #3;
      check(!send_fault, "SEND faulted");
      if (send_ok) begin
        okc = cyc;
        @(posedge clk); #1;
        break;
      end
      @(posedge clk); #1;
    end
    send_valid = 0;
    expq.push_back(m);
    ok_cyc.push_back(okc);
  endtask

  // Wait until a ccreg is present and TRUE
  task automatic wait_cc(int ccreg);
    while (!(cc_present[ccreg] && cc_val[ccreg])) begin
      @(posedge clk); #1;
    end
  endtask

  // ------------------------------------------------------------ monitors
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      if (out_head) begin
        head_cyc.push_back(cyc);
        if (expq.size() > head_cyc.size() - 1)
          check(out_node == node_of(expq[head_cyc.size() - 1].page), "destination node");
      end
      if (out_tail) tail_cyc.push_back(cyc);
    end
    if (in_valid[0] && in_ready[0] && in_head[0])
      arrive_cyc.push_back(cyc);
  end

  // ------------------------------------------------------------ receiver
  initial begin
    word_t w;
    ptr_t  wp, dp;
    msg_t  m;
    @(posedge rst_n);
    forever begin
      // R_head: hold the read until it is present
      @(posedge clk); #2;
      rd_head[0] = 1;
      while (!head_present[0]) begin
        @(posedge clk); #2;
      end
      present_cyc.push_back(cyc);
      w = head_data[0];
      @(posedge clk); #2;
      rd_head[0] = 0;
      check(expq.size() > n_rcvd, "unexpected message");
      if (expq.size() <= n_rcvd) continue;
      m = expq[n_rcvd];
      wp = ptr_t'(w);
      dp = ptr_t'(m.dip);
      check(wp.perm == PERM_EXEC, "dispatchIP permission turned into execute");
      check(wp.addr == dp.addr, "dispatchIP address");
      // R_body: count, sender, destination, arguments, then the error value
      for (int k = 0; k < m.len + 4; k++) begin
        rd_body[0] = 1;
        while (!body_present[0]) begin
          @(posedge clk); #2;
        end
        w = body_data[0];
        if (k == 0)          check(w == word_t'(m.len), "argument count");
        else if (k == 1)     check(w == word_t'(my_node), "sender ID");
        else if (k == 2)     check(w == m.dest, "destination address");
        else if (k < m.len + 3) check(w == m.args[k - 3], "argument word");
        else                 check(body_err[0] && w == ERR_VAL, "error value after the last word");
        @(posedge clk); #2;
      end
      rd_body[0] = 0;
      n_rcvd++;
    end
  end

  // ------------------------------------------------------------ workloads
  task automatic wait_delivered(int n);
    while (n_rcvd < n) begin
      @(posedge clk); #1;
    end
    repeat (3) @(posedge clk);
    #1;
  endtask

  initial begin
    msg_t m;
    int   t0, okc, okc2, base, gap, page;
    int   bank_cc [2];
    bank_cc[0] = 1;
    bank_cc[1] = 2;

    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    gtlb_fill_en = 1; gtlb_fill_idx = 0; gtlb_fill_entry = E0;
    ombc_set_en = 1;  ombc_set_val = 16'd100;
    @(posedge clk); #1;
    gtlb_fill_en = 0; ombc_set_en = 0;
    repeat (2) @(posedge clk);
    #1;

    // 1. generate and send 8 words
    t0 = cyc;
    for (int i = 0; i < 8; i++) begin
      m.args[i] = 64'h1000 + 64'(i);
      mc_write(0, i, m.args[i]);
    end
    check(cyc == t0 + 8, "8 register writes take 8 cycles");
    do_send(0, 8, 5, 1, m, okc);
    $display("generate and send 8 words: SEND presented in processor cycle %0d, granted in cycle %0d",
             okc - 1 - t0 + 1, okc - t0 + 1);
    check(okc == t0 + 9, "idle port grants the SEND the cycle after it is presented");
    wait_delivered(1);
    check(head_cyc[0] == okc + 2, "first word 2 cycles after the grant");
    check(tail_cyc[0] == head_cyc[0] + 8 + 3, "8-word message is 12 consecutive words");
    // 2. dispatch
    check(present_cyc[0] == arrive_cyc[0] + 2, "R_head present 2 cycles after the dispatchIP arrives");
    $display("dispatch: dispatchIP arrived in cycle %0d, R_head present in cycle %0d",
             arrive_cyc[0], present_cyc[0]);
    check(cc_present[1] && cc_val[1], "ccreg TRUE and present after injection");

    // 3. two consecutive 8-word messages, bank 0 then bank 1
    base = expq.size();
    t0 = cyc;
    for (int i = 0; i < 8; i++) begin
      m.args[i] = 64'h2000 + 64'(i);
      mc_write(0, i, m.args[i]);
    end
    do_send(0, 8, 6, 1, m, okc);
    for (int i = 0; i < 8; i++) begin
      m.args[i] = 64'h3000 + 64'(i);
      mc_write(1, i, m.args[i]);
    end
    do_send(1, 8, 7, 2, m, okc2);
    wait_delivered(base + 2);
    gap = head_cyc[base + 1] - tail_cyc[base] - 1;
    $display("two consecutive 8-word messages: first word to last word %0d cycles, %0d idle cycles between",
             tail_cyc[base + 1] - head_cyc[base] + 1, gap);
    check(okc == t0 + 9, "first of two messages granted at once");
    check(gap == 4, "4 idle network cycles between back-to-back messages");
    check(tail_cyc[base + 1] - head_cyc[base] + 1 == 12 + 4 + 12, "two messages in 28 network cycles");

    // 4. one message to two destinations, composed once
    base = expq.size();
    for (int i = 0; i < 8; i++) begin
      m.args[i] = 64'h4000 + 64'(i);
      mc_write(0, i, m.args[i]);
    end
    do_send(0, 8, 9, 1, m, okc);
    do_send(0, 8, 10, 3, m, okc2);
    wait_delivered(base + 2);
    check(head_cyc[base + 1] - tail_cyc[base] - 1 == 4, "multicast: second copy follows after 4 idle cycles");
    $display("one message to two destinations: %0d network cycles",
             tail_cyc[base + 1] - head_cyc[base] + 1);

    // 5. block transfer of 40 words in 10-word messages, alternating banks
    base = expq.size();
    page = 16;
    for (int j = 0; j < 4; j++) begin
      wait_cc(bank_cc[j % 2]);
      for (int i = 0; i < 10; i++) begin
        m.args[i] = 64'h5000 + 64'(10 * j + i);
        mc_write(1'(j % 2), i, m.args[i]);
      end
      do_send(1'(j % 2), 10, page + j, bank_cc[j % 2], m, okc);
    end
    wait_delivered(base + 4);
    $display("block transfer of 40 words: %0d network cycles for %0d words",
             tail_cyc[base + 3] - head_cyc[base] + 1, 4 * 14);
    check(tail_cyc[base + 3] - head_cyc[base] + 1 == 4 * 14 + 3 * 4, "block transfer network cycles");
    for (int j = 0; j < 4; j++)
      check(tail_cyc[base + j] - head_cyc[base + j] == 13, "10-word message is 14 consecutive words");
    check(ombc_count == 16'(100 - expq.size()), "OMBC decremented once per user message");

    $display("messages sent %0d, received %0d", expq.size(), n_rcvd);
    check(n_rcvd == expq.size(), "every message received");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
