// tb_msg_subsystem: end-to-end test of the message subsystem at its default
// parameters. The network output is looped back into the input unit of the
// message's priority through a network model that randomly stalls.
//
// Around the design run models of the software it serves:
//  - a user thread composes messages alternately in MC bank 0 and bank 1,
//    waits on each bank's ccreg before writing the bank again, sometimes
//    leaves MC#0 not present for a few cycles (a load still in flight),
//    sends some messages to a region the GTLB does not yet map, and once
//    asks for priority 1, which a user may not;
//  - an issue stage that presents SENDs (system SENDs first) and acts as the
//    trap handler: on a GTLB miss it fills the entry and repeats the SEND;
//  - a priority-0 message thread that checks every word of every message,
//    sometimes leaves words unread (flush) or reads one too many (error
//    value), pauses now and then, and answers each message with an
//    Acknowledge SEND on priority 1 that bypasses throttling;
//  - a priority-1 message thread that takes the Acknowledges and increments
//    the OMBC, as the system handler would.
// The OMBC starts at 8, enough for the pauses to fill the input queue; half
// way, once all messages are acknowledged, the system reloads it with 2, so
// the later pauses drive it to zero and throttle the user. Every mechanism
// listed at the end must occur at least once. At the end the OMBC must be
// back at 2. A first, uncontended message checks the timing:
// one word per cycle on the network, and R_head present 4 cycles after the
// SEND issues.
module tb_msg_subsystem;
  import msg_pkg::*;

  localparam int NU        = 200;
  localparam int OMBC_INIT = 8;
  localparam int OMBC_LOW  = 2;

  logic clk = 0, rst_n = 0;
  node_t my_node;
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

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s at cycle %0d", what, cyc); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired: sent %0d delivered %0d acks %0d, queues user %0d ack %0d exp %0d/%0d, OMBC %0d",
             n_user_sent, n_delivered, n_ack, userq.size(), ackq.size(), expq[0].size(), expq[1].size(),
             ombc_count);
    if (userq.size() > 0)
      $display("head of user queue: idx %0d bank %0d len %0d; stall regs %0d busy %0d thr %0d fault %0d present %b idle %0d",
               userq[0].idx, userq[0].req.bank, userq[0].req.len, stall_regs, stall_busy, stall_throttle,
               send_fault, dut.present, out_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- messages
  typedef struct {
    send_req_t req;
    word_t     args [12];
    node_t     node;
    int        rdmode;   // 0 read all, 1 leave words unread, 2 read one extra
    int        idx;      // user message number, -1 for an Acknowledge
  } msg_t;

  msg_t userq[$], ackq[$], expq[2][$], inflight;
  node_t node_exp[$];
  bit   pending [2], cc_wait [2];
  bit   warmup = 1, entry1_valid = 0;

  // Counters of the mechanisms
  int n_stall_regs = 0, n_stall_busy = 0, n_stall_thr = 0, n_zero_evt = 0;
  int n_miss = 0, n_fault = 0, n_backpressure = 0, n_full = 0, n_flush = 0;
  int n_err = 0, n_head_stall = 0, n_body_stall = 0, n_ccwait = 0, n_ack = 0;
  int n_bank [2], n_delivered = 0, n_user_sent = 0;
  int ok_cycle = -1, head_cycle = -1, first_len = -1, first_valid_cycles = 0;

  localparam gtlb_entry_t E0 = '{valid: 1'b1, vpn: '0, start: '{z: 5'd4, y: 5'd3, x: 5'd2},
                                 vlen: VPN_W'(64), log_lppn: 3'd1, log_x: 3'd1, log_y: 3'd1,
                                 log_z: 3'd0};
  localparam gtlb_entry_t E1 = '{valid: 1'b1, vpn: VPN_W'(64), start: '{z: 5'd9, y: 5'd8, x: 5'd7},
                                 vlen: VPN_W'(64), log_lppn: 3'd0, log_x: 3'd2, log_y: 3'd0,
                                 log_z: 3'd0};

  function automatic node_t node_of(int page);
    node_t n;
    if (page < 64) begin
      n.x = 5'(2 + ((page >> 1) & 1));
      n.y = 5'(3 + ((page >> 2) & 1));
      n.z = 5'd4;
    end else begin
      n.x = 5'(7 + ((page - 64) & 3));
      n.y = 5'd8;
      n.z = 5'd9;
    end
    return n;
  endfunction

  function automatic word_t mkptr(perm_e perm, int page, int off);
    ptr_t p;
    p = '0;
    p.perm = perm;
    p.addr = ADDR_W'((longint'(page) << PAGE_BITS) + off);
    return word_t'(p);
  endfunction

  // ---------------------------------------------------------------- network
  logic net_ok;
  always @(negedge clk) net_ok <= warmup ? 1'b1 : ($urandom_range(0, 3) != 0);
  assign out_ready   = net_ok && in_ready[out_prio];
  assign in_valid[0] = out_valid && net_ok && !out_prio;
  assign in_valid[1] = out_valid && net_ok && out_prio;
  assign in_word     = {out_word, out_word};
  assign in_head     = {out_head, out_head};

  always @(posedge clk) if (rst_n) begin
    if (out_valid && !out_ready) n_backpressure++;
    if (in_full[0] || in_full[1]) n_full++;
    if (in_flushing != 0) n_flush++;
    if (ombc_zero_event) n_zero_evt++;
    if (warmup && out_valid) first_valid_cycles++;
    if (out_valid && out_ready && out_head) begin
      check(node_exp.size() > 0 && out_node == node_exp[0], "destination node from the GTLB");
      void'(node_exp.pop_front());
    end
  end

  // ------------------------------------------------------------ issue stage
  initial begin : issue
    msg_t cand;
    int src;                  // 0 none, 1 Acknowledge, 2 user
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      gtlb_fill_en = 0;
      src = 0;
      if (ackq.size() > 0) begin cand = ackq[0]; src = 1; end
      else if (userq.size() > 0) begin cand = userq[0]; src = 2; end
      send_valid = (src != 0);
      send = (src != 0) ? cand.req : '0;
      #3;
      if (stall_regs) n_stall_regs++;
      if (stall_busy) n_stall_busy++;
      if (stall_throttle) n_stall_thr++;
      if (gtlb_miss) begin
        // trap: the SEND issued last cycle is abandoned; map the region and
        // repeat it
        n_miss++;
        n_user_sent--;
        n_bank[inflight.req.bank]--;
        void'(expq[inflight.req.prio].pop_back());
        void'(node_exp.pop_back());
        userq.push_front(inflight);
        pending[inflight.req.bank] = 1;
        gtlb_fill_en = 1; gtlb_fill_idx = 2'd1; gtlb_fill_entry = E1;
        entry1_valid = 1;
      end
      if (src != 0 && send_fault) begin
        n_fault++;
        check(src == 2 && cand.req.prio, "only the bad SEND faults");
        void'(userq.pop_front());
        pending[cand.req.bank] = 0;
      end else if (src != 0 && send_ok) begin
        expq[cand.req.prio].push_back(cand);
        node_exp.push_back(cand.node);
        if (src == 1) void'(ackq.pop_front());
        else begin
          void'(userq.pop_front());
          inflight = cand;
          pending[cand.req.bank] = 0;
          cc_wait[cand.req.bank] = 1;
          n_bank[cand.req.bank]++;
          n_user_sent++;
          if (cand.idx == 0) ok_cycle = cyc;
          // now and then the system drops the second GTLB entry again
          if (cand.idx % 20 == 19 && !gtlb_miss && cand.req.dest[ADDR_W-1:PAGE_BITS] < 64) begin
            gtlb_fill_en = 1; gtlb_fill_idx = 2'd1; gtlb_fill_entry = '0;
            entry1_valid = 0;
          end
        end
      end
    end
  end

  // ------------------------------------------------------------ user thread
  initial begin : user
    msg_t m;
    int len, page, b;
    bit late;
    @(posedge rst_n);
    @(negedge clk);
    ombc_set_en = 1; ombc_set_val = 16'(OMBC_INIT);
    gtlb_fill_en = 1; gtlb_fill_idx = 2'd0; gtlb_fill_entry = E0;
    @(negedge clk);
    ombc_set_en = 0;
    gtlb_fill_en = 0;
    for (int i = 0; i < NU; i++) begin
      b = i % 2;
      if (i == NU / 2) begin
        // the system lowers the network load: once every message so far is
        // acknowledged, reload the OMBC with a smaller value
        while (pending[0] || pending[1] || n_ack != n_user_sent) @(negedge clk);
        ombc_set_en = 1; ombc_set_val = 16'(OMBC_LOW);
        @(negedge clk);
        ombc_set_en = 0;
      end
      while (pending[b]) @(negedge clk);
      if (cc_wait[b]) begin
        #3;
        if (!(cc_present[b] && cc_val[b])) n_ccwait++;
        while (!(cc_present[b] && cc_val[b])) begin @(negedge clk); #3; end
        @(negedge clk);
      end
      len  = (i == 0) ? 8 : $urandom_range(0, 10);
      page = (i % 9 == 4) ? $urandom_range(64, 127) : $urandom_range(0, 63);
      late = (i % 5 == 2) && len > 0;
      m.req = '0;
      m.req.bank  = 1'(b);
      m.req.len   = LEN_W'(len);
      m.req.ccreg = 2'(b);
      m.req.dip_isptr  = 1;
      m.req.dip   = mkptr(PERM_EXEC_MSG, 500 + i, 8 * i);
      m.req.dest_isptr = 1;
      m.req.dest  = mkptr(PERM_RW, page, 8 * $urandom_range(0, 500));
      m.req.prio  = (i == 7);                // a user may not do this
      for (int r = 0; r < 12; r++) m.args[r] = {$urandom, $urandom};
      m.node   = node_of(page);
      m.rdmode = (i == 0) ? 0 : $urandom_range(0, 4) % 3;
      m.idx    = i;
      if (late) begin
        mc_inv_en = 1; mc_inv_bank = 1'(b); mc_inv_idx = 4'd0;
        @(negedge clk);
        mc_inv_en = 0;
      end
      for (int r = (late ? 1 : 0); r < len; r++) begin
        mc_wr_en = 1; mc_wr_bank = 1'(b); mc_wr_idx = 4'(r); mc_wr_data = m.args[r];
        @(negedge clk);
      end
      mc_wr_en = 0;
      pending[b] = 1;
      userq.push_back(m);
      if (late) begin
        repeat (6) @(negedge clk);
        mc_wr_en = 1; mc_wr_bank = 1'(b); mc_wr_idx = 4'd0; mc_wr_data = m.args[0];
        @(negedge clk);
        mc_wr_en = 0;
      end
    end
  end

  // --------------------------------------------------------- message threads
  task automatic handler(int p);
    msg_t m;
    int k, len, handled = 0;
    word_t exp;
    ptr_t dp;
    forever begin
      if (p == 0 && handled % 25 == 10) repeat (150) @(negedge clk);
      // R_head
      @(negedge clk);
      rd_head[p] = 1;
      #3;
      while (!head_present[p]) begin
        n_head_stall++;
        @(negedge clk); #3;
      end
      if (p == 0 && warmup) head_cycle = cyc;
      check(expq[p].size() > 0, "a message was expected");
      m = expq[p].pop_front();
      dp = ptr_t'(m.req.dip);
      dp.perm = PERM_EXEC;
      check(head_data[p] == word_t'(dp), "dispatchIP, permission turned to execute");
      @(negedge clk);
      rd_head[p] = 0;
      if (p == 1) begin                      // Acknowledge: software returns a buffer
        ombc_inc = 1;
        @(negedge clk);
        ombc_inc = 0;
      end
      len = int'(m.req.len);
      case (m.rdmode)
        1:       k = $urandom_range(0, 2 + len);
        2:       k = 4 + len;
        default: k = 3 + len;
      endcase
      for (int j = 0; j < k; j++) begin
        if (j > 0) @(negedge clk);
        rd_body[p] = 1;
        #3;
        while (!body_present[p]) begin
          n_body_stall++;
          @(negedge clk); #3;
        end
        case (j)
          0: exp = word_t'(len);
          1: exp = word_t'(my_node);
          2: exp = m.req.dest;
          default: exp = (j - 3 < len) ? m.args[j - 3] : ERR_VAL;
        endcase
        check(body_data[p] == exp && body_err[p] == (j >= 3 + len), "R_body word");
        if (j >= 3 + len) n_err++;
      end
      if (k > 0) @(negedge clk);
      rd_body[p] = 0;
      handled++;
      if (p == 0) begin
        msg_t a;
        n_delivered++;
        if (warmup) warmup = 0;
        a.req = '0;
        a.req.sys = 1; a.req.nothrottle = 1; a.req.prio = 1;
        a.req.bank = 1; a.req.len = '0; a.req.ccreg = 2'd3;
        a.req.dip_isptr = 1;  a.req.dip = mkptr(PERM_EXEC_MSG, 900, 0);
        a.req.dest_isptr = 1; a.req.dest = mkptr(PERM_RW, 5, 64);
        a.node = node_of(5);
        a.rdmode = 0;
        a.idx = -1;
        foreach (a.args[r]) a.args[r] = '0;
        ackq.push_back(a);
      end else begin
        n_ack++;
      end
    end
  endtask

  initial begin
    my_node = '{x: 5'd1, y: 5'd2, z: 5'd3};
    repeat (3) @(posedge clk);
    rst_n = 1;
    fork
      handler(0);
      handler(1);
    join_none
    wait (n_user_sent == NU - 1 && n_ack == NU - 1 && n_delivered == NU - 1);
    repeat (20) @(posedge clk);
    check(userq.size() == 0 && ackq.size() == 0 && expq[0].size() == 0 && expq[1].size() == 0,
          "all messages delivered");
    check(int'(ombc_count) == OMBC_LOW, "every buffer returned to the OMBC");
    check(first_valid_cycles == 8 + 4, "first message: one word per cycle");
    check(head_cycle - ok_cycle == 4, "first message: R_head present 4 cycles after SEND issue");
    $display("stalls: MC regs %0d, port busy %0d, throttle %0d; OMBC zero events %0d",
             n_stall_regs, n_stall_busy, n_stall_thr, n_zero_evt);
    $display("GTLB misses %0d, SEND faults %0d, network stalls %0d, queue full %0d",
             n_miss, n_fault, n_backpressure, n_full);
    $display("flush cycles %0d, error values %0d, R_head stalls %0d, R_body stalls %0d",
             n_flush, n_err, n_head_stall, n_body_stall);
    $display("ccreg waits %0d, Acknowledges %0d, bank 0/1 sends %0d/%0d, latency %0d",
             n_ccwait, n_ack, n_bank[0], n_bank[1], head_cycle - ok_cycle);
    check(n_stall_regs > 0, "SEND stalled on an MC register not present");
    check(n_stall_busy > 0, "SEND stalled on a busy output port");
    check(n_stall_thr > 0, "SEND throttled by the OMBC");
    check(n_zero_evt > 0, "OMBC zero event");
    check(n_miss > 0, "GTLB miss abort");
    check(n_fault == 1, "protection fault");
    check(n_backpressure > 0, "network back-pressure");
    check(n_full > 0, "input queue full");
    check(n_flush > 0, "flush of unread words");
    check(n_err > 0, "error value from R_body");
    check(n_head_stall > 0 && n_body_stall > 0, "R_head and R_body stalls");
    check(n_ccwait > 0, "thread waited on a ccreg");
    check(n_bank[0] > 0 && n_bank[1] > 0, "both MC banks used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
