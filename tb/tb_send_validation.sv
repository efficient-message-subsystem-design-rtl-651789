// tb_send_validation: random SENDs, presence bits, grant and OMBC state,
// checked against the issue rules written out here: a SEND faults if its
// destination is not a pointer, or (user thread) its dispatchIP is not an
// execute-message pointer, it asks for priority 1, for the throttle bypass
// or for more than 10 MC registers; otherwise it requests the port when
// MC#0..len-1 are present and it is not throttled, and issues on grant.
module tb_send_validation;
  import msg_pkg::*;
  logic send_valid;
  send_req_t send;
  logic [1:0][11:0] present;
  logic grant, ombc_zero;
  logic req, ok, stall, fault, stall_regs, stall_throttle, stall_busy;
  int checks = 0, failures = 0;
  int n_ok = 0, n_fault = 0, n_regs = 0, n_thr = 0, n_busy = 0;

  send_validation dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit e_fault, e_regs, e_thr, e_req, e_ok;
    ptr_t p;
    for (int t = 0; t < 20000; t++) begin
      send_valid = ($urandom_range(0, 7) != 0);
      send = '0;
      send.bank = 1'($urandom);
      send.len = LEN_W'($urandom_range(0, 13));
      send.sys = ($urandom_range(0, 3) == 0);
      send.prio = ($urandom_range(0, 5) == 0);
      send.nothrottle = ($urandom_range(0, 5) == 0);
      send.dest_isptr = ($urandom_range(0, 15) != 0);
      send.dip_isptr = ($urandom_range(0, 15) != 0);
      p = '0;
      p.perm = ($urandom_range(0, 7) == 0) ? PERM_RW : PERM_EXEC_MSG;
      p.addr = ADDR_W'($urandom);
      send.dip = word_t'(p);
      send.dest = {$urandom, $urandom};
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 12; r++)
          present[b][r] = ($urandom_range(0, 15) != 0);
      grant = 1'($urandom);
      ombc_zero = ($urandom_range(0, 3) == 0);
      // reference
      e_fault = !send.dest_isptr || send.len > 12;
      if (!send.sys)
        e_fault |= !send.dip_isptr || p.perm != PERM_EXEC_MSG || send.prio
                   || send.nothrottle || send.len > 10;
      e_fault &= send_valid;
      e_regs = 1;
      for (int r = 0; r < 12; r++) if (r < send.len && !present[send.bank][r]) e_regs = 0;
      e_thr = ombc_zero && !(send.sys && send.nothrottle);
      e_req = send_valid && !e_fault && e_regs && !e_thr;
      e_ok  = e_req && grant;
      #1;
      checks++;
      if (fault != e_fault || req != e_req || ok != e_ok ||
          stall != (send_valid && !e_fault && !e_ok)) begin
        failures++;
        $display("FAIL t=%0d fault %0d/%0d req %0d/%0d ok %0d/%0d", t, fault, e_fault, req, e_req, ok, e_ok);
      end
      checks++;
      if (stall_regs != (send_valid && !e_fault && !e_regs) ||
          stall_throttle != (send_valid && !e_fault && e_regs && e_thr) ||
          stall_busy != (e_req && !grant)) begin
        failures++;
        $display("FAIL stall cause t=%0d", t);
      end
      n_ok += e_ok; n_fault += e_fault; n_regs += stall_regs; n_thr += stall_throttle; n_busy += stall_busy;
      #9;
    end
    checks++;
    if (n_ok == 0 || n_fault == 0 || n_regs == 0 || n_thr == 0 || n_busy == 0) failures++;
    $display("ok %0d fault %0d regs %0d throttle %0d busy %0d", n_ok, n_fault, n_regs, n_thr, n_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
