// send_validation: decides, in the issue stage, whether a SEND may issue.
//
// A SEND names a bank and a length; it may issue only when every MC register
// it will inject (MC#0 .. MC#len-1 of that bank) is present, the network
// output controller grants the port, and, for a throttled message, the
// outstanding message buffer counter is not zero. Otherwise stall holds the
// SEND at issue. The check makes the injection atomic: once issued, every
// word the message needs is already there.
//
// The module also checks the rules that protect the network (fault, a trap
// to the system, in place of a stall): the destination must be a pointer; a
// user thread's dispatchIP must be a pointer with the execute-message
// permission; a user thread may use only priority 0, only the 10 user MC
// registers, and only throttled SENDs. System threads may do all of these.
// The stall rules follow the original architecture; the encoding of the fault checks is
// this design's choice.
//
// Purely combinational. req goes to the output controller; grant comes
// back; ok is req and grant, the cycle the SEND leaves issue.
module send_validation
  import msg_pkg::*;
(
  input  logic                             send_valid,
  input  send_req_t                        send,
  input  logic [MC_BANKS-1:0][MC_REGS-1:0] present,
  input  logic                             grant,
  input  logic                             ombc_zero,
  output logic                             req,
  output logic                             ok,
  output logic                             stall,
  output logic                             fault,
  // why a SEND is stalled (for monitoring)
  output logic                             stall_regs,
  output logic                             stall_throttle,
  output logic                             stall_busy
);

  logic regs_ok;
  logic throttled;
  ptr_t dip_p;

  assign dip_p = ptr_t'(send.dip);

  always_comb begin
    regs_ok = 1'b1;
    for (int i = 0; i < MC_REGS; i++)
      if (i < int'(send.len) && !present[send.bank][i])
        regs_ok = 1'b0;
  end

  always_comb begin
    fault = 1'b0;
    if (send_valid) begin
      if (!send.dest_isptr)
        fault = 1'b1;
      if (int'(send.len) > MC_REGS)
        fault = 1'b1;
      if (!send.sys) begin
        if (!send.dip_isptr || dip_p.perm != PERM_EXEC_MSG)
          fault = 1'b1;
        if (send.prio || send.nothrottle || int'(send.len) > MC_USER_REGS)
          fault = 1'b1;
      end
    end
  end

  assign throttled = ombc_zero && !(send.sys && send.nothrottle);

  assign req            = send_valid && !fault && regs_ok && !throttled;
  assign ok             = req && grant;
  assign stall          = send_valid && !fault && !ok;
  assign stall_regs     = send_valid && !fault && !regs_ok;
  assign stall_throttle = send_valid && !fault && regs_ok && throttled;
  assign stall_busy     = req && !grant;

endmodule
