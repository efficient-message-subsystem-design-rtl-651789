// net_out_ctrl: the network output controller. It owns the network output
// port, takes one granted SEND at a time and streams the message into the
// network straight out of the MC registers.
//
// States (the controller state machine of the original architecture):
//   IDLE       no grant. A request from SEND validation moves to BUSY.
//   BUSY       grant is high until the SEND issues; the SEND's operands are
//              captured then and its ccreg is marked not present. The next
//              cycle (the SEND's execute stage) the destination virtual
//              address is looked up in the GTLB. A hit (node ID available)
//              starts the message: go to INJECT and, for a throttled
//              message, decrement the OMBC. A miss aborts the SEND back to
//              IDLE and writes FALSE (present) to the ccreg; the miss is a
//              trap to system software, which fills the GTLB and repeats the
//              SEND. A request withdrawn before it issues returns to IDLE.
//   INJECT     one word per cycle while the network accepts: dispatchIP
//              (its execute-message permission turned into execute),
//              argument count, sender node ID, destination virtual address,
//              then MC#0 .. MC#len-1. Reading an MC register and writing the
//              network overlap: the read of the next register is issued in
//              the cycle the current word is accepted, so the registered read
//              port has its data ready for the following cycle.
//   WRITEBACK  write TRUE and present to the SEND's ccreg, back to IDLE.
//              The last MC register was read in the cycle before, so the
//              thread may overwrite the bank once the ccreg is present.
//
// Network output: a valid/ready word stream with head and tail flags and, as
// side-band, the destination node and the priority. A message of len MC
// registers takes len+4 cycles in INJECT when the network never stalls.
// The state sequence follows the original architecture; the order of the four header
// words follows its message format; the handshakes, the cycle in which the
// GTLB is consulted and the side-band signals are this design's choice.
module net_out_ctrl
  import msg_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  node_t                  my_node,
  // SEND validation
  input  logic                   req,
  input  send_req_t              send,
  output logic                   grant,
  // GTLB
  output logic                   gtlb_lookup_en,
  output logic [ADDR_W-1:0]      gtlb_vaddr,
  input  logic                   gtlb_hit,
  input  node_t                  gtlb_node,
  // MC register read port #1
  output logic                   rd1_en,
  output logic                   rd1_bank,
  output logic [$clog2(MC_REGS)-1:0] rd1_idx,
  input  word_t                  rd1_data,
  // condition code write
  output logic                   ncc_clr_en,
  output logic [CC_W-1:0]        ncc_clr_idx,
  output logic                   ncc_set_en,
  output logic [CC_W-1:0]        ncc_set_idx,
  output logic                   ncc_set_val,
  // throttling
  output logic                   ombc_dec,
  // network output
  output logic                   out_valid,
  input  logic                   out_ready,
  output word_t                  out_word,
  output logic                   out_head,
  output logic                   out_tail,
  output node_t                  out_node,
  output logic                   out_prio,
  // status
  output logic                   aborted,
  output logic                   idle
);

  typedef enum logic [1:0] {S_IDLE, S_BUSY, S_INJECT, S_WRITEBACK} state_e;

  state_e           state_q;
  logic             issued_q;
  send_req_t        send_q;
  node_t            node_q;
  logic [LEN_W:0]   wptr_q;     // index of the word on the network port
  logic [LEN_W:0]   last;       // index of the last word

  logic accept;
  ptr_t dip_p;

  assign last   = (LEN_W+1)'(send_q.len) + (LEN_W+1)'(HDR_WORDS - 1);
  assign accept = (state_q == S_INJECT) && out_ready;

  assign grant          = (state_q == S_BUSY) && !issued_q;
  assign gtlb_lookup_en = (state_q == S_BUSY) && issued_q;
  assign gtlb_vaddr     = send_q.dest[ADDR_W-1:0];
  assign aborted        = gtlb_lookup_en && !gtlb_hit;
  assign idle           = (state_q == S_IDLE);

  assign ncc_clr_en  = grant && req;
  assign ncc_clr_idx = send.ccreg;
  assign ombc_dec    = gtlb_lookup_en && gtlb_hit && !(send_q.sys && send_q.nothrottle);
  assign ncc_set_en  = (state_q == S_WRITEBACK) || aborted;
  assign ncc_set_idx = send_q.ccreg;
  assign ncc_set_val = !aborted;

  // Read MC#(wptr+1-4) while word wptr is accepted
  assign rd1_en   = accept && (wptr_q != last) && (wptr_q >= (LEN_W+1)'(HDR_WORDS - 1));
  assign rd1_bank = send_q.bank;
  assign rd1_idx  = ($clog2(MC_REGS))'(wptr_q + (LEN_W+1)'(1) - (LEN_W+1)'(HDR_WORDS));

  always_comb begin
    dip_p = ptr_t'(send_q.dip);
    if (dip_p.perm == PERM_EXEC_MSG)
      dip_p.perm = PERM_EXEC;
    unique case (wptr_q)
      0:       out_word = word_t'(dip_p);
      1:       out_word = word_t'(send_q.len);
      2:       out_word = word_t'(my_node);
      3:       out_word = send_q.dest;
      default: out_word = rd1_data;
    endcase
  end

  assign out_valid = (state_q == S_INJECT);
  assign out_head  = (wptr_q == '0);
  assign out_tail  = (wptr_q == last);
  assign out_node  = node_q;
  assign out_prio  = send_q.prio;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      issued_q <= 1'b0;
      send_q   <= '0;
      node_q   <= '0;
      wptr_q   <= '0;
    end else begin
      unique case (state_q)
        S_IDLE: begin
          issued_q <= 1'b0;
          if (req)
            state_q <= S_BUSY;
        end
        S_BUSY: begin
          if (!issued_q) begin
            if (req) begin
              send_q   <= send;
              issued_q <= 1'b1;
            end else begin
              state_q <= S_IDLE;
            end
          end else if (gtlb_hit) begin
            node_q  <= gtlb_node;
            wptr_q  <= '0;
            state_q <= S_INJECT;
          end else begin
            state_q <= S_IDLE;         // abort
          end
        end
        S_INJECT: begin
          if (accept) begin
            if (wptr_q == last)
              state_q <= S_WRITEBACK;
            else
              wptr_q <= wptr_q + 1'b1;
          end
        end
        S_WRITEBACK: begin
          issued_q <= 1'b0;
          state_q  <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // A word offered to the network stays put until it is taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n)
      (out_valid && !out_ready) |=> (out_valid && $stable(out_word) && $stable(out_head));
  endproperty
  a_hold: assert property (p_hold);

endmodule
